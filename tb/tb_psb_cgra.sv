// tb_psb_cgra: end-to-end test of the PSB CGRA at its default size.
//
// Runs the example loop of the design on the 4x4 array, twice:
//   for i: a[i] = a[i-1] + C1;  b[i] = b[i-1] - C2;
//          if (a[i-1] < S) c[i] = b[i] * c[i-1] - C3;           (if-path)
//          else            c[i] = a[i] * C4 - b[i] * C5;         (else-path)
// using PEs 0..3 of row 0 (a ring through the torus) and PE (1,3), which
// stores every c value into the row-1 memory bank.
//   Program M (modulo-scheduled, II = 2, cfg_modulo = 1): prologue at
//     0..2, then an else-version of the kernel at 3-4 and an if-version at
//     5-6; the branch in each pass selects the version of the next pass.
//   Program N (non-pipelined, 4 cycles per iteration, cfg_modulo = 0):
//     prologue at 16 (loads a[-1] from row-0 memory), loop 17..22 with
//     17 branch, 18 delay slot, 19-20 else-path, 21-22 if-path.
//   Program P (5 cycles per iteration, cfg_modulo = 0): as N, but the
//     condition is computed by PE (1,1) and sent over the predicate
//     network to the designated PE, which branches on it (OP_BRP).
//   Program Q (K = 3, 5 cycles per iteration): the if-path contains an
//     inner conditional, computed both ways and resolved with SEL on a
//     predicate from the predicate network (partial predication), as for
//     nested conditionals.
// The stored c values and the final registers are compared with a model
// computed here. The run length in cycles is checked against the schedule
// (3 + 2, 1 + 4, 1 + 5 and 1 + 5 cycles per iteration). Every mechanism must occur:
// branch taken, branch not taken, path skip, loop wrap, both region
// placements, a branch on a routed predicate, both outcomes of the inner
// select, loads and stores on the
// row buses.
module tb_psb_cgra;
  import psb_pkg::*;
  import psb_tb_pkg::*;

  localparam int NIT = 30;
  localparam int A0 = 0, B0 = 1000, CI0 = 5;
  localparam int C1 = 3, C2 = 7, C3 = 2, C4 = 3, C5 = 2, S = 45, T2 = 1000;

  logic clk = 0, rst_n = 0, start = 0;
  logic [5:0] cfg_start, cfg_loop_start, cfg_loop_end;
  logic cfg_modulo;
  logic [15:0] cfg_cycles;
  logic busy, done;
  logic imem_we;
  logic [5:0] imem_addr;
  logic [3:0] imem_pe;
  instr_t imem_wdata;
  logic dmem_we;
  logic [1:0] dmem_row;
  logic [7:0] dmem_addr;
  logic [31:0] dmem_wdata, dmem_rdata;
  logic ev_taken, ev_not_taken, ev_skip, ev_wrap;
  logic [31:0] pe_dout [16];
  logic pe_pout [16];
  int checks = 0, failures = 0;

  psb_cgra dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event counters
  int n_sel_t = 0, n_sel_f = 0, n_brp = 0, n_taken = 0, n_not = 0, n_skip = 0, n_wrap = 0, n_load = 0, n_store = 0;
  always_ff @(posedge clk) begin
    n_taken <= n_taken + int'(ev_taken);
    n_not   <= n_not + int'(ev_not_taken);
    n_skip  <= n_skip + int'(ev_skip);
    n_wrap  <= n_wrap + int'(ev_wrap);
    if (dut.u_array.g_row[0].g_col[3].u_pe.op == OP_SEL) begin
      if (dut.u_array.g_row[0].g_col[3].u_pe.p) n_sel_t <= n_sel_t + 1;
      else                                      n_sel_f <= n_sel_f + 1;
    end
    n_brp   <= n_brp + int'(dut.u_array.g_row[0].g_col[1].u_pe.op == OP_BRP);
    for (int r = 0; r < 4; r++) begin
      if (dut.u_array.row_mem[r].req &&  dut.u_array.row_mem[r].we) n_store <= n_store + 1;
      if (dut.u_array.row_mem[r].req && !dut.u_array.row_mem[r].we) n_load  <= n_load + 1;
    end
  end

  // PE numbers (row*4 + column)
  localparam int PE1 = 0, PE2 = 1, PE3 = 2, PE4 = 3, PST = 7, PCMP = 5;

  task automatic put(int addr, int pe, instr_t i);
    @(negedge clk);
    imem_we = 1; imem_addr = 6'(addr); imem_pe = 4'(pe); imem_wdata = i;
    @(negedge clk) imem_we = 0;
  endtask

  task automatic clear_prog();
    for (int a = 0; a < 64; a++) for (int p = 0; p < 16; p++) put(a, p, INSTR_NOP);
  endtask

  task automatic host_wr(int row, int addr, int v);
    @(negedge clk);
    dmem_we = 1; dmem_row = 2'(row); dmem_addr = 8'(addr); dmem_wdata = 32'(v);
    @(negedge clk) dmem_we = 0;
  endtask

  task automatic host_rd(int row, int addr, output int v);
    dmem_row = 2'(row); dmem_addr = 8'(addr);
    #1 v = int'(dmem_rdata);
  endtask

  // reference model: c values c[-1..NIT-1] at cref[0..NIT]
  int cref[NIT+1];
  int aref, bref;
  bit taken_any, not_any;
  task automatic model();
    int a_prev, a, b, c;
    a_prev = A0; b = B0; c = CI0; cref[0] = c;
    for (int i = 0; i < NIT; i++) begin
      a = a_prev + C1; b = b - C2;
      if (a_prev < S) c = b * c - C3;
      else            c = a * C4 - b * C5;
      cref[i+1] = c;
      a_prev = a;
    end
    aref = a_prev; bref = b;
  endtask

  // nested variant: the if-path holds an inner conditional
  //   yt = b[i] * c[i-1];  c[i] = (yt < T2) ? yt - C3 : yt + C3
  int cref2[NIT+1];
  task automatic model_nested();
    int a_prev, a, b, c, yt;
    a_prev = A0; b = B0; c = CI0; cref2[0] = c;
    for (int i = 0; i < NIT; i++) begin
      a = a_prev + C1; b = b - C2;
      if (a_prev < S) begin
        yt = b * c;
        c = (yt < T2) ? yt - C3 : yt + C3;
      end else c = a * C4 - b * C5;
      cref2[i+1] = c;
      a_prev = a;
    end
  endtask

  task automatic run(int s, int ls, int le, bit m, int cycles, output int took);
    int t0;
    @(negedge clk);
    cfg_start = 6'(s); cfg_loop_start = 6'(ls); cfg_loop_end = 6'(le);
    cfg_modulo = m; cfg_cycles = 16'(cycles);
    start = 1;
    @(negedge clk) start = 0;
    t0 = 0;
    while (!done) begin @(negedge clk); t0++; end
    took = t0;
    repeat (2) @(negedge clk);   // last row executes, then settles
  endtask

  task automatic check_results(string name, int bexp, bit nested = 0);
    for (int k = 0; k <= NIT - 1; k++) begin
      int v;
      host_rd(1, k, v);
      checks++;
      if (v != (nested ? cref2[k] : cref[k])) begin
        failures++; $display("FAIL %s: mem[%0d]=%0d want c[%0d]", name, k, v, k-1);
      end
    end
    checks += 3;
    if (int'(pe_dout[PE4]) != (nested ? cref2[NIT] : cref[NIT])) begin failures++; $display("FAIL %s: final c %0d want %0d", name, pe_dout[PE4], cref[NIT]); end
    if (int'(pe_dout[PE3]) != bexp) begin failures++; $display("FAIL %s: final b %0d want %0d", name, pe_dout[PE3], bexp); end
  endtask

  int took;

  initial begin
    imem_we = 0; imem_addr = 0; imem_pe = 0; imem_wdata = INSTR_NOP;
    dmem_we = 0; dmem_row = 0; dmem_addr = 0; dmem_wdata = 0;
    cfg_start = 0; cfg_loop_start = 0; cfg_loop_end = 0; cfg_modulo = 0; cfg_cycles = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    model();
    clear_prog();

    // ---------------- Program M: modulo schedule (II = 2) ----------------
    put(0, PE2, ins(OP_MOV, SRC_IMM, SRC_N, A0));
    put(0, PE3, ins(OP_MOV, SRC_IMM, SRC_N, B0));
    put(0, PE4, ins(OP_MOV, SRC_IMM, SRC_N, CI0));
    put(0, PST, ins(.op(OP_MOV), .a(SRC_IMM), .imm(0), .rf_we(1), .rf_wa(0)));
    put(1, PE2, ins(OP_BLT, SRC_SELF, SRC_IMM, S, 2));
    put(2, PE2, ins(OP_ADD, SRC_SELF, SRC_IMM, C1));
    put(2, PE3, ins(OP_SUB, SRC_SELF, SRC_IMM, C2));
    // else-version, pass cycle 1 / 2
    put(3, PE1, ins(OP_MUL, SRC_E, SRC_IMM, C4));           // xf = a*C4
    put(3, PE2, ins(OP_BLT, SRC_SELF, SRC_IMM, S, 2));      // next iteration's branch
    put(3, PE4, ins(OP_MUL, SRC_W, SRC_IMM, C5));           // yf = b*C5
    put(3, PST, ins(.op(OP_STORE), .a(SRC_RF), .b(SRC_N), .rf_ra(0)));
    put(4, PE2, ins(OP_ADD, SRC_SELF, SRC_IMM, C1));
    put(4, PE3, ins(OP_SUB, SRC_SELF, SRC_IMM, C2));
    put(4, PE4, ins(OP_SUB, SRC_E, SRC_SELF));              // cf = xf - yf
    put(4, PST, ins(.op(OP_ADD), .a(SRC_RF), .b(SRC_IMM), .imm(1), .rf_we(1)));
    // if-version
    put(5, PE2, ins(OP_BLT, SRC_SELF, SRC_IMM, S, 2));
    put(5, PE4, ins(OP_MUL, SRC_W, SRC_SELF));              // yt = b*c
    put(5, PST, ins(.op(OP_STORE), .a(SRC_RF), .b(SRC_N), .rf_ra(0)));
    put(6, PE2, ins(OP_ADD, SRC_SELF, SRC_IMM, C1));
    put(6, PE3, ins(OP_SUB, SRC_SELF, SRC_IMM, C2));
    put(6, PE4, ins(OP_SUB, SRC_SELF, SRC_IMM, C3));        // ct = yt - C3
    put(6, PST, ins(.op(OP_ADD), .a(SRC_RF), .b(SRC_IMM), .imm(1), .rf_we(1)));

    run(0, 3, 6, 1, 3 + 2 * NIT, took);
    checks++;
    if (took != 3 + 2 * NIT) begin failures++; $display("FAIL M: %0d cycles, expected %0d", took, 3 + 2 * NIT); end
    // the modulo kernel runs a and b one iteration ahead
    check_results("M", bref - C2);
    $display("M: %0d cycles for %0d iterations (II = 2)", took, NIT);
    for (int k = 0; k < NIT; k++) host_wr(1, k, 32'hDEAD);

    // ---------------- Program N: non-pipelined (4 cycles / iteration) ----
    host_wr(0, 9, A0);
    put(16, PE2, ins(OP_LOAD, SRC_IMM, SRC_N, 9));          // a[-1] from memory
    put(16, PE3, ins(OP_MOV, SRC_IMM, SRC_N, B0));
    put(16, PE4, ins(OP_MOV, SRC_IMM, SRC_N, CI0));
    put(16, PST, ins(.op(OP_MOV), .a(SRC_IMM), .imm(0), .rf_we(1), .rf_wa(0)));
    put(17, PE2, ins(OP_BLT, SRC_SELF, SRC_IMM, S, 2));
    put(17, PST, ins(.op(OP_STORE), .a(SRC_RF), .b(SRC_N), .rf_ra(0)));
    put(18, PE2, ins(OP_ADD, SRC_SELF, SRC_IMM, C1));       // delay slot
    put(18, PE3, ins(OP_SUB, SRC_SELF, SRC_IMM, C2));
    put(18, PST, ins(.op(OP_ADD), .a(SRC_RF), .b(SRC_IMM), .imm(1), .rf_we(1)));
    put(19, PE1, ins(OP_MUL, SRC_E, SRC_IMM, C4));          // else-path
    put(19, PE4, ins(OP_MUL, SRC_W, SRC_IMM, C5));
    put(20, PE4, ins(OP_SUB, SRC_E, SRC_SELF));
    put(21, PE4, ins(OP_MUL, SRC_W, SRC_SELF));             // if-path
    put(22, PE4, ins(OP_SUB, SRC_SELF, SRC_IMM, C3));

    run(16, 17, 22, 0, 1 + 4 * NIT, took);
    checks++;
    if (took != 1 + 4 * NIT) begin failures++; $display("FAIL N: %0d cycles, expected %0d", took, 1 + 4 * NIT); end
    check_results("N", bref);
    $display("N: %0d cycles for %0d iterations", took, NIT);

    for (int k = 0; k < NIT; k++) host_wr(1, k, 32'hDEAD);

    // ---------------- Program P: branch on a routed predicate ------------
    // The condition is computed by PE (1,1) and reaches the designated PE
    // over the predicate network (south link); 5 cycles per iteration.
    put(32, PE2, ins(OP_MOV, SRC_IMM, SRC_N, A0));
    put(32, PE3, ins(OP_MOV, SRC_IMM, SRC_N, B0));
    put(32, PE4, ins(OP_MOV, SRC_IMM, SRC_N, CI0));
    put(32, PST, ins(.op(OP_MOV), .a(SRC_IMM), .imm(0), .rf_we(1), .rf_wa(0)));
    put(33, PCMP, ins(OP_LT, SRC_N, SRC_IMM, S));            // p = a[i-1] < S
    put(33, PST, ins(.op(OP_STORE), .a(SRC_RF), .b(SRC_N), .rf_ra(0)));
    put(34, PE2, ins(.op(OP_BRP), .k(2), .p(PSRC_S)));       // branch on p
    put(35, PE2, ins(OP_ADD, SRC_SELF, SRC_IMM, C1));        // delay slot
    put(35, PE3, ins(OP_SUB, SRC_SELF, SRC_IMM, C2));
    put(35, PST, ins(.op(OP_ADD), .a(SRC_RF), .b(SRC_IMM), .imm(1), .rf_we(1)));
    put(36, PE1, ins(OP_MUL, SRC_E, SRC_IMM, C4));           // else-path
    put(36, PE4, ins(OP_MUL, SRC_W, SRC_IMM, C5));
    put(37, PE4, ins(OP_SUB, SRC_E, SRC_SELF));
    put(38, PE4, ins(OP_MUL, SRC_W, SRC_SELF));              // if-path
    put(39, PE4, ins(OP_SUB, SRC_SELF, SRC_IMM, C3));

    run(32, 33, 39, 0, 1 + 5 * NIT, took);
    checks++;
    if (took != 1 + 5 * NIT) begin failures++; $display("FAIL P: %0d cycles, expected %0d", took, 1 + 5 * NIT); end
    check_results("P", bref);
    $display("P: %0d cycles for %0d iterations", took, NIT);

    for (int k = 0; k < NIT; k++) host_wr(1, k, 32'hDEAD);

    // ---------------- Program Q: nested conditional ----------------------
    // K = 3. The if-path holds an inner conditional that is handled by
    // partial predication: PE (1,3) compares, both alternatives are
    // computed, and PE 3 selects with the predicate from its south link.
    model_nested();
    put(48, PE2, ins(OP_MOV, SRC_IMM, SRC_N, A0));
    put(48, PE3, ins(OP_MOV, SRC_IMM, SRC_N, B0));
    put(48, PE4, ins(OP_MOV, SRC_IMM, SRC_N, CI0));
    put(48, PST, ins(.op(OP_MOV), .a(SRC_IMM), .imm(0), .rf_we(1), .rf_wa(0)));
    put(49, PE2, ins(OP_BLT, SRC_SELF, SRC_IMM, S, 3));
    put(49, PST, ins(.op(OP_STORE), .a(SRC_RF), .b(SRC_N), .rf_ra(0)));
    put(50, PE2, ins(OP_ADD, SRC_SELF, SRC_IMM, C1));        // delay slot
    put(50, PE3, ins(OP_SUB, SRC_SELF, SRC_IMM, C2));
    put(50, PST, ins(.op(OP_ADD), .a(SRC_RF), .b(SRC_IMM), .imm(1), .rf_we(1)));
    put(51, PE1, ins(OP_MUL, SRC_E, SRC_IMM, C4));           // else-path (3 rows)
    put(51, PE4, ins(OP_MUL, SRC_W, SRC_IMM, C5));
    put(52, PE4, ins(OP_SUB, SRC_E, SRC_SELF));
    put(54, PE4, ins(OP_MUL, SRC_W, SRC_SELF));              // if-path: yt
    put(55, PST, ins(OP_LT, SRC_N, SRC_IMM, T2));            // p = yt < T2
    put(55, PE1, ins(OP_SUB, SRC_W, SRC_IMM, C3));           // yt - C3
    put(55, PE4, ins(OP_ADD, SRC_SELF, SRC_IMM, C3));        // yt + C3
    put(56, PE4, ins(.op(OP_SEL), .a(SRC_E), .b(SRC_SELF), .p(PSRC_S)));

    run(48, 49, 56, 0, 1 + 5 * NIT, took);
    checks++;
    if (took != 1 + 5 * NIT) begin failures++; $display("FAIL Q: %0d cycles, expected %0d", took, 1 + 5 * NIT); end
    check_results("Q", bref, 1);
    $display("Q: %0d cycles for %0d iterations, inner select true %0d / false %0d", took, NIT, n_sel_t, n_sel_f);
    checks += 2;
    if (n_sel_t == 0) begin failures++; $display("FAIL inner condition never true"); end
    if (n_sel_f == 0) begin failures++; $display("FAIL inner condition never false"); end

    $display("events: brp=%0d taken=%0d not_taken=%0d skip=%0d wrap=%0d loads=%0d stores=%0d",
             n_brp, n_taken, n_not, n_skip, n_wrap, n_load, n_store);
    checks += 7;
    if (n_brp == 0)   begin failures++; $display("FAIL no branch on a routed predicate"); end
    if (n_taken == 0) begin failures++; $display("FAIL no taken branch"); end
    if (n_not == 0)   begin failures++; $display("FAIL no not-taken branch"); end
    if (n_skip == 0)  begin failures++; $display("FAIL no path skip"); end
    if (n_wrap == 0)  begin failures++; $display("FAIL no loop wrap"); end
    if (n_load == 0)  begin failures++; $display("FAIL no load"); end
    if (n_store == 0) begin failures++; $display("FAIL no store"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
