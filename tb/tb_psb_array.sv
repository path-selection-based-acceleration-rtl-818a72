// tb_psb_array: self-checking test of the 4x4 torus PE array.
//
// Checks, with memories modelled in the testbench:
//  - torus wiring: every PE loads a distinct constant, then copies its
//    north, south, east or west neighbour; the wrap-around edges included;
//  - predicate network: PEs set a predicate from their own id and then
//    select between two constants with a neighbour's predicate;
//  - row buses: a store and then a load by one PE per row, the loaded
//    word in the PE's output register and, one cycle later, on the row
//    bus operand of another PE of that row;
//  - branch wiring: only the designated PE's branch reaches the output.
module tb_psb_array;
  import psb_pkg::*;
  import psb_tb_pkg::*;

  localparam int R = 4, C = 4;
  logic clk = 0, rst_n = 0, en = 0;
  instr_t instr [R*C];
  mem_req_t row_mem [R];
  logic [DW-1:0] row_rdata [R];
  br_info_t br;
  logic [DW-1:0] dout [R*C];
  logic pout [R*C];
  logic [DW-1:0] mem [R][256];
  int checks = 0, failures = 0;

  psb_array #(.R(R), .C(C), .BR_ROW(0), .BR_COL(1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar r = 0; r < R; r++) begin : g_mem
    assign row_rdata[r] = mem[r][row_mem[r].addr];
    always_ff @(posedge clk) if (row_mem[r].req && row_mem[r].we) mem[r][row_mem[r].addr] <= row_mem[r].wdata;
  end

  function automatic int id(int r, int c); return 100 + r * 10 + c; endfunction

  task automatic step();
    en = 1;
    @(posedge clk); #1;
    en = 0;
  endtask

  task automatic all(instr_t i);
    for (int k = 0; k < R*C; k++) instr[k] = i;
  endtask

  task automatic expect_d(int k, int v, string what);
    checks++;
    if (dout[k] !== DW'(v)) begin
      failures++; $display("FAIL %s: PE %0d dout %0d want %0d", what, k, dout[k], v);
    end
  endtask

  initial begin
    all(INSTR_NOP);
    foreach (mem[r, a]) mem[r][a] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // torus wiring
    for (int d = 0; d < 4; d++) begin
      for (int r = 0; r < R; r++) for (int c = 0; c < C; c++)
        instr[r*C+c] = ins(OP_MOV, SRC_IMM, SRC_N, id(r, c));
      step();
      all(ins(OP_MOV, src_e'(d)));
      step();
      for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
        int nr, nc;
        nr = (d == 0) ? (r + R - 1) % R : (d == 1) ? (r + 1) % R : r;
        nc = (d == 2) ? (c + 1) % C : (d == 3) ? (c + C - 1) % C : c;
        expect_d(r*C+c, id(nr, nc), $sformatf("neighbour dir %0d", d));
      end
    end

    // enable low: nothing changes
    all(ins(OP_MOV, SRC_IMM, SRC_N, 7));
    @(posedge clk); #1;
    for (int k = 0; k < R*C; k++) begin
      checks++;
      if (dout[k] === DW'(7)) begin failures++; $display("FAIL PE %0d ran while disabled", k); end
    end

    // predicate network: p = (c is odd), then SEL(10, 20) with the west
    // neighbour's predicate
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++)
      instr[r*C+c] = ins(OP_LT, SRC_IMM, SRC_RF, (c % 2 == 1) ? -1 : 1);   // imm < r0 (= 0)
    instr[0].imm = IMM_W'(-1);   // column 0 of row 0 also true
    step();
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      checks++;
      if (pout[r*C+c] !== ((c % 2 == 1) || (r == 0 && c == 0))) begin
        failures++; $display("FAIL predicate PE %0d", r*C+c);
      end
    end
    for (int k = 0; k < R*C; k++) instr[k] = ins(OP_SEL, SRC_IMM, SRC_RF, 10, 0, PSRC_W);
    step();
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      int wc;
      bit pw;
      wc = (c + C - 1) % C;
      pw = (wc % 2 == 1) || (r == 0 && wc == 0);
      expect_d(r*C+c, pw ? 10 : 0, "select on west predicate");
    end

    // row buses: PE (r, r) stores 50+r at address 3+r, then loads it;
    // next cycle PE (r, (r+2)%C) reads the row bus
    all(INSTR_NOP);
    for (int r = 0; r < R; r++) instr[r*C+r] = ins(OP_MOV, SRC_IMM, SRC_N, 3 + r);
    step();
    for (int r = 0; r < R; r++) instr[r*C+r] = ins(OP_STORE, SRC_SELF, SRC_IMM, 50 + r);
    step();
    for (int r = 0; r < R; r++) begin
      checks++;
      if (mem[r][3+r] !== DW'(50 + r)) begin failures++; $display("FAIL store row %0d", r); end
    end
    mem[1][4] = 50 + 1;
    for (int r = 0; r < R; r++) instr[r*C+r] = ins(OP_LOAD, SRC_SELF);
    step();
    for (int r = 0; r < R; r++) expect_d(r*C+r, 50 + r, "load");
    all(INSTR_NOP);
    for (int r = 0; r < R; r++) instr[r*C+(r+2)%C] = ins(OP_ADD, SRC_BUS, SRC_IMM, 1000);
    step();
    for (int r = 0; r < R; r++) expect_d(r*C+(r+2)%C, 1050 + r, "row bus operand");

    // branch wiring: only PE 1 (row 0, column 1) reaches the IFU port
    all(ins(OP_BLT, SRC_IMM, SRC_IMM, 0, 5));   // 0 < 0: false everywhere
    instr[1] = ins(OP_BLT, SRC_IMM, SRC_N, -5, 3);  // -5 < (row 3 col 1 output): true
    step();
    checks++;
    if (!(br.valid && br.taken && br.k == 3)) begin failures++; $display("FAIL designated branch %p", br); end
    all(INSTR_NOP);
    instr[0] = ins(OP_BLT, SRC_IMM, SRC_IMM, -1, 4);
    step();
    checks++;
    if (br.valid) begin failures++; $display("FAIL branch of a non-designated PE reached the IFU"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
