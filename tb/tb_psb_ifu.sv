// tb_psb_ifu: self-checking test of the path-selecting instruction fetch unit.
//
// The testbench stands in for the designated PE: when a row it knows to
// hold a branch executes (one cycle after its fetch), it returns a random
// outcome with the branch's K one cycle later, during the delay slot. The
// fetched address sequence is compared with sequences written out by hand
// for three program layouts:
//   A  non-pipelined loop, K = 2: 0 blt, 1 delay, 2-3 else, 4-5 if;
//   B  modulo kernel, K = 2: prologue 0 blt, 1 delay; loop 2-3 else copy
//      and 4-5 if copy, each copy starting with a branch;
//   C  K = 3 with a prologue and a trailing row: 0 prologue, 1 blt,
//      2 delay, 3-5 else, 6-8 if, 9 common, loop 1..9.
// It also checks that exactly cfg_cycles rows are fetched, that done
// follows, and that the event pulses match the outcomes.
module tb_psb_ifu;
  import psb_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [5:0] cfg_start, cfg_loop_start, cfg_loop_end, fetch_addr;
  logic cfg_modulo;
  logic [15:0] cfg_cycles;
  br_info_t br;
  logic fetch_re, busy, done, ev_taken, ev_not_taken, ev_skip, ev_wrap;
  int checks = 0, failures = 0;

  psb_ifu #(.DEPTH(64), .CW(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stand-in for the designated PE
  bit          is_br [64];
  int          br_k  [64];
  logic        exec_valid = 0;
  logic [5:0]  exec_addr;
  bit          outcomes[$];   // outcomes handed out, in order
  int          fetched[$];
  int          n_taken, n_not, n_skip, n_wrap;

  always_ff @(posedge clk) begin
    exec_valid <= fetch_re;
    exec_addr  <= fetch_addr;
    if (exec_valid && is_br[exec_addr]) begin
      bit o;
      o = 1'($urandom);
      outcomes.push_back(o);
      br <= '{valid: 1'b1, taken: o, k: K_W'(br_k[exec_addr])};
    end else begin
      br <= '0;
    end
    if (fetch_re) fetched.push_back(int'(fetch_addr));
    n_taken += int'(ev_taken);
    n_not   += int'(ev_not_taken);
    n_skip  += int'(ev_skip);
    n_wrap  += int'(ev_wrap);
  end

  task automatic run(int s, int ls, int le, bit m, int cycles);
    @(negedge clk);
    cfg_start = 6'(s); cfg_loop_start = 6'(ls); cfg_loop_end = 6'(le);
    cfg_modulo = m; cfg_cycles = 16'(cycles);
    outcomes.delete(); fetched.delete();
    n_taken = 0; n_not = 0; n_skip = 0; n_wrap = 0;
    start = 1;
    @(negedge clk) start = 0;
    for (int c = 0; c < cycles; c++) begin
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low at cycle %0d", c); end
      @(negedge clk);
    end
    checks++;
    if (busy || !done) begin failures++; $display("FAIL busy/done after %0d rows", cycles); end
    repeat (3) @(negedge clk);
  endtask

  task automatic compare(string name, int exp[$]);
    int nt = 0;
    checks++;
    if (fetched.size() != exp.size()) begin
      failures++; $display("FAIL %s: %0d rows fetched, expected %0d", name, fetched.size(), exp.size());
    end
    for (int i = 0; i < exp.size() && i < fetched.size(); i++) begin
      checks++;
      if (fetched[i] != exp[i]) begin
        failures++; $display("FAIL %s: row %0d fetched addr %0d expected %0d", name, i, fetched[i], exp[i]);
      end
    end
    // a branch in the last fetched rows may resolve after fetching stopped
    for (int i = 0; i < n_taken + n_not && i < outcomes.size(); i++) nt += int'(outcomes[i]);
    checks++;
    if (n_taken + n_not < outcomes.size() - 1 || n_taken + n_not > outcomes.size() || n_taken != nt) begin
      failures++; $display("FAIL %s: events taken %0d not %0d, outcomes %0d taken %0d",
                           name, n_taken, n_not, outcomes.size(), nt);
    end
  endtask

  int exp[$];
  int tot_taken, tot_not, tot_skip, tot_wrap;

  initial begin
    br = '0; start = 0; cfg_start = 0; cfg_loop_start = 0; cfg_loop_end = 0;
    cfg_modulo = 0; cfg_cycles = 0;
    tot_taken = 0; tot_not = 0; tot_skip = 0; tot_wrap = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- A: non-pipelined, Fig. 3 style -------------------------------
    foreach (is_br[i]) begin is_br[i] = 0; br_k[i] = 0; end
    is_br[0] = 1; br_k[0] = 2;
    run(0, 0, 5, 0, 4 * 20);
    exp.delete();
    foreach (outcomes[i]) begin
      exp.push_back(0); exp.push_back(1);
      if (outcomes[i]) begin exp.push_back(4); exp.push_back(5); end
      else             begin exp.push_back(2); exp.push_back(3); end
    end
    compare("A", exp);
    tot_taken += n_taken; tot_not += n_not; tot_skip += n_skip; tot_wrap += n_wrap;

    // ---- B: modulo kernel, Fig. 5(c) style ----------------------------
    foreach (is_br[i]) begin is_br[i] = 0; br_k[i] = 0; end
    is_br[0] = 1; br_k[0] = 2;
    is_br[2] = 1; br_k[2] = 2;
    is_br[4] = 1; br_k[4] = 2;
    run(0, 2, 5, 1, 2 + 2 * 25);
    exp.delete();
    exp.push_back(0); exp.push_back(1);
    for (int i = 0; i < 25; i++) begin
      if (outcomes[i]) begin exp.push_back(4); exp.push_back(5); end
      else             begin exp.push_back(2); exp.push_back(3); end
    end
    compare("B", exp);
    tot_taken += n_taken; tot_not += n_not; tot_skip += n_skip; tot_wrap += n_wrap;

    // ---- C: K = 3, prologue, common tail row --------------------------
    foreach (is_br[i]) begin is_br[i] = 0; br_k[i] = 0; end
    is_br[1] = 1; br_k[1] = 3;
    run(0, 1, 9, 0, 1 + 6 * 15);
    exp.delete();
    exp.push_back(0);
    foreach (outcomes[i]) begin
      exp.push_back(1); exp.push_back(2);
      for (int j = 0; j < 3; j++) exp.push_back(outcomes[i] ? 6 + j : 3 + j);
      exp.push_back(9);
    end
    compare("C", exp);
    tot_taken += n_taken; tot_not += n_not; tot_skip += n_skip; tot_wrap += n_wrap;

    checks++;
    if (tot_taken == 0 || tot_not == 0 || tot_skip == 0 || tot_wrap == 0) begin
      failures++; $display("FAIL missing events taken=%0d not=%0d skip=%0d wrap=%0d",
                           tot_taken, tot_not, tot_skip, tot_wrap);
    end
    $display("events: taken=%0d not_taken=%0d skip=%0d wrap=%0d", tot_taken, tot_not, tot_skip, tot_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
