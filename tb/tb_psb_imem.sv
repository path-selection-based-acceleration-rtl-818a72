// tb_psb_imem: self-checking test of the instruction memory.
//
// Loads random words per PE through the host port, then reads rows back:
// the row must appear one cycle after its address (synchronous read), and
// a cycle without a read must deliver a row of NOPs.
module tb_psb_imem;
  import psb_pkg::*;
  localparam int D = 16, N = 16;
  logic clk = 0, rst_n = 0, re = 0, we = 0;
  logic [3:0] raddr, waddr, wpe;
  instr_t rdata [N];
  instr_t wdata;
  instr_t shadow [D][N];
  int checks = 0, failures = 0;

  psb_imem #(.DEPTH(D), .N(N)) dut (.clk, .rst_n, .re, .raddr, .rdata, .we, .waddr, .wpe, .wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    raddr = 0; waddr = 0; wpe = 0; wdata = INSTR_NOP;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int a = 0; a < D; a++)
      for (int p = 0; p < N; p++) begin
        @(negedge clk);
        we = 1; waddr = 4'(a); wpe = 4'(p);
        wdata = instr_t'({$urandom, $urandom});
        wdata.op = op_e'(5'($urandom % 20));
        wdata.src_a = src_e'($urandom); wdata.src_b = src_e'($urandom);
        wdata.src_p = psrc_e'($urandom);
        shadow[a][p] = wdata;
      end
    @(negedge clk) we = 0;
    for (int n = 0; n < 100; n++) begin
      logic [3:0] a;
      logic r;
      a = 4'($urandom); r = (n % 7) != 3;
      @(negedge clk) begin re = r; raddr = a; end
      @(posedge clk) #1;
      for (int p = 0; p < N; p++) begin
        checks++;
        if (rdata[p] !== (r ? shadow[a][p] : INSTR_NOP)) begin
          failures++; $display("FAIL addr %0d pe %0d re %0b", a, p, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
