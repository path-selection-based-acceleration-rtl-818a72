// tb_psb_dmem: self-checking test of one data memory bank.
//
// Random writes and reads on both ports against a shadow array; the row
// port wins when both write the same word in one cycle.
module tb_psb_dmem;
  localparam int D = 32, W = 32;
  logic clk = 0;
  logic a_we = 0, b_we = 0;
  logic [4:0] a_addr = 0, b_addr = 0;
  logic [W-1:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [W-1:0] shadow [D];
  int checks = 0, failures = 0;

  psb_dmem #(.DEPTH(D), .W(W)) dut (.clk, .a_we, .a_addr, .a_wdata, .a_rdata,
                                    .b_we, .b_addr, .b_wdata, .b_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initialise through the host port
    for (int i = 0; i < D; i++) begin
      @(negedge clk) begin b_we = 1; b_addr = 5'(i); b_wdata = $urandom; shadow[i] = b_wdata; end
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      a_we = 1'($urandom); b_we = 1'($urandom);
      a_addr = 5'($urandom); b_addr = (n % 5 == 0) ? a_addr : 5'($urandom);
      a_wdata = $urandom; b_wdata = $urandom;
      #1; checks += 2;
      if (a_rdata !== shadow[a_addr]) begin failures++; $display("FAIL a read %0d", a_addr); end
      if (b_rdata !== shadow[b_addr]) begin failures++; $display("FAIL b read %0d", b_addr); end
      @(posedge clk);
      if (b_we) shadow[b_addr] = b_wdata;
      if (a_we) shadow[a_addr] = a_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
