// tb_psb_rf: self-checking test of the PE register file.
//
// Checks reset to zero, random writes against a shadow array, both read
// ports, and that a write becomes visible only after the clock edge.
module tb_psb_rf;
  localparam int W = 32, N = 4;
  logic clk = 0, rst_n = 0, we = 0;
  logic [1:0] ra0, ra1, wa;
  logic [W-1:0] rd0, rd1, wd;
  logic [W-1:0] shadow [N];
  int checks = 0, failures = 0;

  psb_rf #(.W(W), .N(N)) dut (.clk, .rst_n, .ra0, .rd0, .ra1, .rd1, .we, .wa, .wd);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ra0 = 0; ra1 = 0; wa = 0; wd = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < N; i++) shadow[i] = '0;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      ra0 = 2'(i); #1; checks++;
      if (rd0 !== '0) begin failures++; $display("FAIL reset value r%0d", i); end
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 2'($urandom); wd = $urandom;
      ra0 = 2'($urandom); ra1 = wa;
      #1; checks += 2;
      if (rd0 !== shadow[ra0]) begin failures++; $display("FAIL rd0 r%0d", ra0); end
      if (rd1 !== shadow[ra1]) begin failures++; $display("FAIL write-through r%0d", ra1); end
      @(posedge clk);
      if (we) shadow[wa] = wd;
      #1; checks++;
      if (rd1 !== shadow[ra1]) begin failures++; $display("FAIL after write r%0d", ra1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
