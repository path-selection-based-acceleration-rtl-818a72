// psb_rf: local register file of a PE.
//
// N words of W bits with two combinational read ports and one write port
// written on the rising clock edge. Every PE holds two of them: a data
// register file (W = data width) and a predicate register file (W = 1).
// The design names both files but gives no size or port count; four
// entries, two read ports and a synchronous reset to zero are choices of
// this implementation. A read of the address being written returns the old
// value (the new one is visible from the next cycle).
module psb_rf #(
  parameter int unsigned W = 32,
  parameter int unsigned N = 4,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] ra0,
  output logic [W-1:0]  rd0,
  input  logic [AW-1:0] ra1,
  output logic [W-1:0]  rd1,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  wd
);

  logic [W-1:0] regs [N];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign rd0 = regs[ra0];
  assign rd1 = regs[ra1];

endmodule
