// psb_dmem: one data memory bank, attached to one row bus of the CGRA.
//
// Port A serves the row: combinational read, write on the rising clock
// edge, so a PE's load completes in the cycle it is issued. Port B is the
// host's port for loading inputs and reading results (combinational read,
// clocked write); when both write the same word in one cycle, port A wins.
// The design shows a data memory beside the array with one bus per row but
// gives no size, banking or timing; one bank per row, its depth and the
// single-cycle access are choices of this implementation.
module psb_dmem
  import psb_pkg::*;
#(
  parameter int unsigned DEPTH = DMEM_DEPTH,
  parameter int unsigned W     = DW,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  // row port
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  // host port
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_wdata,
  output logic [W-1:0]  b_rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (b_we && !(a_we && a_addr == b_addr)) mem[b_addr] <= b_wdata;
    if (a_we) mem[a_addr] <= a_wdata;
  end

  assign a_rdata = mem[a_addr];
  assign b_rdata = mem[b_addr];

endmodule
