// psb_imem: instruction memory (configuration memory) of the CGRA.
//
// Each address holds one instruction word per PE, so one read returns the
// whole array's instructions for one cycle. The read is synchronous: the
// IFU presents an address in cycle t and the PEs execute the row in cycle
// t+1. A separate write port lets the host load one PE's word at a time.
// The design only names this memory (and sizes the fetch energy for a small
// configuration cache); the depth, the synchronous read and the per-PE
// write port are choices of this implementation. The output row register
// resets to NOPs so that nothing executes before the first fetch.
module psb_imem
  import psb_pkg::*;
#(
  parameter int unsigned DEPTH = IMEM_DEPTH,
  parameter int unsigned N     = NPE,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned PW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // fetch port
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output instr_t        rdata [N],
  // host load port
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [PW-1:0] wpe,
  input  instr_t        wdata
);

  instr_t mem [DEPTH][N];

  always_ff @(posedge clk) begin
    if (we) mem[waddr][wpe] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) rdata[i] <= INSTR_NOP;
    end else if (re) begin
      for (int i = 0; i < int'(N); i++) rdata[i] <= mem[raddr][i];
    end else begin
      for (int i = 0; i < int'(N); i++) rdata[i] <= INSTR_NOP;
    end
  end

endmodule
