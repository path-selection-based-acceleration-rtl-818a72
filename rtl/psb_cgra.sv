// psb_cgra: 4x4 CGRA with path-selection-based branching (top level).
//
// The CGRA runs loop kernels: every cycle the IFU fetches one instruction
// row from the instruction memory, and in the next cycle each PE of the
// torus array executes its instruction. The branch outcome and path length
// K produced by the designated PE reach the IFU during the delay slot, and
// from the following cycle on only the instructions of the path that was
// taken are fetched and executed; the other path is skipped. Each array row
// reaches its own data memory bank over a row bus.
//
// Host side: before `start`, the host writes instructions through the imem
// port (one PE word per write) and data through the host memory port, and
// sets the configuration (entry address, loop bounds, region placement and
// number of cycles, see psb_ifu). `busy` is high while rows are being
// fetched; `done` rises once the last row has been fetched and stays high
// until the next start; the last row executes in the cycle after `done`
// rises. The event outputs pulse for one cycle when the IFU consumes a branch
// outcome, skips a path or wraps the loop. The host interface and the
// memories' organisation are choices of this implementation; the array,
// the designated PE and the IFU's path selection follow the design.
module psb_cgra
  import psb_pkg::*;
#(
  parameter int unsigned IDEPTH = IMEM_DEPTH,
  parameter int unsigned DDEPTH = DMEM_DEPTH,
  parameter int unsigned CW     = 16,
  localparam int unsigned IAW   = $clog2(IDEPTH),
  localparam int unsigned DAW   = $clog2(DDEPTH),
  localparam int unsigned PW    = $clog2(NPE),
  localparam int unsigned RW    = $clog2(ROWS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // run control and configuration
  input  logic           start,
  input  logic [IAW-1:0] cfg_start,
  input  logic [IAW-1:0] cfg_loop_start,
  input  logic [IAW-1:0] cfg_loop_end,
  input  logic           cfg_modulo,
  input  logic [CW-1:0]  cfg_cycles,
  output logic           busy,
  output logic           done,
  // instruction memory load port
  input  logic           imem_we,
  input  logic [IAW-1:0] imem_addr,
  input  logic [PW-1:0]  imem_pe,
  input  instr_t         imem_wdata,
  // data memory host port
  input  logic           dmem_we,
  input  logic [RW-1:0]  dmem_row,
  input  logic [DAW-1:0] dmem_addr,
  input  logic [DW-1:0]  dmem_wdata,
  output logic [DW-1:0]  dmem_rdata,
  // events
  output logic           ev_taken,
  output logic           ev_not_taken,
  output logic           ev_skip,
  output logic           ev_wrap,
  // observation of the PE output registers (index row*4 + column)
  output logic [DW-1:0]  pe_dout [NPE],
  output logic           pe_pout [NPE]
);

  logic           fetch_re, issue;
  logic [IAW-1:0] fetch_addr;
  instr_t         row_instr [NPE];
  br_info_t       br;
  mem_req_t       row_mem   [ROWS];
  logic [DW-1:0]  row_rdata [ROWS];
  logic [DW-1:0]  host_rdata[ROWS];

  psb_ifu #(.DEPTH(IDEPTH), .CW(CW)) u_ifu (
    .clk, .rst_n, .start,
    .cfg_start, .cfg_loop_start, .cfg_loop_end, .cfg_modulo, .cfg_cycles,
    .br, .fetch_re, .fetch_addr, .busy, .done,
    .ev_taken, .ev_not_taken, .ev_skip, .ev_wrap
  );

  psb_imem #(.DEPTH(IDEPTH), .N(NPE)) u_imem (
    .clk, .rst_n,
    .re(fetch_re), .raddr(fetch_addr), .rdata(row_instr),
    .we(imem_we), .waddr(imem_addr), .wpe(imem_pe), .wdata(imem_wdata)
  );

  // The row fetched in cycle t executes in cycle t+1.
  always_ff @(posedge clk) begin
    if (!rst_n) issue <= 1'b0;
    else        issue <= fetch_re;
  end

  psb_array u_array (
    .clk, .rst_n, .en(issue),
    .instr(row_instr), .row_mem, .row_rdata, .br,
    .dout(pe_dout), .pout(pe_pout)
  );

  for (genvar r = 0; r < int'(ROWS); r++) begin : g_bank
    psb_dmem #(.DEPTH(DDEPTH), .W(DW)) u_dmem (
      .clk,
      .a_we   (row_mem[r].req && row_mem[r].we),
      .a_addr (DAW'(row_mem[r].addr)),
      .a_wdata(row_mem[r].wdata),
      .a_rdata(row_rdata[r]),
      .b_we   (dmem_we && dmem_row == RW'(r)),
      .b_addr (dmem_addr),
      .b_wdata(dmem_wdata),
      .b_rdata(host_rdata[r])
    );
  end

  assign dmem_rdata = host_rdata[dmem_row];

endmodule
