// psb_pe: processing element of the PSB CGRA.
//
// Structure (as in the design's PE template): two data operand muxes pick
// from the four torus neighbours' output registers, the PE's own output
// register, its data register file, the row data bus or the instruction's
// immediate; a predicate mux picks from the neighbours' predicate outputs,
// the PE's own predicate output or its predicate register file. The
// functional unit result goes to the data output register ("reg" in the
// template) and optionally into the register file; comparison results go to
// the predicate output register and optionally into the predicate register
// file. The additions for path-selection branching are the branch outcome
// and branch information (path length K) registers that carry the result of
// a branch operation to the instruction fetch unit in the following cycle,
// the delay slot. Only one designated PE of the array is wired to the IFU.
//
// Timing: the instruction on `instr` executes in the cycle it is presented
// (en = 1); all results are visible on the outputs from the next cycle.
// Loads and stores are issued on `mem` in the same cycle; a load's data
// comes back combinationally on `mem_rdata` and is written to the output
// register like any other result. With en = 0 the PE holds all state.
// Operand encoding, the immediate sign extension and holding the output
// register on idle cycles are choices of this implementation.
module psb_pe
  import psb_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  instr_t        instr,
  // data outputs of the four neighbours
  input  logic [DW-1:0] in_n,
  input  logic [DW-1:0] in_s,
  input  logic [DW-1:0] in_e,
  input  logic [DW-1:0] in_w,
  // predicate outputs of the four neighbours
  input  logic          pin_n,
  input  logic          pin_s,
  input  logic          pin_e,
  input  logic          pin_w,
  input  logic [DW-1:0] bus_in,     // row data bus
  output mem_req_t      mem,        // row memory request
  input  logic [DW-1:0] mem_rdata,  // load data
  output logic [DW-1:0] dout,       // data output register
  output logic          pout,       // predicate output register
  output br_info_t      br          // branch outcome + information to IFU
);

  logic [DW-1:0] rf_a, rf_b, opa, opb, imm_x, result;
  logic          prf_rd, p, cmp, wr_data, wr_pred;
  logic          unused_prf;
  op_e           op;

  assign op    = en ? instr.op : OP_NOP;
  assign imm_x = DW'($signed(instr.imm));

  psb_rf #(.W(DW), .N(RF_N)) u_rf (
    .clk, .rst_n,
    .ra0(instr.rf_ra), .rd0(rf_a),
    .ra1(instr.rf_rb), .rd1(rf_b),
    .we (en && instr.rf_we && wr_data),
    .wa (instr.rf_wa),
    .wd (result)
  );

  psb_rf #(.W(1), .N(PRF_N)) u_prf (
    .clk, .rst_n,
    .ra0(instr.prf_a), .rd0(prf_rd),
    .ra1(instr.prf_a), .rd1(unused_prf),
    .we (en && instr.prf_we),
    .wa (instr.prf_a),
    .wd (wr_pred ? cmp : p)
  );

  function automatic logic [DW-1:0] pick(src_e s, logic [DW-1:0] rf_v);
    unique case (s)
      SRC_N:    return in_n;
      SRC_S:    return in_s;
      SRC_E:    return in_e;
      SRC_W:    return in_w;
      SRC_SELF: return dout;
      SRC_RF:   return rf_v;
      SRC_BUS:  return bus_in;
      SRC_IMM:  return imm_x;
      default:  return '0;
    endcase
  endfunction

  always_comb begin
    opa = pick(instr.src_a, rf_a);
    opb = pick(instr.src_b, rf_b);
    unique case (instr.src_p)
      PSRC_N:    p = pin_n;
      PSRC_S:    p = pin_s;
      PSRC_E:    p = pin_e;
      PSRC_W:    p = pin_w;
      PSRC_SELF: p = pout;
      PSRC_PRF:  p = prf_rd;
      PSRC_ONE:  p = 1'b1;
      default:   p = 1'b0;
    endcase
  end

  psb_fu #(.W(DW)) u_fu (
    .op, .a(opa), .b(opb), .p, .ld_data(mem_rdata),
    .result, .cmp, .wr_data, .wr_pred
  );

  always_comb begin
    mem.req   = (op == OP_LOAD) || (op == OP_STORE);
    mem.we    = (op == OP_STORE);
    mem.addr  = opa[DA_W-1:0];
    mem.wdata = opb;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dout <= '0;
      pout <= 1'b0;
      br   <= '0;
    end else begin
      if (wr_data) dout <= result;
      if (wr_pred) pout <= cmp;
      br.valid <= (op == OP_BLT) || (op == OP_BRP);
      br.taken <= cmp;
      br.k     <= instr.k;
    end
  end

endmodule
