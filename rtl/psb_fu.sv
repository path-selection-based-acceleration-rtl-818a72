// psb_fu: functional unit of one PE.
//
// Purely combinational. It performs the arithmetic, logic, shift and
// comparison operations of a CGRA PE, the select operation used by partial
// predication (result = p ? a : b) and the condition of the two branch
// operations that feed the instruction fetch unit: OP_BLT (signed a < b) and
// OP_BRP (the incoming predicate). Comparisons return 1/0 on `result` and
// the same bit on `cmp`, which the PE stores as its predicate. Which
// operation classes exist follows the design; the exact operation list,
// signed compare for BLT and 5-bit shift amounts are choices of this
// implementation. Loads and stores only pass through here (the PE handles
// the memory side); for OP_LOAD `result` is the load data input.
module psb_fu
  import psb_pkg::*;
#(
  parameter int unsigned W = DW
) (
  input  op_e          op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         p,        // selected predicate
  input  logic [W-1:0] ld_data,  // data returned by a load
  output logic [W-1:0] result,
  output logic         cmp,      // comparison / branch condition
  output logic         wr_data,  // operation writes the output register
  output logic         wr_pred   // operation writes the predicate output
);

  localparam int unsigned SH_W = $clog2(W);

  logic [SH_W-1:0] sh;
  assign sh = b[SH_W-1:0];

  always_comb begin
    result  = '0;
    cmp     = 1'b0;
    wr_data = 1'b1;
    wr_pred = 1'b0;
    unique case (op)
      OP_NOP:   wr_data = 1'b0;
      OP_ADD:   result = a + b;
      OP_SUB:   result = a - b;
      OP_MUL:   result = a * b;
      OP_AND:   result = a & b;
      OP_OR:    result = a | b;
      OP_XOR:   result = a ^ b;
      OP_SHL:   result = a << sh;
      OP_SRL:   result = a >> sh;
      OP_SRA:   result = W'($signed(a) >>> sh);
      OP_MOV:   result = a;
      OP_SEL:   result = p ? a : b;
      OP_LT:    begin cmp = $signed(a) < $signed(b); wr_pred = 1'b1; end
      OP_LTU:   begin cmp = a < b;                   wr_pred = 1'b1; end
      OP_EQ:    begin cmp = a == b;                  wr_pred = 1'b1; end
      OP_NE:    begin cmp = a != b;                  wr_pred = 1'b1; end
      OP_LOAD:  result = ld_data;
      OP_STORE: wr_data = 1'b0;
      OP_BLT:   begin cmp = $signed(a) < $signed(b); wr_data = 1'b0; end
      OP_BRP:   begin cmp = p;                       wr_data = 1'b0; end
      default:  wr_data = 1'b0;
    endcase
    if (wr_pred) result = W'(cmp);
  end

endmodule
