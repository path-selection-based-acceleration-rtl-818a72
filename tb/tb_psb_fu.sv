// tb_psb_fu: self-checking test of the PE functional unit.
//
// Drives random operands through every operation and compares result,
// compare bit and write enables with a reference computed here.
module tb_psb_fu;
  import psb_pkg::*;

  logic [31:0] a, b, ld, result;
  logic        p, cmp, wr_data, wr_pred;
  op_e         op;
  int          checks = 0, failures = 0;

  psb_fu #(.W(32)) dut (.op, .a, .b, .p, .ld_data(ld), .result, .cmp, .wr_data, .wr_pred);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(op_e o, logic [31:0] er, logic ec, logic ewd, logic ewp);
    op = o;
    #1;
    checks++;
    if ((ewd && result !== er) || cmp !== ec || wr_data !== ewd || wr_pred !== ewp) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h p=%b: got %h/%b/%b/%b want %h/%b/%b/%b", o.name(), a, b, p,
               result, cmp, wr_data, wr_pred, er, ec, ewd, ewp);
    end
  endtask

  initial begin
    for (int n = 0; n < 300; n++) begin
      a  = $urandom; b = $urandom; ld = $urandom; p = 1'($urandom);
      if (n % 4 == 0) b = a;                 // exercise equality
      if (n % 5 == 0) b = 32'($urandom % 32); // small shift amounts
      check(OP_NOP,   '0, 0, 0, 0);
      check(OP_ADD,   a + b, 0, 1, 0);
      check(OP_SUB,   a - b, 0, 1, 0);
      check(OP_MUL,   32'(a * b), 0, 1, 0);
      check(OP_AND,   a & b, 0, 1, 0);
      check(OP_OR,    a | b, 0, 1, 0);
      check(OP_XOR,   a ^ b, 0, 1, 0);
      check(OP_SHL,   a << b[4:0], 0, 1, 0);
      check(OP_SRL,   a >> b[4:0], 0, 1, 0);
      check(OP_SRA,   32'($signed(a) >>> b[4:0]), 0, 1, 0);
      check(OP_MOV,   a, 0, 1, 0);
      check(OP_SEL,   p ? a : b, 0, 1, 0);
      check(OP_LT,    32'($signed(a) < $signed(b)), $signed(a) < $signed(b), 1, 1);
      check(OP_LTU,   32'(a < b), a < b, 1, 1);
      check(OP_EQ,    32'(a == b), a == b, 1, 1);
      check(OP_NE,    32'(a != b), a != b, 1, 1);
      check(OP_LOAD,  ld, 0, 1, 0);
      check(OP_STORE, '0, 0, 0, 0);
      check(OP_BLT,   '0, $signed(a) < $signed(b), 0, 0);
      check(OP_BRP,   '0, p, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
