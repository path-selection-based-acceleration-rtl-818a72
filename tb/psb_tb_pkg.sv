// psb_tb_pkg: helpers shared by the PSB CGRA testbenches.
//
// `ins` builds one PE instruction word from its fields; fields not given
// take idle defaults (no register writes, predicate constant true).
package psb_tb_pkg;
  import psb_pkg::*;

  function automatic instr_t ins(op_e op, src_e a = SRC_N, src_e b = SRC_N,
                                 int imm = 0, int k = 0,
                                 psrc_e p = PSRC_ONE,
                                 int rf_ra = 0, int rf_rb = 0,
                                 bit rf_we = 0, int rf_wa = 0,
                                 bit prf_we = 0, int prf_a = 0);
    instr_t i;
    i = INSTR_NOP;
    i.op     = op;
    i.src_a  = a;
    i.src_b  = b;
    i.src_p  = p;
    i.imm    = IMM_W'(imm);
    i.k      = K_W'(k);
    i.rf_ra  = RF_AW'(rf_ra);
    i.rf_rb  = RF_AW'(rf_rb);
    i.rf_we  = rf_we;
    i.rf_wa  = RF_AW'(rf_wa);
    i.prf_we = prf_we;
    i.prf_a  = PRF_AW'(prf_a);
    return i;
  endfunction
endpackage
