// tb_psb_pe: self-checking test of one processing element.
//
// Random instructions with random neighbour data, predicates, bus value and
// load data are applied, one per cycle. A shadow model kept here (output
// register, predicate register, both register files, branch registers)
// predicts the memory request in the same cycle and every output after the
// clock edge. Some cycles run with the enable low, in which the PE must
// hold its state.
module tb_psb_pe;
  import psb_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  instr_t instr;
  logic [DW-1:0] in_n, in_s, in_e, in_w, bus_in, mem_rdata, dout;
  logic pin_n, pin_s, pin_e, pin_w, pout;
  mem_req_t mem;
  br_info_t br;
  int checks = 0, failures = 0;

  psb_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] m_dout, m_rf [RF_N];
  logic          m_pout, m_prf [PRF_N];
  br_info_t      m_br;
  int            n_branch = 0, n_load = 0, n_store = 0;

  function automatic logic [DW-1:0] src(src_e s, logic [DW-1:0] rfv);
    case (s)
      SRC_N: return in_n;       SRC_S: return in_s;
      SRC_E: return in_e;       SRC_W: return in_w;
      SRC_SELF: return m_dout;  SRC_RF: return rfv;
      SRC_BUS: return bus_in;   default: return DW'($signed(instr.imm));
    endcase
  endfunction

  initial begin
    instr = INSTR_NOP;
    {in_n, in_s, in_e, in_w, bus_in, mem_rdata} = '0;
    {pin_n, pin_s, pin_e, pin_w} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m_dout = '0; m_pout = 0; m_br = '0;
    for (int i = 0; i < RF_N; i++) m_rf[i] = '0;
    for (int i = 0; i < PRF_N; i++) m_prf[i] = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [DW-1:0] a, b, r;
      logic p, c, wd, wp, isbr;
      op_e o;
      @(negedge clk);
      en = ($urandom % 8) != 0;
      instr = instr_t'({$urandom, $urandom});
      instr.op    = op_e'(5'($urandom % 20));
      instr.src_a = src_e'($urandom);
      instr.src_b = src_e'($urandom);
      instr.src_p = psrc_e'($urandom);
      {in_n, in_s, in_e, in_w} = {$urandom, $urandom, $urandom, $urandom};
      if (n % 3 == 0) in_e = in_w;
      bus_in = $urandom; mem_rdata = $urandom;
      {pin_n, pin_s, pin_e, pin_w} = 4'($urandom);
      // reference
      o = en ? instr.op : OP_NOP;
      a = src(instr.src_a, m_rf[instr.rf_ra]);
      b = src(instr.src_b, m_rf[instr.rf_rb]);
      case (instr.src_p)
        PSRC_N: p = pin_n; PSRC_S: p = pin_s; PSRC_E: p = pin_e; PSRC_W: p = pin_w;
        PSRC_SELF: p = m_pout; PSRC_PRF: p = m_prf[instr.prf_a];
        PSRC_ONE: p = 1; default: p = 0;
      endcase
      wd = !(o inside {OP_NOP, OP_STORE, OP_BLT, OP_BRP});
      wp = o inside {OP_LT, OP_LTU, OP_EQ, OP_NE};
      isbr = o inside {OP_BLT, OP_BRP};
      c = 0; r = '0;
      case (o)
        OP_ADD: r = a + b;  OP_SUB: r = a - b;  OP_MUL: r = a * b;
        OP_AND: r = a & b;  OP_OR: r = a | b;   OP_XOR: r = a ^ b;
        OP_SHL: r = a << b[4:0]; OP_SRL: r = a >> b[4:0];
        OP_SRA: r = $signed(a) >>> b[4:0];
        OP_MOV: r = a; OP_SEL: r = p ? a : b; OP_LOAD: r = mem_rdata;
        OP_LT, OP_BLT: c = $signed(a) < $signed(b);
        OP_LTU: c = a < b; OP_EQ: c = a == b; OP_NE: c = a != b;
        OP_BRP: c = p;
        default: ;
      endcase
      if (wp) r = DW'(c);
      #1;
      checks++;
      if (mem.req !== (o inside {OP_LOAD, OP_STORE}) ||
          (mem.req && (mem.we !== (o == OP_STORE) || mem.addr !== a[DA_W-1:0])) ||
          (mem.req && mem.we && mem.wdata !== b)) begin
        failures++; $display("FAIL cycle %0d: memory request for %s", n, o.name());
      end
      n_load += int'(o == OP_LOAD); n_store += int'(o == OP_STORE); n_branch += int'(isbr);
      @(posedge clk);
      if (wd) m_dout = r;
      if (wp) m_pout = c;
      if (en && instr.rf_we && wd) m_rf[instr.rf_wa] = r;
      if (en && instr.prf_we) m_prf[instr.prf_a] = wp ? c : p;
      m_br = '{valid: isbr, taken: c, k: instr.k};
      #1;
      checks += 3;
      if (dout !== m_dout) begin failures++; $display("FAIL cycle %0d %s: dout %h want %h", n, o.name(), dout, m_dout); end
      if (pout !== m_pout) begin failures++; $display("FAIL cycle %0d %s: pout", n, o.name()); end
      if (br.valid !== m_br.valid || (m_br.valid && (br.taken !== m_br.taken || br.k !== m_br.k))) begin
        failures++; $display("FAIL cycle %0d %s: branch info", n, o.name());
      end
    end
    checks++;
    if (n_branch == 0 || n_load == 0 || n_store == 0) failures++;
    $display("branches=%0d loads=%0d stores=%0d", n_branch, n_load, n_store);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
