// tb_rc_cell: self-checking test of one reconfigurable cell.
//
// Writes random configuration words into the cell's store, then executes them
// with random neighbour and input values, comparing the output register
// (register file contents reach it through the operands) against a reference model kept in the
// testbench. Also checks that a disabled cycle changes nothing, that a NOP
// holds the output and that clr zeroes the registers.
module tb_rc_cell;
  import cgra_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cfg_we, en, clr;
  logic [3:0] cfg_addr, pc;
  rc_cfg_t cfg_data;
  word_t nb_n, nb_s, nb_e, nb_w, in_data, out;
  int checks = 0, failures = 0;

  rc_cell #(.CFG_DEPTH(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t   m_rf [4];
  word_t   m_out;
  rc_cfg_t words [16];

  function automatic word_t pick(src_e s, word_t imm_ext);
    case (s)
      SRC_R0: return m_rf[0];
      SRC_R1: return m_rf[1];
      SRC_R2: return m_rf[2];
      SRC_R3: return m_rf[3];
      SRC_SELF: return m_out;
      SRC_N: return nb_n;
      SRC_S: return nb_s;
      SRC_E: return nb_e;
      SRC_W: return nb_w;
      SRC_IN: return in_data;
      default: return imm_ext;
    endcase
  endfunction

  function automatic word_t model(alu_op_e op, word_t a, word_t b);
    int sa, sb;
    longint p;
    sa = int'($signed(a));
    sb = int'($signed(b));
    p  = longint'(sa) * longint'(sb);
    case (op)
      OP_NOP:  return m_out;
      OP_PASS: return a;
      OP_ADD:  return word_t'(sa + sb);
      OP_SUB:  return word_t'(sa - sb);
      OP_MUL:  return word_t'(p);
      OP_MULH: return word_t'(p >>> 16);
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_SHL:  return word_t'(int'(a) << (b % 16));
      OP_SRL:  return word_t'(int'(a) >> (b % 16));
      OP_SRA:  return word_t'(sa >>> (b % 16));
      OP_MIN:  return word_t'((sa < sb) ? sa : sb);
      OP_MAX:  return word_t'((sa > sb) ? sa : sb);
      OP_ABS:  return word_t'((sa < 0) ? -sa : sa);
      default: return word_t'((sa < sb) ? 1 : 0);
    endcase
  endfunction

  task automatic check_state(string what);
    checks++;
    if (out !== m_out) begin
      failures++;
      $display("FAIL %s: out %h expected %h", what, out, m_out);
    end
  endtask

  initial begin
    cfg_we = 0; en = 0; clr = 0; cfg_addr = 0; pc = 0; cfg_data = '0;
    {nb_n, nb_s, nb_e, nb_w, in_data} = '0;
    m_rf = '{default: '0};
    m_out = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill the configuration store with random words
    for (int k = 0; k < 16; k++) begin
      words[k].op    = alu_op_e'(k);  // every operation once per cycle of pc
      words[k].a     = src_e'($urandom_range(0, 10));
      words[k].b     = src_e'($urandom_range(0, 10));
      words[k].rf_we = 1'($urandom);
      words[k].rf_wa = 2'($urandom);
      words[k].imm   = 8'($urandom);
      @(negedge clk);
      cfg_we = 1; cfg_addr = 4'(k); cfg_data = words[k];
    end
    @(negedge clk);
    cfg_we = 0;
    // execute them cyclically with random operands
    for (int t = 0; t < 2000; t++) begin
      rc_cfg_t w;
      word_t a, b, r, imm_ext;
      @(negedge clk);
      pc = 4'(t % 16);
      en = ($urandom_range(0, 9) != 0);
      nb_n = 16'($urandom); nb_s = 16'($urandom); nb_e = 16'($urandom); nb_w = 16'($urandom);
      in_data = 16'($urandom);
      if (t % 5 == 0) begin nb_n = 16'h8000; nb_s = 16'hffff; end
      w = words[t % 16];
      imm_ext = {{8{w.imm[7]}}, w.imm};
      a = pick(w.a, imm_ext);
      b = pick(w.b, imm_ext);
      r = model(w.op, a, b);
      @(posedge clk);
      if (en && w.op != OP_NOP) begin
        m_out = r;
        if (w.rf_we) m_rf[w.rf_wa] = r;
      end
      #1 check_state($sformatf("step %0d op %s", t, w.op.name()));
    end
    // clr zeroes everything
    @(negedge clk);
    en = 0; clr = 1;
    @(posedge clk);
    m_out = '0; m_rf = '{default: '0};
    #1 check_state("clr");
    @(negedge clk);
    clr = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
