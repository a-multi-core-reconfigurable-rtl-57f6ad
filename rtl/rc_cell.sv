// rc_cell: one Reconfigurable Cell (RC) of the CGRA mesh.
//
// A cell holds an ALU, a 4-word register file, two operand multiplexers and a
// private store of CFG_DEPTH configuration words. Every cycle in which the
// column is enabled (en = column active and not stalled) the column program
// counter pc selects one configuration word; the ALU computes op(a, b) from
// the selected operands, the result is captured in the output register out
// and, if rf_we is set, also in register rf_wa. Operands come from the
// register file, the cell's own output register, the output registers of the
// four neighbours, the head of the kernel's input stream or an 8-bit
// sign-extended immediate. clr (pulsed when a kernel is launched on the
// column) zeroes the register file and the output register. Because neighbours read registered outputs, a value
// produced in one cycle is visible to the neighbours in the next.
//
// Timing: configuration words are written one per cycle through cfg_we /
// cfg_addr / cfg_data by the configuration loader. Results appear on out one
// cycle after the enabled cycle that computed them.
//
// Follows the document: ALU + 4-word register file + operand multiplexers fed
// by the register file, the ALU output and neighbouring cells; cyclic
// configuration words selected by a column PC. This design's own choices: the
// 16-bit width, the operation set, the input-stream and immediate operands.
module rc_cell
  import cgra_pkg::*;
#(
  parameter int unsigned CFG_DEPTH = 16,
  localparam int unsigned PCW = $clog2(CFG_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  // configuration write port
  input  logic           cfg_we,
  input  logic [PCW-1:0] cfg_addr,
  input  rc_cfg_t        cfg_data,
  // execution
  input  logic [PCW-1:0] pc,
  input  logic           en,
  input  logic           clr,
  input  word_t          nb_n,
  input  word_t          nb_s,
  input  word_t          nb_e,
  input  word_t          nb_w,
  input  word_t          in_data,
  output word_t          out
);
  rc_cfg_t cfg_mem [CFG_DEPTH];
  rc_cfg_t cw;
  word_t   rf [4];
  word_t   opa, opb, res;
  logic signed [2*DATA_W-1:0] prod;

  always_ff @(posedge clk) begin
    if (cfg_we) cfg_mem[cfg_addr] <= cfg_data;
  end

  assign cw = cfg_mem[pc];

  function automatic word_t sel(src_e s, word_t r0, word_t r1, word_t r2, word_t r3,
                                word_t self_v, word_t n, word_t so, word_t e, word_t w,
                                word_t in_v, logic [7:0] imm);
    unique case (s)
      SRC_R0:   return r0;
      SRC_R1:   return r1;
      SRC_R2:   return r2;
      SRC_R3:   return r3;
      SRC_SELF: return self_v;
      SRC_N:    return n;
      SRC_S:    return so;
      SRC_E:    return e;
      SRC_W:    return w;
      SRC_IN:   return in_v;
      SRC_IMM:  return {{(DATA_W-8){imm[7]}}, imm};
      default:  return '0;
    endcase
  endfunction

  always_comb begin
    opa  = sel(cw.a, rf[0], rf[1], rf[2], rf[3], out, nb_n, nb_s, nb_e, nb_w, in_data, cw.imm);
    opb  = sel(cw.b, rf[0], rf[1], rf[2], rf[3], out, nb_n, nb_s, nb_e, nb_w, in_data, cw.imm);
    prod = $signed(opa) * $signed(opb);
    unique case (cw.op)
      OP_NOP:  res = out;
      OP_PASS: res = opa;
      OP_ADD:  res = opa + opb;
      OP_SUB:  res = opa - opb;
      OP_MUL:  res = prod[DATA_W-1:0];
      OP_MULH: res = prod[2*DATA_W-1:DATA_W];
      OP_AND:  res = opa & opb;
      OP_OR:   res = opa | opb;
      OP_XOR:  res = opa ^ opb;
      OP_SHL:  res = opa << opb[3:0];
      OP_SRL:  res = opa >> opb[3:0];
      OP_SRA:  res = word_t'($signed(opa) >>> opb[3:0]);
      OP_MIN:  res = ($signed(opa) < $signed(opb)) ? opa : opb;
      OP_MAX:  res = ($signed(opa) > $signed(opb)) ? opa : opb;
      OP_ABS:  res = opa[DATA_W-1] ? word_t'(-opa) : opa;
      OP_SLT:  res = ($signed(opa) < $signed(opb)) ? word_t'(1) : word_t'(0);
      default: res = out;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out <= '0;
      rf  <= '{default: '0};
    end else if (clr) begin
      out <= '0;
      rf  <= '{default: '0};
    end else if (en && cw.op != OP_NOP) begin
      out <= res;
      if (cw.rf_we) rf[cw.rf_wa] <= res;
    end
  end
endmodule
