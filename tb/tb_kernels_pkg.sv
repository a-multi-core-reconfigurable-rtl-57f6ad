// tb_kernels_pkg: example CGRA kernels used by the testbenches, with their
// expected results computed in plain SystemVerilog.
//
// Configuration RAM layout (see cgra_config_loader): header of kernel k at
// address k; the kernel's words at hdr.base, for each column, for each step:
// one column control word then one cell word per row (ROWS = 4 here).
//   kernel 0  "scale"  : 1 column, 3 steps, y = 3*x + 5
//   kernel 1  "prefix" : 2 columns, 4 steps, y[n] = x[0] + ... + x[n]
//                        (uses the west and east neighbour links)
//   kernel 2  "absval" : 1 column, 2 steps, y = |x|
//   kernel 3  "incr"   : 1 column, 1 step, software-pipelined: the word
//                        emitted in iteration n is the result of iteration
//                        n-1, so y[0] = 0 (cleared register), y[n] = x[n-1]+1;
//                        it consumes and produces a word every cycle
//                        and so runs into stream stalls.
//   kernel 4  "erode"  : 1 column, 5 steps, y[n] = min(x[n], x[n-1], x[n-2])
//   kernel 5  "dilate" : 1 column, 5 steps, y[n] = max(x[n], x[n-1], x[n-2])
//                        (samples before the start count as 0), the
//                        building blocks of morphological ECG filtering.
//   kernel 6  "mmd"    : 1 column, 6 steps, morphological derivative at
//                        scale 1 centred on x[n-1]:
//                        y[n] = max3 + min3 - 2*x[n-1] over x[n-2..n]
//                        (samples before the start count as 0); rows 0, 1
//                        and 2 work in parallel on the maximum, the minimum
//                        and 2*x[n-1], each keeping its own copy of the history.
//   kernel 7  "rproj"  : 1 column, 12 steps, random projection of a beat:
//                        each iteration pops 8 samples x[0..7] and emits
//                        y[j] = sum_s rp_coef(j, s) * x[s] for j = 0..3, one
//                        row per j; the coefficients (+1, -1 or 0) become
//                        ADD, SUB or a plain copy of the accumulator.
package tb_kernels_pkg;
  import cgra_pkg::*;

  localparam int unsigned TB_ROWS = 4;
  localparam logic [31:0] NOPW = 32'(pack_rc(OP_NOP, SRC_R0, SRC_R0, 1'b0, 2'd0, 8'd0));

  function automatic logic [31:0] colw(logic pop, logic push, int row);
    col_cfg_t c;
    c = '{pop: pop, push: push, out_row: ROWSEL_W'(row)};
    return 32'(c);
  endfunction

  function automatic logic [31:0] hdrw(int len, int ncols, int base);
    kernel_hdr_t h;
    h = '{len: 8'(len), ncols: 4'(ncols), rsvd: '0, base: 16'(base)};
    return 32'(h);
  endfunction

  // Sparse random projection matrix: entries +1, -1 or 0, picked by a fixed
  // hash of (j, s) that gives +1 and -1 with probability about 1/6 each.
  function automatic int rp_coef(int j, int s);
    int h;
    h = (((j * 8 + s) * 4 + 7) % 31) % 6;
    return (h == 0) ? 1 : (h == 1) ? -1 : 0;
  endfunction

  // Appends one step of one column: control word + ROWS cell words.
  function automatic void step(ref logic [31:0] q[$], input logic [31:0] cw,
                               input logic [31:0] r0, input logic [31:0] r1,
                               input logic [31:0] r2, input logic [31:0] r3);
    q.push_back(cw); q.push_back(r0); q.push_back(r1); q.push_back(r2); q.push_back(r3);
  endfunction

  // Words of kernel kid; ncols and len are returned too.
  function automatic void kernel(input int kid, output logic [31:0] q[$],
                                 output int ncols, output int len);
    q = {};
    case (kid)
      0: begin
        ncols = 1; len = 3;
        step(q, colw(1, 0, 0), pack_rc(OP_MUL, SRC_IN, SRC_IMM, 0, 0, 8'd3), NOPW, NOPW, NOPW);
        step(q, colw(0, 0, 0), NOPW, pack_rc(OP_ADD, SRC_N, SRC_IMM, 0, 0, 8'd5), NOPW, NOPW);
        step(q, colw(0, 1, 1), NOPW, NOPW, NOPW, NOPW);
      end
      1: begin
        ncols = 2; len = 4;
        // leader column
        step(q, colw(1, 0, 0), pack_rc(OP_PASS, SRC_IN, SRC_R0, 0, 0, 0), NOPW, NOPW, NOPW);
        step(q, colw(0, 0, 0), NOPW, NOPW, NOPW, NOPW);
        step(q, colw(0, 0, 0), pack_rc(OP_PASS, SRC_E, SRC_R0, 0, 0, 0), NOPW, NOPW, NOPW);
        step(q, colw(0, 1, 0), NOPW, NOPW, NOPW, NOPW);
        // second column: R0 += west neighbour
        step(q, colw(0, 0, 0), NOPW, NOPW, NOPW, NOPW);
        step(q, colw(0, 0, 0), pack_rc(OP_ADD, SRC_W, SRC_R0, 1, 0, 0), NOPW, NOPW, NOPW);
        step(q, colw(0, 0, 0), NOPW, NOPW, NOPW, NOPW);
        step(q, colw(0, 0, 0), NOPW, NOPW, NOPW, NOPW);
      end
      2: begin
        ncols = 1; len = 2;
        step(q, colw(1, 0, 0), NOPW, NOPW, pack_rc(OP_ABS, SRC_IN, SRC_R0, 0, 0, 0), NOPW);
        step(q, colw(0, 1, 2), NOPW, NOPW, NOPW, NOPW);
      end
      4, 5: begin
        // sliding 3-sample minimum (4) or maximum (5) in one cell:
        // R2 = x[n]; out = x[n] op R0 (x[n-1]); out = out op R1 (x[n-2]);
        // emit; R1 = R0; R0 = R2
        alu_op_e o;
        o = (kid == 4) ? OP_MIN : OP_MAX;
        ncols = 1; len = 5;
        step(q, colw(1, 0, 0), pack_rc(OP_PASS, SRC_IN, SRC_R0, 1, 2, 0), NOPW, NOPW, NOPW);
        step(q, colw(0, 0, 0), pack_rc(o, SRC_SELF, SRC_R0, 0, 0, 0), NOPW, NOPW, NOPW);
        step(q, colw(0, 0, 0), pack_rc(o, SRC_SELF, SRC_R1, 0, 0, 0), NOPW, NOPW, NOPW);
        step(q, colw(0, 1, 0), pack_rc(OP_PASS, SRC_R0, SRC_R0, 1, 1, 0), NOPW, NOPW, NOPW);
        step(q, colw(0, 0, 0), pack_rc(OP_PASS, SRC_R2, SRC_R0, 1, 0, 0), NOPW, NOPW, NOPW);
      end
      6: begin
        // step 0: rows 0-2 latch x[n] in R2 (all see the popped word)
        // step 1: row 0 max(x[n], R0), row 1 min(x[n], R0), row 2 R0+R0 = 2*x[n-1]
        // step 2: row 0 max(., R1), row 1 min(., R1): max3 and min3
        // step 3: row 1 = min3 + max3 (north); row 0 shifts R1 = R0
        // step 4: row 2 = (min3 + max3) - 2*x[n-1]; row 0 R0 = R2, row 1 R1 = R0
        // step 5: emit row 2; rows 1 and 2 R0 = R2
        ncols = 1; len = 6;
        step(q, colw(1, 0, 0), pack_rc(OP_PASS, SRC_IN, SRC_R0, 1, 2, 0),
             pack_rc(OP_PASS, SRC_IN, SRC_R0, 1, 2, 0), pack_rc(OP_PASS, SRC_IN, SRC_R0, 1, 2, 0), NOPW);
        step(q, colw(0, 0, 0), pack_rc(OP_MAX, SRC_SELF, SRC_R0, 0, 0, 0),
             pack_rc(OP_MIN, SRC_SELF, SRC_R0, 0, 0, 0), pack_rc(OP_ADD, SRC_R0, SRC_R0, 0, 0, 0), NOPW);
        step(q, colw(0, 0, 0), pack_rc(OP_MAX, SRC_SELF, SRC_R1, 0, 0, 0),
             pack_rc(OP_MIN, SRC_SELF, SRC_R1, 0, 0, 0), NOPW, NOPW);
        step(q, colw(0, 0, 0), pack_rc(OP_PASS, SRC_R0, SRC_R0, 1, 1, 0),
             pack_rc(OP_ADD, SRC_SELF, SRC_N, 0, 0, 0), NOPW, NOPW);
        step(q, colw(0, 0, 0), pack_rc(OP_PASS, SRC_R2, SRC_R0, 1, 0, 0),
             pack_rc(OP_PASS, SRC_R0, SRC_R0, 1, 1, 0), pack_rc(OP_SUB, SRC_N, SRC_SELF, 0, 0, 0), NOPW);
        step(q, colw(0, 1, 2), NOPW,
             pack_rc(OP_PASS, SRC_R2, SRC_R0, 1, 0, 0), pack_rc(OP_PASS, SRC_R2, SRC_R0, 1, 0, 0), NOPW);
      end
      7: begin
        // steps 0-7: pop x[s]; row j: R0 = (s == 0 ? 0 : R0) + rp_coef(j, s) * x[s]
        // (every step writes the output register too, so after step 7 each
        // row's output holds its sum); steps 8-11: emit rows 0..3, cells hold
        logic [31:0] w [4];
        ncols = 1; len = 12;
        for (int s = 0; s < 8; s++) begin
          for (int j = 0; j < 4; j++) begin
            int c;
            c = rp_coef(j, s);
            if (s == 0)
              w[j] = (c > 0) ? pack_rc(OP_PASS, SRC_IN, SRC_R0, 1, 0, 0) :
                     (c < 0) ? pack_rc(OP_SUB, SRC_IMM, SRC_IN, 1, 0, 0) :
                               pack_rc(OP_PASS, SRC_IMM, SRC_R0, 1, 0, 0);
            else
              w[j] = (c > 0) ? pack_rc(OP_ADD, SRC_R0, SRC_IN, 1, 0, 0) :
                     (c < 0) ? pack_rc(OP_SUB, SRC_R0, SRC_IN, 1, 0, 0) :
                               pack_rc(OP_PASS, SRC_R0, SRC_R0, 0, 0, 0);
          end
          step(q, colw(1, 0, 0), w[0], w[1], w[2], w[3]);
        end
        for (int j = 0; j < 4; j++) step(q, colw(0, 1, j), NOPW, NOPW, NOPW, NOPW);
      end
      default: begin
        // one step: consume, add 1, and emit the previous iteration's result
        ncols = 1; len = 1;
        step(q, colw(1, 1, 0), pack_rc(OP_ADD, SRC_IN, SRC_IMM, 0, 0, 8'd1), NOPW, NOPW, NOPW);
      end
    endcase
  endfunction

  // Expected output stream of kernel kid for input x.
  // For kernel 7, x holds whole beats of 8 samples and y gets 4 words per beat.
  function automatic void expect_out(input int kid, input word_t x[$], output word_t y[$]);
    int acc;
    y = {};
    acc = 0;
    if (kid == 7) begin
      for (int b = 0; b + 8 <= x.size(); b += 8)
        for (int j = 0; j < 4; j++) begin
          acc = 0;
          for (int s = 0; s < 8; s++) acc += rp_coef(j, s) * int'($signed(x[b + s]));
          y.push_back(word_t'(acc));
        end
      return;
    end
    foreach (x[i]) begin
      case (kid)
        0: y.push_back(word_t'(3 * int'($signed(x[i])) + 5));
        1: begin acc += int'($signed(x[i])); y.push_back(word_t'(acc)); end
        2: y.push_back(word_t'(($signed(x[i]) < 0) ? -int'($signed(x[i])) : int'($signed(x[i]))));
        4, 5: begin
          int a, b, c, r;
          a = int'($signed(x[i]));
          b = (i >= 1) ? int'($signed(x[i-1])) : 0;   // registers start at zero
          c = (i >= 2) ? int'($signed(x[i-2])) : 0;
          if (kid == 4) r = (a < b) ? ((a < c) ? a : c) : ((b < c) ? b : c);
          else          r = (a > b) ? ((a > c) ? a : c) : ((b > c) ? b : c);
          y.push_back(word_t'(r));
        end
        6: begin
          int a, b, c, mx, mn;
          a = int'($signed(x[i]));
          b = (i >= 1) ? int'($signed(x[i-1])) : 0;
          c = (i >= 2) ? int'($signed(x[i-2])) : 0;
          mx = (a > b) ? ((a > c) ? a : c) : ((b > c) ? b : c);
          mn = (a < b) ? ((a < c) ? a : c) : ((b < c) ? b : c);
          y.push_back(word_t'(mx + mn - 2 * b));
        end
        default: y.push_back((i == 0) ? word_t'(0) : word_t'(x[i-1] + 1'b1));
      endcase
    end
  endfunction

  // Full Configuration RAM image for kernels 0..7: headers at 0..7, words
  // from address 16 on.
  function automatic void cram_image(output logic [31:0] img[$]);
    logic [31:0] q[$];
    int nc, ln, base;
    img = {};
    for (int a = 0; a < 16; a++) img.push_back('0);
    base = 16;
    for (int k = 0; k < 8; k++) begin
      kernel(k, q, nc, ln);
      img[k] = hdrw(ln, nc, base);
      foreach (q[i]) img.push_back(q[i]);
      base += q.size();
    end
  endfunction
endpackage
