// tb_ecg_rp_class: heartbeat classification by random projection, with
// selective processing, on the full platform at its default size.
//
// Core 0 owns one lead of 5000 samples (10 s at 500 Hz) with 12 synthetic
// beats: normal beats are narrow peaks, and every fourth beat is a wide,
// inverted, ectopic-like beat. The core's software cuts a 64-sample window
// around each beat and downsamples it by 8 (mean of 8 samples) into an
// 8-word vector. It then offloads the random projection of all 12 vectors
// in one call (kernel 7: 4 coefficients per beat, 12 cycles per beat) and
// classifies each beat by its nearest class centre in the projected space
// (L1 distance); the centres are the projections of the two clean beat
// shapes. Only the beats classified as abnormal get the detailed analysis:
// for each, the core offloads the MMD transform (kernel 6) over the beat's
// 64-sample window. Checked: every projected coefficient against the
// testbench's own product, every label against the known beat type, every
// MMD sample, and the kernel times (12 cycles per beat, 6 per sample, plus
// at most 200 cycles of queueing, configuration and draining).
module tb_ecg_rp_class;
  import cgra_pkg::*;
  import tb_kernels_pkg::*;
  localparam int N = 8, SAMPLES = 5000;

  logic clk = 0, rst_n = 0, test_en = 0;
  logic core_clk [N], core_clk_en [N];
  logic core_i_req [N], core_i_gnt [N], core_i_rvalid [N];
  logic [13:0] core_i_addr [N];
  logic [23:0] core_i_rdata [N];
  logic  core_d_req [N], core_d_we [N], core_d_gnt [N], core_d_rvalid [N];
  addr_t core_d_addr [N];
  word_t core_d_wdata [N], core_d_rdata [N];
  logic  core_s_valid [N];
  sync_op_e core_s_op [N];
  logic [2:0] core_s_pt [N];
  logic  core_a_valid [N];
  logic [7:0] core_a_kid [N];
  logic  iml_we, iml_gnt, cram_we;
  logic [13:0] iml_addr;
  logic [23:0] iml_wdata;
  logic [9:0] cram_waddr;
  logic [31:0] cram_wdata;
  logic [3:0] col_active, col_stall, col_busy;
  logic cgra_loading, accel_queue_empty;
  int checks = 0, failures = 0;

  mc_cgra_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  task automatic tick(int i);
    @(negedge clk);
    while (!core_clk_en[i]) @(negedge clk);
  endtask

  task automatic dwrite(int i, int a, word_t v);
    tick(i);
    core_d_req[i] = 1; core_d_we[i] = 1; core_d_addr[i] = addr_t'(a); core_d_wdata[i] = v;
    #1;
    while (!core_d_gnt[i]) begin @(negedge clk); #1; end
    @(negedge clk);
    core_d_req[i] = 0; core_d_we[i] = 0;
  endtask

  task automatic dread(int i, int a, output word_t v);
    tick(i);
    core_d_req[i] = 1; core_d_we[i] = 0; core_d_addr[i] = addr_t'(a);
    #1;
    while (!core_d_gnt[i]) begin @(negedge clk); #1; end
    @(negedge clk);
    core_d_req[i] = 0;
    #1;
    v = core_d_rdata[i];
  endtask

  task automatic accel(int i, int kid, int in_a, int out_a, int n, output int cycles);
    dwrite(i, 32768 + REG_IN_ADDR, word_t'(in_a));
    dwrite(i, 32768 + REG_IN_LEN, word_t'(n));
    dwrite(i, 32768 + REG_OUT_ADDR, word_t'(out_a));
    dwrite(i, 32768 + REG_OUT_LEN, word_t'(n));
    dwrite(i, 32768 + REG_ITERS, word_t'(n));
    tick(i);
    core_a_valid[i] = 1; core_a_kid[i] = 8'(kid);
    @(negedge clk);
    core_a_valid[i] = 0;
    cycles = 1;
    #1;
    while (!core_clk_en[i]) begin cycles++; @(negedge clk); #1; end
  endtask

  localparam int PERIOD = 400, FIRST = 200, NB = 12, WIN = 64, DS = 8;
  localparam int LEAD_A = 0, BEAT_A = 5000, PROJ_A = 6000, MMD_A = 7000;

  function automatic bit abnormal(int k);
    return (k % 4) == 3;
  endfunction

  // Clean beat shape at offset d from the beat centre.
  function automatic int shape(bit ab, int d);
    int a;
    a = (d < 0) ? -d : d;
    if (!ab) return (a < 10) ? (10 - a) * 120 : 0;       // narrow peak
    return (a < 30) ? -(30 - a) * 40 : 0;                // wide, inverted
  endfunction

  function automatic word_t ecg(int n);
    int k, base;
    k = (n + PERIOD / 2 - FIRST) / PERIOD;                // nearest beat
    base = ((n / 4) % 500 < 250) ? (n / 4) % 250 : 250 - (n / 4) % 250;
    return word_t'((base - 125) / 4 + shape(abnormal(k), n - (FIRST + k * PERIOD))
                   + $urandom_range(0, 16) - 8);
  endfunction

  // 8-word vector of a window: mean of each group of 8 samples
  function automatic void downsample(input int w[$], output word_t v[$]);
    v = {};
    for (int g = 0; g < WIN / DS; g++) begin
      int acc;
      acc = 0;
      for (int t = 0; t < DS; t++) acc += w[g * DS + t];
      v.push_back(word_t'(acc >>> 3));
    end
  endfunction

  function automatic int l1(word_t a[$], int off, word_t c[$]);
    int d;
    d = 0;
    for (int j = 0; j < 4; j++) begin
      int e;
      e = int'($signed(a[off + j])) - int'($signed(c[j]));
      d += (e < 0) ? -e : e;
    end
    return d;
  endfunction

  task automatic class_prog(int i);
    word_t x[$], vecs[$], v[$], p[$], pr[$], cn[$], ca[$], win[$], y[$], r;
    int w[$], cyc, n_ab;
    for (int n = 0; n < SAMPLES; n++) begin
      x.push_back(ecg(n));
      dwrite(i, LEAD_A + n, x[n]);
    end
    // class centres: projections of the clean shapes
    for (int ab = 0; ab < 2; ab++) begin
      w = {};
      for (int d = -WIN / 2; d < WIN / 2; d++) w.push_back(shape(ab[0], d));
      downsample(w, v);
      if (ab == 0) expect_out(7, v, cn); else expect_out(7, v, ca);
    end
    // software: cut and downsample the beat windows from data memory
    for (int k = 0; k < NB; k++) begin
      w = {};
      for (int d = -WIN / 2; d < WIN / 2; d++) begin
        dread(i, LEAD_A + FIRST + k * PERIOD + d, r);
        w.push_back(int'($signed(r)));
      end
      downsample(w, v);
      foreach (v[g]) begin
        vecs.push_back(v[g]);
        dwrite(i, BEAT_A + k * DS + g, v[g]);
      end
    end
    // CGRA: project all beats in one call, NB iterations
    dwrite(i, 32768 + REG_IN_ADDR, word_t'(BEAT_A));
    dwrite(i, 32768 + REG_IN_LEN, word_t'(NB * DS));
    dwrite(i, 32768 + REG_OUT_ADDR, word_t'(PROJ_A));
    dwrite(i, 32768 + REG_OUT_LEN, word_t'(NB * 4));
    dwrite(i, 32768 + REG_ITERS, word_t'(NB));
    tick(i);
    core_a_valid[i] = 1; core_a_kid[i] = 8'd7;
    @(negedge clk);
    core_a_valid[i] = 0;
    cyc = 1;
    #1;
    while (!core_clk_en[i]) begin cyc++; @(negedge clk); #1; end
    $display("random projection of %0d beats: %0d cycles", NB, cyc);
    chk(cyc >= 12 * NB, "a 12-step schedule needs at least 12 cycles per beat");
    chk(cyc <= 12 * NB + 200, "projection runs at one beat per 12 cycles plus a fixed overhead");
    expect_out(7, vecs, pr);
    for (int m = 0; m < NB * 4; m++) begin
      dread(i, PROJ_A + m, r);
      p.push_back(r);
      chk(r == pr[m], $sformatf("coefficient %0d: %h expected %h", m, r, pr[m]));
    end
    // classify; detailed analysis only for abnormal beats
    n_ab = 0;
    for (int k = 0; k < NB; k++) begin
      bit lab;
      lab = l1(p, 4 * k, ca) < l1(p, 4 * k, cn);
      chk(lab == abnormal(k), $sformatf("beat %0d labelled %0d, is %0d", k, lab, abnormal(k)));
      if (lab) begin
        int st;
        n_ab++;
        st = LEAD_A + FIRST + k * PERIOD - WIN / 2;
        accel(i, 6, st, MMD_A, WIN, cyc);
        chk(cyc >= 6 * WIN && cyc <= 6 * WIN + 200, $sformatf("beat %0d MMD time %0d cycles", k, cyc));
        win = {};
        for (int d = 0; d < WIN; d++) win.push_back(x[st + d]);
        expect_out(6, win, y);
        for (int d = 0; d < WIN; d++) begin
          dread(i, MMD_A + d, r);
          chk(r == y[d], $sformatf("beat %0d MMD sample %0d: %h expected %h", k, d, r, y[d]));
        end
      end
    end
    $display("%0d beats, %0d classified abnormal and analysed in detail", NB, n_ab);
    chk(n_ab == NB / 4, "only the abnormal beats were analysed");
  endtask

  initial begin
    logic [31:0] img[$];
    for (int i = 0; i < N; i++) begin
      core_i_req[i] = 0; core_i_addr[i] = 0; core_d_req[i] = 0; core_d_we[i] = 0;
      core_d_addr[i] = 0; core_d_wdata[i] = 0; core_s_valid[i] = 0; core_s_op[i] = SYNC_NOP;
      core_s_pt[i] = 0; core_a_valid[i] = 0; core_a_kid[i] = 0;
    end
    iml_we = 0; iml_addr = 0; iml_wdata = 0; cram_we = 0; cram_waddr = 0; cram_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cram_image(img);
    foreach (img[a]) begin
      @(negedge clk);
      cram_we = 1; cram_waddr = 10'(a); cram_wdata = img[a];
    end
    @(negedge clk);
    cram_we = 0;
    class_prog(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
