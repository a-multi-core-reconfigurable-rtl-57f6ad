// tb_ecg_mmd_delineation: multiscale morphological derivative (MMD)
// delineation of a three-lead ECG excerpt on the full platform at its default
// size.
//
// Each of three cores owns one lead of 5000 samples (10 s at 500 Hz). The
// samples are synthetic: a slow baseline wander, a sharp QRS-like peak every
// 400 samples (75 beats per minute) and small noise. Each core stores its lead
// in data memory and offloads the MMD transform at scale 1 (kernel 6:
// max + min - 2*centre over a 3-sample window) to the CGRA; the three leads
// run concurrently on separate columns. The core then reads the transform
// back and does the control-heavy part in software: it marks a fiducial
// point wherever the transform falls below a threshold (the MMD has a sharp
// negative extreme at a peak) and keeps the most negative sample of each
// cluster, ignoring the first two outputs, whose window reaches back before
// the first sample. Checked: every transform sample against the one computed in the
// testbench, the detected R-peak positions against the known positions of
// the synthetic beats, and the kernel time of 6 cycles per sample (its
// schedule length) plus at most 200 cycles of queueing, configuration and
// draining. Input and output buffers use 30000 of the 32768 data words.
module tb_ecg_mmd_delineation;
  import cgra_pkg::*;
  import tb_kernels_pkg::*;
  localparam int N = 8, LEADS = 3, SAMPLES = 5000;

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

  int concurrent = 0;
  always @(posedge clk) if ($countones(col_active) >= 2) concurrent++;

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

  function automatic word_t ecg(int lead, int n);
    int base, ph, spike;
    ph = n % 400;
    base = ((n / 4) % 500 < 250) ? (n / 4) % 250 : 250 - (n / 4) % 250;   // baseline wander
    spike = (ph < 10) ? ph * 150 : (ph < 20) ? (20 - ph) * 150 : 0;        // R peak at ph = 10
    return word_t'((base - 125) * (lead + 1) + spike + $urandom_range(0, 16) - 8);
  endfunction

  int finished = 0;

  localparam int PERIOD = 400, PEAK = 10, THRESH = -100;

  task automatic lead_prog(int i);
    word_t x[$], y[$], v;
    int in_a, out_a, cyc, best, best_n, npk, last;
    int peaks[$];
    in_a = 10000 * i; out_a = 10000 * i + 5000;
    for (int n = 0; n < SAMPLES; n++) begin
      x.push_back(ecg(i, n));
      dwrite(i, in_a + n, x[n]);
    end
    accel(i, 6, in_a, out_a, SAMPLES, cyc);
    $display("lead %0d: MMD transform %0d cycles (%0d samples)", i, cyc, SAMPLES);
    chk(cyc >= 6 * SAMPLES, "a 6-step schedule needs at least 6 cycles per sample");
    chk(cyc <= 6 * SAMPLES + 200, "kernel runs at one sample per 6 cycles plus a fixed overhead");
    expect_out(6, x, y);
    // software part: read the transform back, check it and pick the fiducial points
    best = 0; best_n = -1; last = -100;
    for (int n = 0; n < SAMPLES; n++) begin
      dread(i, out_a + n, v);
      chk(v == y[n], $sformatf("lead %0d sample %0d: %h expected %h", i, n, v, y[n]));
      if (n >= 2 && int'($signed(v)) < THRESH) begin   // skip the 2-sample warm-up
        if (n - last > 5 && best_n >= 0) begin peaks.push_back(best_n - 1); best = 0; best_n = -1; end
        if (int'($signed(v)) < best) begin best = int'($signed(v)); best_n = n; end
        last = n;
      end
    end
    if (best_n >= 0) peaks.push_back(best_n - 1);   // y[n] is centred on x[n-1]
    npk = (SAMPLES - PEAK + PERIOD - 1) / PERIOD;
    chk(peaks.size() == npk, $sformatf("lead %0d: %0d peaks found, %0d beats", i, peaks.size(), npk));
    foreach (peaks[k])
      chk(peaks[k] == k * PERIOD + PEAK, $sformatf("lead %0d peak %0d at %0d, expected %0d", i, k, peaks[k], k * PERIOD + PEAK));
    $display("lead %0d: %0d R peaks located", i, peaks.size());
    finished++;
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
    for (int i = 0; i < LEADS; i++) begin
      fork
        automatic int k = i;
        lead_prog(k);
      join_none
    end
    wait (finished == LEADS);
    chk(concurrent > 0, "leads were filtered concurrently");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
