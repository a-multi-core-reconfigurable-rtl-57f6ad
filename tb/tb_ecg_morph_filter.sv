// tb_ecg_morph_filter: morphological filtering of a three-lead ECG excerpt
// on the full platform at its default size.
//
// Each of three cores owns one lead of 5000 samples (10 s at 500 Hz). The
// samples are synthetic: a slow baseline wander, a QRS-like spike every 400
// samples (75 beats per minute) and small noise. Each core stores its lead in
// data memory, then offloads an erosion (sliding 3-sample minimum, kernel 4)
// followed by a dilation (sliding 3-sample maximum, kernel 5) on the CGRA,
// i.e. a morphological opening that removes narrow peaks, and reads the
// result back. Two buffers per lead (30000 of the 32768 data words) are
// used: the opened signal overwrites the input. The three leads are processed concurrently on separate
// columns. Every output sample is compared with the opening computed in the
// testbench, and each kernel must take 5 cycles per sample (its schedule
// length) plus at most 200 cycles of queueing, configuration and draining.
module tb_ecg_morph_filter;
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
    spike = (ph < 10) ? ph * 90 : (ph < 20) ? (20 - ph) * 90 : 0;          // QRS-like peak
    return word_t'((base - 125) * (lead + 1) + spike + $urandom_range(0, 30) - 15);
  endfunction

  int finished = 0;

  task automatic lead_prog(int i);
    word_t x[$], e[$], y[$], v;
    int in_a, tmp_a, out_a, c_er, c_di;
    // two 5000-word buffers per lead: 3 leads fill 30000 of the 32768 data words;
    // the opened signal overwrites the input, which the erosion has consumed
    in_a = 10000 * i; tmp_a = 10000 * i + 5000; out_a = in_a;
    for (int n = 0; n < SAMPLES; n++) begin
      x.push_back(ecg(i, n));
      dwrite(i, in_a + n, x[n]);
    end
    accel(i, 4, in_a, tmp_a, SAMPLES, c_er);
    accel(i, 5, tmp_a, out_a, SAMPLES, c_di);
    $display("lead %0d: erosion %0d cycles, dilation %0d cycles (%0d samples)", i, c_er, c_di, SAMPLES);
    chk(c_er >= 5 * SAMPLES && c_di >= 5 * SAMPLES, "a 5-step schedule needs at least 5 cycles per sample");
    chk(c_er <= 5 * SAMPLES + 200 && c_di <= 5 * SAMPLES + 200, "kernel runs at one sample per 5 cycles plus a fixed overhead");
    expect_out(4, x, e);
    expect_out(5, e, y);
    for (int n = 0; n < SAMPLES; n++) begin
      dread(i, out_a + n, v);
      chk(v == y[n], $sformatf("lead %0d sample %0d: %h expected %h", i, n, v, y[n]));
    end
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
