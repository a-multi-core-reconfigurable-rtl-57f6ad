// tb_mc_cgra_top: end-to-end test of the whole platform at its default size
// (8 cores, 8 instruction banks, 16 data banks, 4x4 CGRA).
//
// Eight core models stand in for the processors. They only act on cycles in
// which their clock is enabled, and perform what their programs would:
//   1. instruction fetch: a program is loaded through the loading port; all
//      cores then fetch the same words in lock-step (merged reads) and then
//      different words of one bank (conflicts); every word is checked;
//   2. a barrier on synchronization point 0 (all cores sleep until the last
//      one arrives);
//   3. kernel offload: every core stores an input buffer in the data memory,
//      writes its kernel parameters to its memory-mapped registers (one read
//      back), issues ACCEL for kernel (core mod 4) and is clock-gated until
//      the CGRA has written the outputs; 8 requests compete for 4 columns;
//      the core then reads its output buffer and checks it against the
//      reference results;
//   4. a producer/consumer hand-over between cores 1 and 2.
// Every mechanism is counted and must have happened at least once: merged
// fetches, crossbar conflicts, barrier sleep, producer/consumer wake-up,
// ACCEL clock gating, requests waiting for columns, kernels running
// concurrently, configuration of one kernel while another runs, and stream
// stalls.
module tb_mc_cgra_top;
  import cgra_pkg::*;
  import tb_kernels_pkg::*;
  localparam int N = 8;

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_merge = 0, n_conflict = 0, n_barrier_sleep = 0, n_pc_wake = 0;
  int n_accel_gated = 0, n_queue_wait = 0, n_concurrent = 0, n_cfg_overlap = 0, n_stall = 0;

  always @(posedge clk) if (rst_n) begin
    int g;
    g = 0;
    for (int i = 0; i < N; i++) if (core_i_req[i] && core_i_gnt[i]) g++;
    if (g > 1) n_merge++;
    for (int i = 0; i < N; i++) if ((core_i_req[i] && !core_i_gnt[i]) ||
                                    (core_d_req[i] && !core_d_gnt[i])) n_conflict++;
    if (!accel_queue_empty && !cgra_loading && col_busy != 0) n_queue_wait++;
    if (col_active[0] && col_active[3]) n_concurrent++;
    if (cgra_loading && col_active != 0) n_cfg_overlap++;
    if (col_stall != 0) n_stall++;
  end

  // ---------------- core model primitives ----------------
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
    chk(core_d_rvalid[i], "data read returns one cycle after the grant");
    v = core_d_rdata[i];
  endtask

  task automatic fetch(int i, int a, output logic [23:0] v);
    core_i_req[i] = 1; core_i_addr[i] = 14'(a);
    #1;
    while (!core_i_gnt[i]) begin @(negedge clk); #1; end
    @(negedge clk);
    core_i_req[i] = 0;
    #1;
    chk(core_i_rvalid[i], "fetch returns one cycle after the grant");
    v = core_i_rdata[i];
  endtask

  task automatic sync(int i, sync_op_e o, int p);
    tick(i);
    core_s_valid[i] = 1; core_s_op[i] = o; core_s_pt[i] = 3'(p);
    @(negedge clk);
    core_s_valid[i] = 0;
  endtask

  // ---------------- programs ----------------
  logic [23:0] prog [64];
  int arrived = 0, finished = 0;

  task automatic core_prog(int i);
    logic [23:0] w;
    word_t x[$], y[$], v;
    int n, in_a, out_a, kid, t0;
    // 1. instruction fetch: same words in lock-step, then one bank
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      fetch(i, a, w);
      chk(w == prog[a], $sformatf("core %0d fetch %0d", i, a));
    end
    @(negedge clk);
    fetch(i, 8 * i, w);
    chk(w == prog[8 * i], "fetch from a shared bank");
    // 2. barrier on point 0
    repeat (3 * i) @(negedge clk);   // arrive one after the other
    arrived++;
    sync(i, SYNC_DEC, 0);
    sync(i, SYNC_SLEEP, 0);
    #1;
    if (!core_clk_en[i]) n_barrier_sleep++;
    tick(i);
    chk(arrived == N, $sformatf("core %0d passed the barrier only when all arrived", i));
    // 3. kernel offload
    n = 12 + 3 * i; in_a = 1000 + 100 * i; out_a = 5000 + 100 * i; kid = i % 4;
    for (int k = 0; k < n; k++) begin
      v = 16'($urandom_range(0, 1000) - 500);
      x.push_back(v);
      dwrite(i, in_a + k, v);
    end
    dwrite(i, 32768 + REG_IN_ADDR, word_t'(in_a));
    dwrite(i, 32768 + REG_IN_LEN, word_t'(n));
    dwrite(i, 32768 + REG_OUT_ADDR, word_t'(out_a));
    dwrite(i, 32768 + REG_OUT_LEN, word_t'(n));
    dwrite(i, 32768 + REG_ITERS, word_t'(n));
    dread(i, 32768 + REG_IN_LEN, v);
    chk(v == word_t'(n), "parameter register read back");
    tick(i);
    core_a_valid[i] = 1; core_a_kid[i] = 8'(kid);
    @(negedge clk);
    core_a_valid[i] = 0;
    t0 = 0;
    #1;
    while (!core_clk_en[i]) begin
      t0++;
      @(negedge clk); #1;
    end
    chk(t0 > 0, "core gated during its kernel");
    if (t0 > 0) n_accel_gated++;
    expect_out(kid, x, y);
    for (int k = 0; k < n; k++) begin
      dread(i, out_a + k, v);
      chk(v == y[k], $sformatf("core %0d kernel %0d output %0d: %h expected %h", i, kid, k, v, y[k]));
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
    // load the Configuration RAM and the program
    cram_image(img);
    foreach (img[a]) begin
      @(negedge clk);
      cram_we = 1; cram_waddr = 10'(a); cram_wdata = img[a];
    end
    @(negedge clk);
    cram_we = 0;
    for (int a = 0; a < 64; a++) begin
      prog[a] = 24'($urandom);
      @(negedge clk);
      iml_we = 1; iml_addr = 14'(a); iml_wdata = prog[a];
      #1 chk(iml_gnt, "program load granted");
    end
    @(negedge clk);
    iml_we = 0;
    // the barrier counter is raised once by core 0
    for (int i = 0; i < N; i++) sync(0, SYNC_INC, 0);
    for (int i = 0; i < N; i++) begin
      fork
        automatic int k = i;
        core_prog(k);
      join_none
    end
    wait (finished == N);
    // 4. producer / consumer: core 2 waits for core 1
    sync(2, SYNC_INC, 1);
    sync(2, SYNC_SLEEP, 1);
    repeat (4) @(negedge clk);
    chk(!core_clk_en[2], "consumer sleeps");
    sync(1, SYNC_DEC, 1);
    @(negedge clk);
    chk(core_clk_en[2], "consumer woken by the producer");
    if (core_clk_en[2]) n_pc_wake++;
    $display("merge=%0d conflict=%0d barrier=%0d pcwake=%0d gated=%0d qwait=%0d concurrent=%0d cfg_overlap=%0d stall=%0d",
             n_merge, n_conflict, n_barrier_sleep, n_pc_wake, n_accel_gated, n_queue_wait,
             n_concurrent, n_cfg_overlap, n_stall);
    chk(n_merge > 0, "merged instruction fetches happened");
    chk(n_conflict > 0, "crossbar conflicts happened");
    chk(n_barrier_sleep == N - 1, "all but the last core slept at the barrier");
    chk(n_pc_wake > 0, "producer/consumer wake-up happened");
    chk(n_accel_gated == N, "every core was gated for its kernel");
    chk(n_queue_wait > 0, "a request waited for free columns");
    chk(n_concurrent > 0, "kernels ran concurrently");
    chk(n_cfg_overlap > 0, "a kernel was configured while another ran");
    chk(n_stall > 0, "kernel stream stalls happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
