// tb_cgra_controller: self-checking test of the CGRA controller.
//
// Eight core models write random kernel parameters into their memory-mapped
// registers (read back and checked), then issue ACCEL with random kernel ids
// whose headers ask for 1, 2 or 4 columns. A CGRA model accepts requests when
// it is not busy configuring, holds the columns for a random time and then
// reports completion. Checks: every granted group of columns is free, inside
// the array and adjacent; parameters and header match the core's; requests
// are served in queue order (an independent model of the queue, filled one
// core per cycle lowest index first); completion frees the columns and
// reaches the right core one cycle later; all 24 requests finish. The test
// also counts the times a request had to wait for columns.
module tb_cgra_controller;
  import cgra_pkg::*;
  localparam int N = 8, COLS = 4;

  logic clk = 0, rst_n = 0;
  logic       reg_we [N], accel_valid [N], accel_done [N];
  logic [2:0] reg_addr [N];
  word_t      reg_wdata [N], reg_rdata [N];
  logic [7:0] accel_kid [N];
  logic [9:0] cram_addr;
  logic [31:0] cram_rdata;
  logic       req_valid, req_ready, q_empty;
  accel_req_t req;
  logic [N-1:0] ch_done;
  logic [COLS-1:0] col_busy;
  int checks = 0, failures = 0;

  cgra_controller #(.N_CORES(N), .COLS(COLS), .CRAM_AW(10)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  // Configuration RAM model: kernel k asks for NC[k] columns
  int NC [4] = '{1, 2, 1, 4};
  always @(posedge clk) cram_rdata <= 32'({8'd3, 4'(NC[cram_addr % 4]), 4'd0, 16'(100 + cram_addr)});

  kparam_t   p_exp [N];
  int        kid_of [N];
  int        order [$];      // expected service order
  logic      m_pend [N];
  int        held_by [COLS];
  int        done_cnt = 0, waits = 0, granted = 0;
  int        hold [N];

  // independent model of the request queue
  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < N; i++) begin
        if (m_pend[i]) begin
          order.push_back(i);
          m_pend[i] = 0;
          break;
        end
      end
      for (int i = 0; i < N; i++) if (accel_valid[i]) m_pend[i] = 1;
    end
  end

  // CGRA model
  int cfg_busy = 0;
  int idle_head = 0;
  always @(negedge clk) begin
    ch_done = '0;
    for (int i = 0; i < N; i++) begin
      if (hold[i] > 0) begin
        hold[i]--;
        if (hold[i] == 0) ch_done[i] = 1;
      end
    end
    if (cfg_busy > 0) cfg_busy--;
    req_ready = (cfg_busy == 0);
    #1;
    if (!q_empty && req_ready && !req_valid) begin
      idle_head++;
      if (idle_head == 3) waits++;   // longer than the header read: no columns
    end else begin
      idle_head = 0;
    end
    if (req_valid && req_ready) begin
      int c0, n, core;
      core = int'(req.core);
      c0 = int'(req.col_start);
      n = int'(req.hdr.ncols);
      granted++;
      chk(order.size() > 0 && order[0] == core, $sformatf("queue order, core %0d", core));
      if (order.size() > 0) void'(order.pop_front());
      chk(n == NC[kid_of[core]], "header of the requested kernel");
      chk(req.hdr.base == 16'(100 + kid_of[core]), "header base");
      chk(req.prm == p_exp[core], "kernel parameters of the core");
      chk(c0 + n <= COLS, "group inside the array");
      for (int c = c0; c < c0 + n && c < COLS; c++) begin
        chk(held_by[c] < 0, $sformatf("column %0d free", c));
        held_by[c] = core;
      end
      hold[core] = $urandom_range(5, 60);
      cfg_busy = $urandom_range(2, 12);
    end
  end

  // release of columns and completion to the core
  always @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (ch_done[i]) for (int c = 0; c < COLS; c++) if (held_by[c] == i) held_by[c] = -1;
    end
  end

  task automatic core(int i);
    for (int rep = 0; rep < 3; rep++) begin
      word_t v [5];
      repeat ($urandom_range(0, 40)) @(negedge clk);
      for (int r = 0; r < 5; r++) begin
        v[r] = 16'($urandom);
        @(negedge clk);
        reg_we[i] = 1; reg_addr[i] = 3'(r); reg_wdata[i] = v[r];
      end
      @(negedge clk);
      reg_we[i] = 0;
      for (int r = 0; r < 5; r++) begin
        reg_addr[i] = 3'(r);
        #1 chk(reg_rdata[i] == v[r], "register read back");
        @(negedge clk);
      end
      p_exp[i] = '{in_addr: v[0], in_len: v[1], out_addr: v[2], out_len: v[3], iters: v[4]};
      kid_of[i] = $urandom_range(0, 3);
      accel_valid[i] = 1; accel_kid[i] = 8'(kid_of[i]);
      @(negedge clk);
      accel_valid[i] = 0;
      while (!accel_done[i]) @(negedge clk);
      chk(!col_busy[0] || held_by[0] != i, "columns freed");
      done_cnt++;
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      reg_we[i] = 0; reg_addr[i] = 0; reg_wdata[i] = 0; accel_valid[i] = 0; accel_kid[i] = 0;
      m_pend[i] = 0; hold[i] = 0;
    end
    for (int c = 0; c < COLS; c++) held_by[c] = -1;
    ch_done = '0; req_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      fork
        automatic int k = i;
        core(k);
      join_none
    end
    wait (done_cnt == 3 * N);
    repeat (3) @(negedge clk);
    chk(col_busy == '0 && q_empty, "all columns free at the end");
    chk(granted == 3 * N, "all requests granted");
    chk(waits > 0, "some request waited for columns");
    $display("waits=%0d", waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
