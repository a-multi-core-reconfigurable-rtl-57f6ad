// tb_dma_channel: self-checking test of one DMA channel.
//
// A memory model grants the channel's port at random (about 60 % of the
// cycles) and answers reads one cycle after the grant. A consumer pops the
// input stream at random, a producer pushes results at random (more than the
// output length, so some are dropped). Checks: the input words arrive in
// order from in_addr on, then read as 0; no read beyond in_len; pops only
// stall (in_wait) while a word is still to come; the first out_len pushed
// words land at out_addr on, nothing beyond; done pulses once after
// exec_done when everything is written.
module tb_dma_channel;
  import cgra_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start, exec_done, busy, done;
  kparam_t prm;
  logic in_pop, in_wait, out_push, out_full;
  word_t in_data, out_data;
  logic m_req, m_we, m_gnt, m_rvalid;
  addr_t m_addr;
  word_t m_wdata, m_rdata;
  int checks = 0, failures = 0;

  dma_channel #(.FIFO_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  word_t mem [256];
  int    max_rd_addr;

  // memory model
  always @(negedge clk) m_gnt = m_req && ($urandom_range(0, 9) < 6);
  always @(posedge clk) begin
    m_rvalid <= m_req && m_gnt && !m_we;
    if (m_req && m_gnt && !m_we) begin
      m_rdata <= mem[m_addr[7:0]];
      if (int'(m_addr) > max_rd_addr) max_rd_addr = int'(m_addr);
    end
    if (m_req && m_gnt && m_we) mem[m_addr[7:0]] <= m_wdata;
  end

  task automatic run(int in_a, int in_l, int out_a, int out_l, int pushes);
    word_t pushed[$];
    word_t init_mem [256];
    int got, npush, dones;
    for (int i = 0; i < 256; i++) begin mem[i] = 16'($urandom); init_mem[i] = mem[i]; end
    max_rd_addr = -1;
    @(negedge clk);
    prm = '{in_addr: addr_t'(in_a), in_len: word_t'(in_l), out_addr: addr_t'(out_a),
            out_len: word_t'(out_l), iters: '0};
    start = 1;
    @(negedge clk);
    start = 0;
    got = 0; npush = 0; dones = 0;
    // stream phase
    while (got < in_l + 3 || npush < pushes) begin
      in_pop   = ($urandom_range(0, 2) == 0) && got < in_l + 3;
      out_push = ($urandom_range(0, 2) == 0) && npush < pushes && !out_full;
      out_data = 16'($urandom);
      #1;
      if (in_pop && !in_wait) begin
        if (got < in_l) chk(in_data == init_mem[in_a + got], $sformatf("input word %0d", got));
        else            chk(in_data == 0, "exhausted input reads 0");
        got++;
      end
      if (in_pop && in_wait) chk(got < in_l, "wait only while input remains");
      if (out_push) begin pushed.push_back(out_data); npush++; end
      @(negedge clk);
    end
    in_pop = 0; out_push = 0;
    exec_done = 1;
    @(negedge clk);
    exec_done = 0;
    for (int t = 0; t < 200 && !done; t++) @(negedge clk);
    chk(done, "done pulse");
    @(negedge clk);
    chk(!busy, "idle after done");
    chk(max_rd_addr <= in_a + in_l - 1, "no read past the input");
    for (int i = 0; i < out_l; i++)
      chk(mem[out_a + i] == pushed[i], $sformatf("output word %0d", i));
    chk(mem[out_a + out_l] == init_mem[out_a + out_l], "nothing written past out_len");
  endtask

  initial begin
    start = 0; exec_done = 0; prm = '0; in_pop = 0; out_push = 0; out_data = 0;
    m_rvalid = 0; m_rdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(10, 8, 100, 6, 8);
    run(40, 20, 150, 20, 20);
    run(0, 1, 200, 3, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
