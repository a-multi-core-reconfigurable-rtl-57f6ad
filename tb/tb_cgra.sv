// tb_cgra: self-checking test of the shared CGRA on its own.
//
// The testbench plays the CGRA controller and the data memory. The
// Configuration RAM holds three example kernels (tb_kernels_pkg): 3x+5 on one
// column, a running sum on two columns using east/west links, and |x| on one
// column. Round 1 runs all three at once for three different cores on
// columns 0, 1-2 and 3; round 2 runs the running sum again on columns 2-3
// the scale kernel on column 0 (registers must start from zero again) and
// the one-step pipelined increment on column 1.
// The data memory grants each channel at random, so the kernels stall. Checks:
// the output buffers equal the reference results, nothing is written past
// them, each core gets exactly one completion per kernel, kernels overlapped
// in time and stalls happened.
module tb_cgra;
  import cgra_pkg::*;
  import tb_kernels_pkg::*;
  localparam int NCH = 8;

  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, loading;
  accel_req_t req;
  logic [9:0] cram_addr;
  logic [31:0] cram_rdata;
  logic [NCH-1:0] ch_done;
  logic [3:0] col_active, col_stall;
  logic  m_req [NCH], m_we [NCH], m_gnt [NCH], m_rvalid [NCH];
  addr_t m_addr [NCH];
  word_t m_wdata [NCH], m_rdata [NCH];
  int checks = 0, failures = 0;

  cgra dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  logic [31:0] cram [1024];
  word_t mem [4096];
  int dones [NCH];
  int stalls = 0, overlap = 0;

  always @(posedge clk) cram_rdata <= cram[cram_addr];

  // data memory: random grants per channel, one-cycle reads
  always @(negedge clk) for (int k = 0; k < NCH; k++) m_gnt[k] = m_req[k] && ($urandom_range(0, 9) < 5);
  always @(posedge clk) begin
    for (int k = 0; k < NCH; k++) begin
      m_rvalid[k] <= m_req[k] && m_gnt[k] && !m_we[k];
      if (m_req[k] && m_gnt[k] && !m_we[k]) m_rdata[k] <= mem[m_addr[k][11:0]];
      if (m_req[k] && m_gnt[k] && m_we[k]) mem[m_addr[k][11:0]] <= m_wdata[k];
    end
    for (int k = 0; k < NCH; k++) if (rst_n && ch_done[k]) dones[k]++;
    if (col_stall != 0) stalls++;
    if ($countones(col_active) > 1 && col_active[0] && col_active[3]) overlap++;
  end

  task automatic issue(int core, int kid, int col0, int in_a, int out_a, int n);
    logic [31:0] q[$];
    int nc, ln;
    kernel(kid, q, nc, ln);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1;
    req = '0;
    req.core = 4'(core);
    req.hdr = kernel_hdr_t'(cram[kid]);
    req.col_start = 4'(col0);
    req.prm = '{in_addr: addr_t'(in_a), in_len: word_t'(n), out_addr: addr_t'(out_a),
                out_len: word_t'(n), iters: word_t'(n)};
    @(negedge clk);
    req_valid = 0;
  endtask

  task automatic verify(int kid, int in_a, int out_a, int n, string name);
    word_t x[$], y[$];
    for (int i = 0; i < n; i++) x.push_back(mem[in_a + i]);
    expect_out(kid, x, y);
    for (int i = 0; i < n; i++)
      chk(mem[out_a + i] == y[i], $sformatf("%s output %0d: %h expected %h", name, i, mem[out_a + i], y[i]));
    chk(mem[out_a + n] == 16'hdead, $sformatf("%s: nothing past the buffer", name));
  endtask

  initial begin
    logic [31:0] img[$];
    cram_image(img);
    for (int i = 0; i < 1024; i++) cram[i] = (i < img.size()) ? img[i] : '0;
    for (int i = 0; i < 4096; i++) mem[i] = (i < 2048) ? 16'($urandom_range(0, 2000) - 1000) : 16'hdead;
    for (int k = 0; k < NCH; k++) begin m_gnt[k] = 0; m_rvalid[k] = 0; m_rdata[k] = 0; dones[k] = 0; end
    req_valid = 0; req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // round 1: three kernels side by side
    issue(0, 0, 0, 0,   2048, 24);
    issue(5, 1, 1, 100, 2200, 30);
    issue(7, 2, 3, 200, 2400, 17);
    wait (dones[0] == 1 && dones[5] == 1 && dones[7] == 1);
    @(negedge clk);
    verify(0, 0, 2048, 24, "scale");
    verify(1, 100, 2200, 30, "prefix");
    verify(2, 200, 2400, 17, "absval");
    chk(col_active == '0, "all columns idle");
    // round 2: prefix on columns 2-3, scale on column 0
    issue(3, 1, 2, 300, 2600, 40);
    issue(1, 0, 0, 400, 2800, 9);
    issue(6, 3, 1, 500, 3000, 25);
    wait (dones[3] == 1 && dones[1] == 1 && dones[6] == 1);
    @(negedge clk);
    verify(1, 300, 2600, 40, "prefix again");
    verify(0, 400, 2800, 9, "scale again");
    verify(3, 500, 3000, 25, "incr");
    for (int k = 0; k < NCH; k++)
      chk(dones[k] == ((k == 0 || k == 5 || k == 7 || k == 3 || k == 1 || k == 6) ? 1 : 0), "one completion per kernel");
    chk(stalls > 0, "stream stalls happened");
    chk(overlap > 0, "kernels executed concurrently");
    $display("stalls=%0d overlap=%0d", stalls, overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
