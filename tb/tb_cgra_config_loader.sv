// tb_cgra_config_loader: self-checking test of the configuration loader.
//
// A Configuration RAM model (one-cycle read) holds random words. Requests for
// kernels of different shapes are issued; every write on the configuration
// bus is checked against the word expected for its (column, row, step),
// every target must be written exactly once, launch must follow the last
// word, and acceptance-to-launch must take ncols*len*(ROWS+1)+2 cycles.
module tb_cgra_config_loader;
  import cgra_pkg::*;

  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, accept, cfg_we, launch;
  accel_req_t req, cur;
  logic [9:0] cram_addr;
  logic [31:0] cram_rdata, cfg_data;
  logic [3:0] cfg_col;
  logic [2:0] cfg_row;
  logic [3:0] cfg_step;
  int checks = 0, failures = 0;
  logic [31:0] cram [1024];

  cgra_config_loader #(.ROWS(4), .COLS(4), .CFG_DEPTH(16), .CRAM_AW(10)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cram_rdata <= cram[cram_addr];

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

  task automatic load(int base, int ncols, int len, int col0);
    int seen [4][5][16];
    int cycles, writes;
    foreach (seen[a, b, c]) seen[a][b][c] = 0;
    @(negedge clk);
    req_valid = 1;
    req = '0;
    req.core = 4'($urandom_range(0, 7));
    req.hdr = '{len: 8'(len), ncols: 4'(ncols), rsvd: '0, base: 16'(base)};
    req.col_start = 4'(col0);
    #1 chk(accept, "accepted when idle");
    @(negedge clk);
    req_valid = 0;
    cycles = 1; writes = 0;
    while (!launch) begin
      chk(!req_ready, "busy while loading");
      if (cfg_we) begin
        int c, r, s, idx;
        c = int'(cfg_col) - col0; r = int'(cfg_row); s = int'(cfg_step);
        idx = base + (c * len + s) * 5 + r;
        chk(c >= 0 && c < ncols, "column inside the group");
        chk(cfg_data == cram[idx], $sformatf("word col %0d row %0d step %0d", c, r, s));
        seen[c][r][s]++;
        writes++;
      end
      @(negedge clk);
      cycles++;
    end
    chk(writes == ncols * len * 5, $sformatf("writes %0d", writes));
    for (int c = 0; c < ncols; c++)
      for (int r = 0; r < 5; r++)
        for (int s = 0; s < len; s++)
          chk(seen[c][r][s] == 1, "each word written once");
    chk(cycles == ncols * len * 5 + 2, $sformatf("launch after %0d cycles", cycles));
    chk(cur.col_start == 4'(col0) && cur.hdr.ncols == 4'(ncols), "current request");
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) cram[i] = $urandom;
    req_valid = 0; req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    load(16, 1, 3, 0);
    load(100, 2, 4, 1);
    load(300, 4, 16, 0);
    load(7, 1, 1, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
