// tb_xbar: self-checking test of the crossbar (4 masters, 4 banks here).
//
// Each master issues random reads and writes, often to the same few words so
// that bank conflicts and same-word reads are frequent, and holds a request
// until granted. The banks are modelled in the testbench. Checks: read data
// equal a reference memory updated in grant order; a bank never receives two
// different accesses in one cycle; grants only go to requesting masters;
// round-robin fairness (no master waits more than N_M cycles); and that
// conflicts and merged same-word reads both occurred.
module tb_xbar;
  localparam int NM = 4, NB = 4, AW = 6, DW = 16;

  logic clk = 0, rst_n = 0;
  logic          m_req [NM], m_we [NM], m_gnt [NM], m_rvalid [NM];
  logic [AW-1:0] m_addr [NM];
  logic [DW-1:0] m_wdata [NM], m_rdata [NM];
  logic          b_req [NB], b_we [NB];
  logic [AW-3:0] b_addr [NB];
  logic [DW-1:0] b_wdata [NB], b_rdata [NB];
  int checks = 0, failures = 0;

  xbar #(.N_M(NM), .N_B(NB), .AW(AW), .DW(DW)) dut (.*);

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

  logic [DW-1:0] bank [NB][16];
  logic [DW-1:0] refm [64];
  logic [DW-1:0] exp_rd [NM];
  logic          exp_rv [NM];
  int            wait_c [NM];
  logic          was_gnt [NM];
  int conflicts = 0, merges = 0;

  always @(posedge clk) begin
    for (int b = 0; b < NB; b++) begin
      if (b_req[b]) begin
        if (b_we[b]) bank[b][b_addr[b]] <= b_wdata[b];
        else         b_rdata[b] <= bank[b][b_addr[b]];
      end
    end
  end

  initial begin
    for (int b = 0; b < NB; b++)
      for (int w = 0; w < 16; w++) begin
        bank[b][w] = 16'($urandom);
        refm[w * NB + b] = bank[b][w];
      end
    for (int i = 0; i < NM; i++) begin
      m_req[i] = 0; m_we[i] = 0; m_addr[i] = 0; m_wdata[i] = 0;
      exp_rv[i] = 0; wait_c[i] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      int granted_word [NB];
      int granted_we [NB];
      int n_req [NB];
      @(negedge clk);
      // check read data of the previous cycle's grants
      for (int i = 0; i < NM; i++) begin
        chk(m_rvalid[i] == exp_rv[i], "rvalid");
        if (exp_rv[i]) chk(m_rdata[i] == exp_rd[i], $sformatf("read data master %0d", i));
      end
      // new requests for idle masters
      for (int i = 0; i < NM; i++) begin
        if (!m_req[i] && $urandom_range(0, 3) != 0) begin
          m_req[i]   = 1;
          m_we[i]    = ($urandom_range(0, 3) == 0);
          m_addr[i]  = (t % 3 == 0) ? AW'($urandom_range(0, 7)) : AW'($urandom);
          m_wdata[i] = 16'($urandom);
        end
      end
      #1;
      for (int b = 0; b < NB; b++) begin granted_word[b] = -1; granted_we[b] = 0; n_req[b] = 0; end
      for (int i = 0; i < NM; i++) begin
        exp_rv[i] = 0;
        if (m_req[i]) n_req[m_addr[i] % NB]++;
        if (m_gnt[i]) begin
          int b;
          chk(m_req[i], "grant without request");
          b = m_addr[i] % NB;
          if (granted_word[b] >= 0) begin
            chk(granted_word[b] == int'(m_addr[i]) && !granted_we[b] && !m_we[i],
                "one access per bank");
            merges++;
          end
          granted_word[b] = int'(m_addr[i]);
          granted_we[b]   = m_we[i];
          if (!m_we[i]) begin exp_rv[i] = 1; exp_rd[i] = refm[m_addr[i]]; end
        end
      end
      for (int i = 0; i < NM; i++) was_gnt[i] = m_gnt[i];
      for (int b = 0; b < NB; b++) if (n_req[b] > 1) conflicts++;
      for (int i = 0; i < NM; i++) begin
        if (m_gnt[i] && m_we[i]) refm[m_addr[i]] = m_wdata[i];
        if (m_req[i] && !m_gnt[i]) begin
          wait_c[i]++;
          chk(wait_c[i] < NM, $sformatf("master %0d starved", i));
        end else begin
          wait_c[i] = 0;
        end
      end
      @(posedge clk);
      #1;
      for (int i = 0; i < NM; i++) if (was_gnt[i]) m_req[i] = 0;
    end
    chk(conflicts > 0, "bank conflicts happened");
    chk(merges > 0, "same-word reads merged");
    $display("conflicts=%0d merges=%0d", conflicts, merges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
