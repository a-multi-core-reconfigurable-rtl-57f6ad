// xbar: combinational crossbar between N_M masters (cores) and N_B
// word-interleaved memory banks.
//
// The low log2(N_B) bits of a master's word address select the bank and the
// remaining bits the word inside it, so consecutive words lie in different
// banks. Each bank has its own round-robin arbiter: the requesting master
// found first from the bank's priority pointer wins, and the pointer moves
// past the winner. Masters that read the very same word as a reading winner
// are granted together with it (one bank read serves all of them, as when
// cores execute the same code in lock-step). A master that is not granted
// keeps its request and retries the next cycle.
//
// Timing: requests and grants are combinational (grant in the cycle of the
// request); read data return on m_rdata with m_rvalid one cycle after the
// grant, taken from the bank that was accessed.
//
// The document gives the crossbars as combinational, 8 cores to 8
// instruction banks and 16 data banks. Interleaving, round-robin arbitration
// and read merging are this design's choices.
module xbar #(
  parameter int unsigned N_M = 8,
  parameter int unsigned N_B = 16,
  parameter int unsigned AW  = 15,
  parameter int unsigned DW  = 16,
  localparam int unsigned BW  = $clog2(N_B),
  localparam int unsigned BAW = AW - BW,
  localparam int unsigned MW  = (N_M > 1) ? $clog2(N_M) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // master side
  input  logic           m_req   [N_M],
  input  logic           m_we    [N_M],
  input  logic [AW-1:0]  m_addr  [N_M],
  input  logic [DW-1:0]  m_wdata [N_M],
  output logic           m_gnt   [N_M],
  output logic [DW-1:0]  m_rdata [N_M],
  output logic           m_rvalid[N_M],
  // bank side
  output logic           b_req   [N_B],
  output logic           b_we    [N_B],
  output logic [BAW-1:0] b_addr  [N_B],
  output logic [DW-1:0]  b_wdata [N_B],
  input  logic [DW-1:0]  b_rdata [N_B]
);
  logic [MW-1:0] rr   [N_B];
  logic [MW-1:0] win  [N_B];
  logic          any  [N_B];
  logic [BW-1:0] bsel [N_M];
  logic [BW-1:0] rbank[N_M];

  for (genvar i = 0; i < N_M; i++) begin : g_bsel
    assign bsel[i] = m_addr[i][BW-1:0];
  end

  always_comb begin
    for (int i = 0; i < N_M; i++) m_gnt[i] = 1'b0;
    for (int b = 0; b < N_B; b++) begin
      any[b] = 1'b0;
      win[b] = '0;
      // round-robin search starting at the priority pointer
      for (int k = 0; k < N_M; k++) begin
        int unsigned i;
        i = (int'(rr[b]) + k) % N_M;
        if (!any[b] && m_req[i] && int'(bsel[i]) == b) begin
          any[b] = 1'b1;
          win[b] = MW'(i);
        end
      end
      b_req[b]   = any[b];
      b_we[b]    = any[b] && m_we[win[b]];
      b_addr[b]  = m_addr[win[b]][AW-1:BW];
      b_wdata[b] = m_wdata[win[b]];
      if (any[b]) begin
        for (int i = 0; i < N_M; i++) begin
          if (MW'(i) == win[b]) begin
            m_gnt[i] = 1'b1;
          end else if (m_req[i] && !m_we[i] && !m_we[win[b]] &&
                       m_addr[i] == m_addr[win[b]]) begin
            m_gnt[i] = 1'b1;  // same word read: served by the same access
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr       <= '{default: '0};
      rbank    <= '{default: '0};
      m_rvalid <= '{default: 1'b0};
    end else begin
      for (int b = 0; b < N_B; b++) begin
        if (any[b]) rr[b] <= (int'(win[b]) == N_M - 1) ? '0 : win[b] + 1'b1;
      end
      for (int i = 0; i < N_M; i++) begin
        m_rvalid[i] <= m_gnt[i] && !m_we[i];
        if (m_gnt[i]) rbank[i] <= bsel[i];
      end
    end
  end

  for (genvar i = 0; i < N_M; i++) begin : g_rdata
    assign m_rdata[i] = b_rdata[rbank[i]];
  end

  a_gnt_has_req: assert property (@(posedge clk) disable iff (!rst_n)
                                  m_gnt[0] |-> m_req[0]);
endmodule
