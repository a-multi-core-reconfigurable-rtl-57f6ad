// synchronizer: light-weight unit that decides, cycle by cycle, which cores
// are clocked.
//
// It keeps a counter per synchronization point. A core's synchronization
// instruction arrives as sync_valid with an operation and a point:
//   SYNC_INC   adds one to the point's counter,
//   SYNC_DEC   subtracts one,
//   SYNC_SLEEP clock-gates the core until the point's counter is zero (no
//              sleep at all if it already is, after this cycle's updates).
// All increments and decrements of one cycle are applied together. A barrier
// over n cores: the counter is raised to n once, then each core issues DEC
// followed by SLEEP; the last DEC wakes all. A producer/consumer pair: the
// consumer INCs and SLEEPs, the producer DECs when the data are ready.
// A core that issues ACCEL (accel_issue) is also gated, until the CGRA
// controller reports its kernel finished (accel_done).
//
// Timing: clk_en of a core drops in the cycle after the instruction and rises
// in the cycle after the wake-up condition; clk_en drives the core's clock
// gate. Sleeping and accelerator-waiting states are visible on sleeping and
// accel_wait.
//
// The document states that the synchronizer clock-gates cores waiting for
// another core or for a CGRA kernel and refers to earlier work for the
// synchronization instructions. The counter semantics above are this design's
// own reading of those instructions.
module synchronizer
  import cgra_pkg::*;
#(
  parameter int unsigned N_CORES  = 8,
  parameter int unsigned N_POINTS = 8,
  parameter int unsigned CNT_W    = 4,
  localparam int unsigned PTW = (N_POINTS > 1) ? $clog2(N_POINTS) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           sync_valid [N_CORES],
  input  sync_op_e       sync_op    [N_CORES],
  input  logic [PTW-1:0] sync_pt    [N_CORES],
  input  logic           accel_issue[N_CORES],
  input  logic           accel_done [N_CORES],
  output logic           clk_en     [N_CORES],
  output logic           sleeping   [N_CORES],
  output logic           accel_wait [N_CORES],
  output logic [CNT_W-1:0] count    [N_POINTS]
);
  logic [CNT_W-1:0] cnt_nx [N_POINTS];
  logic [PTW-1:0]   slp_pt [N_CORES];

  always_comb begin
    for (int p = 0; p < N_POINTS; p++) begin
      cnt_nx[p] = count[p];
      for (int i = 0; i < N_CORES; i++) begin
        if (sync_valid[i] && int'(sync_pt[i]) == p) begin
          if (sync_op[i] == SYNC_INC) cnt_nx[p] = cnt_nx[p] + 1'b1;
          if (sync_op[i] == SYNC_DEC) cnt_nx[p] = cnt_nx[p] - 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count      <= '{default: '0};
      sleeping   <= '{default: 1'b0};
      slp_pt     <= '{default: '0};
      accel_wait <= '{default: 1'b0};
    end else begin
      count <= cnt_nx;
      for (int i = 0; i < N_CORES; i++) begin
        if (sync_valid[i] && sync_op[i] == SYNC_SLEEP && !sleeping[i]) begin
          sleeping[i] <= (cnt_nx[sync_pt[i]] != 0);
          slp_pt[i]   <= sync_pt[i];
        end else if (sleeping[i] && cnt_nx[slp_pt[i]] == 0) begin
          sleeping[i] <= 1'b0;
        end
        if (accel_issue[i])     accel_wait[i] <= 1'b1;
        else if (accel_done[i]) accel_wait[i] <= 1'b0;
      end
    end
  end

  for (genvar i = 0; i < N_CORES; i++) begin : g_en
    assign clk_en[i] = !sleeping[i] && !accel_wait[i];
  end

  // A gated core cannot issue instructions.
  for (genvar i = 0; i < N_CORES; i++) begin : g_chk
    a_no_issue_gated: assert property (@(posedge clk) disable iff (!rst_n)
                                       !clk_en[i] |-> !sync_valid[i] && !accel_issue[i]);
  end
endmodule
