// tb_synchronizer: self-checking test of the synchronizer (4 cores here).
//
// Directed scenarios: a barrier over all cores (counter raised to 4, each
// core decrements then sleeps, the last decrement releases everybody), a
// producer/consumer hand-over, a sleep on a zero counter (no gating), and
// ACCEL gating released by accel_done. The testbench only issues
// instructions for cores whose clock is enabled, as real cores would.
module tb_synchronizer;
  import cgra_pkg::*;
  localparam int N = 4, P = 4;

  logic clk = 0, rst_n = 0;
  logic     sync_valid [N], accel_issue [N], accel_done [N];
  sync_op_e sync_op [N];
  logic [1:0] sync_pt [N];
  logic     clk_en [N], sleeping [N], accel_wait [N];
  logic [3:0] count [P];
  int checks = 0, failures = 0;

  synchronizer #(.N_CORES(N), .N_POINTS(P)) dut (.*);

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

  task automatic idle();
    for (int i = 0; i < N; i++) begin
      sync_valid[i] = 0; accel_issue[i] = 0; accel_done[i] = 0;
      sync_op[i] = SYNC_NOP; sync_pt[i] = 0;
    end
  endtask

  task automatic op(int core, sync_op_e o, int pt);
    @(negedge clk);
    idle();
    chk(clk_en[core], $sformatf("core %0d issues only when clocked", core));
    sync_valid[core] = 1; sync_op[core] = o; sync_pt[core] = 2'(pt);
    @(negedge clk);
    idle();
  endtask

  initial begin
    idle();
    repeat (2) @(posedge clk);
    rst_n = 1;
    // barrier on point 1
    for (int i = 0; i < N; i++) op(0, SYNC_INC, 1);
    chk(count[1] == 4, "counter raised");
    for (int i = 0; i < N - 1; i++) begin
      op(i, SYNC_DEC, 1);
      op(i, SYNC_SLEEP, 1);
      chk(!clk_en[i] && sleeping[i], $sformatf("core %0d waits at barrier", i));
    end
    op(N - 1, SYNC_DEC, 1);
    chk(count[1] == 0, "counter at zero");
    for (int i = 0; i < N; i++) chk(clk_en[i], $sformatf("core %0d released", i));
    op(N - 1, SYNC_SLEEP, 1);
    chk(clk_en[N - 1], "sleep on a zero counter does not gate");
    // producer / consumer on point 2: core 2 consumes, core 0 produces
    op(2, SYNC_INC, 2);
    op(2, SYNC_SLEEP, 2);
    repeat (5) begin
      @(negedge clk);
      chk(!clk_en[2], "consumer waits");
    end
    op(0, SYNC_DEC, 2);
    chk(clk_en[2], "consumer woken by producer");
    // simultaneous decrements from two cores on point 3
    op(1, SYNC_INC, 3);
    op(1, SYNC_INC, 3);
    op(1, SYNC_SLEEP, 3);
    @(negedge clk);
    sync_valid[0] = 1; sync_op[0] = SYNC_DEC; sync_pt[0] = 3;
    sync_valid[2] = 1; sync_op[2] = SYNC_DEC; sync_pt[2] = 3;
    @(negedge clk);
    idle();
    chk(count[3] == 0 && clk_en[1], "two decrements in one cycle");
    // ACCEL gating
    @(negedge clk);
    accel_issue[3] = 1;
    @(negedge clk);
    idle();
    repeat (10) begin
      @(negedge clk);
      chk(!clk_en[3] && accel_wait[3], "core gated during its kernel");
      chk(clk_en[0] && clk_en[1] && clk_en[2], "other cores run");
    end
    accel_done[3] = 1;
    @(negedge clk);
    idle();
    chk(clk_en[3], "core resumes after its kernel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
