// tb_clock_gate: self-checking test of the clock gate.
//
// Counts gated clock edges for random enable patterns (enable changed while
// the clock is high, mid-cycle) and checks that exactly the cycles whose
// enable was set when the clock rose are passed, that test_en forces the
// clock on and that no pulse is shorter than the clock's high phase.
module tb_clock_gate;
  logic clk_i = 0, en = 0, test_en = 0, clk_o;
  int checks = 0, failures = 0;
  int edges = 0, expected = 0;
  realtime t_rise;

  clock_gate dut (.*);

  always #5 clk_i = ~clk_i;

  always @(posedge clk_o) begin
    edges++;
    t_rise = $realtime;
  end
  always @(negedge clk_o) begin
    checks++;
    if (edges > 0 && $realtime - t_rise < 4.9) begin
      failures++;
      $display("FAIL glitch at %t", $realtime);
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk_i);
    for (int i = 0; i < 2000; i++) begin
      // change enables in the low phase and sometimes again in the high phase
      @(negedge clk_i);
      #1;
      en = 1'($urandom);
      test_en = ($urandom_range(0, 9) == 0);
      if (en || test_en) expected++;
      @(posedge clk_i);
      #2;
      if ($urandom_range(0, 1) == 1) en = !en;  // must not affect this pulse
    end
    @(negedge clk_i);
    en = 0; test_en = 0;
    repeat (3) @(posedge clk_i);
    checks++;
    if (edges != expected) begin
      failures++;
      $display("FAIL %0d gated edges, expected %0d", edges, expected);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
