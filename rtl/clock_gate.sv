// clock_gate: latch-based integrated clock gate, one per core.
//
// The enable is captured by a latch that is transparent while the clock is
// low, and the clock is ANDed with the latched enable, so a change of en
// during the high phase cannot cut a clock pulse short. test_en forces the
// clock on (scan). clk_o follows clk_i while the latched enable is high and
// stays low otherwise; an enable change takes effect at the next rising edge.
//
// The document says that processors are individually clock-gated by the
// synchronizer; the gate itself is the standard latch-and-AND cell. The latch
// is intended: it is what makes the gated clock glitch free.
module clock_gate (
  input  logic clk_i,
  input  logic en,
  input  logic test_en,
  output logic clk_o
);
  logic en_l;

  always_latch begin
    if (!clk_i) en_l = en || test_en;
  end

  assign clk_o = clk_i && en_l;
endmodule
