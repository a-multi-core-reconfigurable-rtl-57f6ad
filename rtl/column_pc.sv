// column_pc: the program counter of one CGRA column.
//
// When start is pulsed the column becomes active with a schedule of len steps
// (configuration words 0 .. len-1) to be repeated iters times, the loop body
// of a modulo-scheduled kernel. Every active cycle without stall the counter
// advances; at the last step it wraps to 0 and counts one iteration. After
// the last step of the last iteration the column drops active and pulses
// last. The column also stores one control word per step (consume an input
// stream word, emit an output word and from which row); ctl shows the word of
// the current step.
//
// Timing: pc and ctl are valid in every active cycle; en = active && !stall is
// the enable handed to the column's cells. last is high in the final enabled
// cycle.
//
// Follows the document: column-wise PCs select each cell's configuration word
// cycle by cycle. This design's own choices: the iteration counter and the
// column control word.
module column_pc
  import cgra_pkg::*;
#(
  parameter int unsigned CFG_DEPTH = 16,
  localparam int unsigned PCW = $clog2(CFG_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  // control word write port (configuration loader)
  input  logic           cfg_we,
  input  logic [PCW-1:0] cfg_addr,
  input  col_cfg_t       cfg_data,
  // kernel start
  input  logic           start,
  input  logic [7:0]     len,
  input  word_t          iters,
  input  logic           stall,
  output logic           active,
  output logic           en,
  output logic [PCW-1:0] pc,
  output col_cfg_t       ctl,
  output logic           last
);
  col_cfg_t ctl_mem [CFG_DEPTH];
  logic [PCW-1:0] last_pc;
  word_t          iter, iters_q;

  always_ff @(posedge clk) begin
    if (cfg_we) ctl_mem[cfg_addr] <= cfg_data;
  end

  assign ctl  = ctl_mem[pc];
  assign en   = active && !stall;
  assign last = en && (pc == last_pc) && (iter == iters_q - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      pc      <= '0;
      iter    <= '0;
      iters_q <= '0;
      last_pc <= '0;
    end else if (start) begin
      active  <= (iters != 0);
      pc      <= '0;
      iter    <= '0;
      iters_q <= iters;
      last_pc <= PCW'(len - 8'd1);
    end else if (en) begin
      if (pc == last_pc) begin
        pc   <= '0;
        iter <= iter + 1'b1;
        if (last) active <= 1'b0;
      end else begin
        pc <= pc + 1'b1;
      end
    end
  end

  a_len_fits: assert property (@(posedge clk) disable iff (!rst_n)
                               start |-> (len != 0 && 32'(len) <= CFG_DEPTH));
endmodule
