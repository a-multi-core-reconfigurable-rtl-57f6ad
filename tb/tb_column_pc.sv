// tb_column_pc: self-checking test of the column program counter.
//
// Writes control words, starts a schedule of len steps repeated iters times
// under random stalls and checks: pc follows 0..len-1 cyclically and only
// advances on non-stalled cycles, ctl shows the word of the current step,
// last pulses exactly in the final enabled cycle, active drops right after,
// and the kernel takes exactly len*iters enabled cycles.
module tb_column_pc;
  import cgra_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cfg_we, start, stall, active, en, last;
  logic [3:0] cfg_addr, pc;
  col_cfg_t cfg_data, ctl;
  logic [7:0] len;
  word_t iters;
  int checks = 0, failures = 0;
  col_cfg_t words [16];

  column_pc #(.CFG_DEPTH(16)) dut (.*);

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

  task automatic run(int l, int it);
    int en_cycles, exp_pc, exp_iter, lasts;
    @(negedge clk);
    start = 1; len = 8'(l); iters = word_t'(it);
    @(negedge clk);
    start = 0;
    en_cycles = 0; exp_pc = 0; exp_iter = 0; lasts = 0;
    while (active) begin
      stall = ($urandom_range(0, 3) == 0);
      #1;
      chk(pc == 4'(exp_pc), $sformatf("pc %0d expected %0d", pc, exp_pc));
      chk(ctl == words[exp_pc], "ctl word");
      chk(en == !stall, "en");
      chk(last == (!stall && exp_pc == l - 1 && exp_iter == it - 1), "last");
      if (last) lasts++;
      @(negedge clk);
      if (!stall) begin
        en_cycles++;
        exp_pc++;
        if (exp_pc == l) begin exp_pc = 0; exp_iter++; end
      end
    end
    stall = 0;
    chk(en_cycles == l * it, $sformatf("enabled cycles %0d expected %0d", en_cycles, l * it));
    chk(lasts == 1, "one last pulse");
  endtask

  initial begin
    cfg_we = 0; start = 0; stall = 0; cfg_addr = 0; cfg_data = '0; len = 0; iters = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 16; k++) begin
      words[k] = col_cfg_t'($urandom);
      @(negedge clk);
      cfg_we = 1; cfg_addr = 4'(k); cfg_data = words[k];
    end
    @(negedge clk);
    cfg_we = 0;
    run(3, 4);
    run(1, 5);
    run(16, 2);
    run(7, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
