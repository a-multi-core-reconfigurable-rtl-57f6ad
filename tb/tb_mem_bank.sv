// tb_mem_bank: self-checking test of a memory bank.
//
// Random mix of writes, reads and idle cycles against a reference array;
// checks the read data one cycle after the read and that rdata holds its
// value through writes and idle cycles.
module tb_mem_bank;
  logic clk = 0;
  logic req, we;
  logic [10:0] addr;
  logic [15:0] wdata, rdata, last_rd;
  logic [15:0] ref_mem [2048];
  int checks = 0, failures = 0;

  mem_bank dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = 0; we = 0; addr = 0; wdata = 0;
    // initialise everything first
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk);
      req = 1; we = 1; addr = 11'(i); wdata = 16'($urandom);
      ref_mem[i] = wdata;
    end
    @(negedge clk);
    req = 1; we = 0; addr = 0;
    @(posedge clk);
    #1 last_rd = rdata;
    for (int i = 0; i < 10000; i++) begin
      int kind;
      @(negedge clk);
      kind = $urandom_range(0, 2);
      req = (kind != 2); we = (kind == 0);
      addr = (i % 7 == 0) ? 11'(i % 16) : 11'($urandom);
      wdata = 16'($urandom);
      @(posedge clk);
      if (req && we) ref_mem[addr] = wdata;
      else if (req) last_rd = ref_mem[addr];
      #1;
      checks++;
      if (rdata !== last_rd) begin
        failures++;
        $display("FAIL cycle %0d rdata %h expected %h", i, rdata, last_rd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
