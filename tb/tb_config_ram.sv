// tb_config_ram: self-checking test of the Configuration RAM.
//
// Writes random words at random addresses, keeping a reference copy, and
// reads them back through both read ports at once, checking the one-cycle
// read latency.
module tb_config_ram;
  logic clk = 0;
  logic we;
  logic [9:0] waddr, raddr_a, raddr_b;
  logic [31:0] wdata, rdata_a, rdata_b;
  logic [31:0] ref_mem [1024];
  logic        known [1024];
  int checks = 0, failures = 0;

  config_ram dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr_a = 0; raddr_b = 0;
    for (int i = 0; i < 1024; i++) known[i] = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1; waddr = 10'($urandom); wdata = $urandom;
      ref_mem[waddr] = wdata; known[waddr] = 1;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 2000; i++) begin
      logic [9:0] a, b;
      @(negedge clk);
      a = 10'($urandom); b = 10'($urandom);
      raddr_a = a; raddr_b = b;
      @(posedge clk);
      #1;
      if (known[a]) begin
        checks++;
        if (rdata_a !== ref_mem[a]) begin failures++; $display("FAIL A %h", a); end
      end
      if (known[b]) begin
        checks++;
        if (rdata_b !== ref_mem[b]) begin failures++; $display("FAIL B %h", b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
