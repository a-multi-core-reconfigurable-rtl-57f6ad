// mem_bank: one bank of the multi-banked instruction or data memory.
//
// A single-port synchronous SRAM of DEPTH words of WIDTH bits, written as an
// array. A request with we writes wdata at addr; a request without we reads,
// and the word appears on rdata in the next cycle (and stays until the next
// read). The platform uses 8 such banks for instructions and 16 for data,
// each behind a combinational crossbar; the bank size and word widths are
// this design's choices.
module mem_bank #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             req,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (req) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
