// config_ram: the CGRA's dedicated Configuration RAM.
//
// DEPTH words of WIDTH bits with one write port (used to load kernels before
// they are requested) and two synchronous read ports: port A serves the CGRA
// controller, which reads the header of the kernel at the head of its request
// queue, port B serves the CGRA's configuration loader. Address k (k below the
// number of kernels) holds the header of kernel k (kernel_hdr_t: base address
// of the kernel's words, number of columns, schedule length); the kernels'
// configuration words follow anywhere above.
//
// Timing: read data appear one cycle after the address.
//
// The document names the Configuration RAM and says it stores the kernels'
// configuration words; its size, ports and layout are this design's choices.
module config_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr_a,
  output logic [WIDTH-1:0] rdata_a,
  input  logic [AW-1:0]    raddr_b,
  output logic [WIDTH-1:0] rdata_b
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata_a <= mem[raddr_a];
    rdata_b <= mem[raddr_b];
  end
endmodule
