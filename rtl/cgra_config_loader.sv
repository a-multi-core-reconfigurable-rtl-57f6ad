// cgra_config_loader: programs a kernel into its assigned CGRA columns.
//
// The CGRA controller hands over one granted request at a time (req_valid /
// req_ready; ready only while idle, so a single kernel is configured at a
// time). The loader pulses accept, then walks the kernel's configuration
// words in the Configuration RAM, starting at hdr.base, in the order
//   for each column c < ncols, for each step s < len:
//     column control word, then one cell word for each row 0 .. ROWS-1
// and writes each into column col_start + c: cfg_row = 0 addresses the
// column PC's control store, cfg_row = r + 1 the cell in row r. When the last
// word is written it pulses launch, which starts the columns' PCs.
//
// Timing: one word per cycle; the Configuration RAM answers one cycle after
// the address, so the write of a word happens one cycle after it is
// addressed. Configuring a kernel takes ncols * len * (ROWS + 1) + 2 cycles
// from acceptance to launch.
//
// Follows the document: the CGRA fetches the configuration words itself from
// the Configuration RAM and programs the assigned columns, one kernel at a
// time while other kernels keep executing. The word layout is this design's.
module cgra_config_loader
  import cgra_pkg::*;
#(
  parameter int unsigned ROWS      = 4,
  parameter int unsigned COLS      = 4,
  parameter int unsigned CFG_DEPTH = 16,
  parameter int unsigned CRAM_AW   = 10,
  localparam int unsigned PCW = $clog2(CFG_DEPTH),
  localparam int unsigned RW  = $clog2(ROWS + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req_valid,
  input  accel_req_t         req,
  output logic               req_ready,
  output logic               accept,
  output accel_req_t         cur,
  // Configuration RAM read port
  output logic [CRAM_AW-1:0] cram_addr,
  input  logic [CFG_W-1:0]   cram_rdata,
  // configuration write bus towards columns and cells
  output logic               cfg_we,
  output logic [COL_W-1:0]   cfg_col,
  output logic [RW-1:0]      cfg_row,
  output logic [PCW-1:0]     cfg_step,
  output logic [CFG_W-1:0]   cfg_data,
  output logic               launch
);
  typedef enum logic [1:0] {IDLE, FETCH, LAST} state_e;
  state_e state;

  logic [COL_W-1:0]   c;
  logic [PCW-1:0]     s;
  logic [RW-1:0]      r;
  logic [CRAM_AW-1:0] addr;
  logic               wv;
  logic [COL_W-1:0]   wc;
  logic [PCW-1:0]     ws;
  logic [RW-1:0]      wr;
  logic               last_word;

  assign req_ready = (state == IDLE);
  assign accept    = req_valid && req_ready;
  assign cram_addr = addr;
  assign last_word = (r == RW'(ROWS)) && (s == PCW'(cur.hdr.len - 8'd1)) &&
                     (c == cur.hdr.ncols - 4'd1);

  assign cfg_we   = wv;
  assign cfg_col  = cur.col_start + wc;
  assign cfg_row  = wr;
  assign cfg_step = ws;
  assign cfg_data = cram_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      cur    <= '0;
      c      <= '0;
      s      <= '0;
      r      <= '0;
      addr   <= '0;
      wv     <= 1'b0;
      wc     <= '0;
      ws     <= '0;
      wr     <= '0;
      launch <= 1'b0;
    end else begin
      launch <= 1'b0;
      wv     <= 1'b0;
      unique case (state)
        IDLE: if (accept) begin
          cur   <= req;
          addr  <= CRAM_AW'(req.hdr.base);
          c     <= '0;
          s     <= '0;
          r     <= '0;
          state <= FETCH;
        end
        FETCH: begin
          // the word addressed now is written next cycle
          wv   <= 1'b1;
          wc   <= c;
          ws   <= s;
          wr   <= r;
          addr <= addr + 1'b1;
          if (last_word) begin
            state <= LAST;
          end else if (r == RW'(ROWS)) begin
            r <= '0;
            if (s == PCW'(cur.hdr.len - 8'd1)) begin
              s <= '0;
              c <= c + 1'b1;
            end else begin
              s <= s + 1'b1;
            end
          end else begin
            r <= r + 1'b1;
          end
        end
        LAST: begin
          launch <= 1'b1;
          state  <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  a_fits: assert property (@(posedge clk) disable iff (!rst_n)
    accept |-> (req.hdr.ncols != 0 && 32'(req.col_start) + 32'(req.hdr.ncols) <= COLS &&
                req.hdr.len != 0 && 32'(req.hdr.len) <= CFG_DEPTH));
endmodule
