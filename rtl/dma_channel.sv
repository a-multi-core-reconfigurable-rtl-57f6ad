// dma_channel: one channel of the CGRA's multi-channel DMA engine.
//
// Each core owns one channel, and the channel reaches the data memory through
// that core's own crossbar port, which is free while the core is clock-gated
// waiting for its kernel. On start the channel takes the kernel parameters
// (input address/length, output address/length) and begins prefetching the
// input stream into an input FIFO, keeping at most FIFO_DEPTH words in flight
// or buffered. The kernel's leader column consumes words with in_pop and
// emits results with out_push into an output FIFO, which the channel drains
// to memory at consecutive addresses; output writes have priority over input
// reads. Words pushed beyond out_len are dropped, and once the input stream
// is exhausted in_data reads as 0 without stalling. After exec_done (the
// kernel's last iteration) the channel stops reading, empties the output
// FIFO, waits for outstanding reads, and pulses done.
//
// Interface timing: the memory port is a request/grant port with the grant in
// the same cycle and read data one cycle after the grant (m_rvalid).
// in_wait tells the mesh that a pop now would have to stall because the next
// input word has not arrived yet; out_full does the same for pushes.
//
// Follows the document: the DMA stores the kernel outputs into the system data
// memory and uses the memory ports of the requesting processors. FIFOs,
// priorities and the stall protocol are this design's choices.
module dma_channel
  import cgra_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  kparam_t prm,
  input  logic    exec_done,
  output logic    busy,
  output logic    done,
  // stream side (CGRA mesh)
  input  logic    in_pop,
  output word_t   in_data,
  output logic    in_wait,
  input  logic    out_push,
  input  word_t   out_data,
  output logic    out_full,
  // memory side (the owning core's data crossbar port)
  output logic    m_req,
  output logic    m_we,
  output addr_t   m_addr,
  output word_t   m_wdata,
  input  logic    m_gnt,
  input  word_t   m_rdata,
  input  logic    m_rvalid
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH+1);

  addr_t rd_addr, wr_addr;
  word_t rd_left, wr_left;
  logic [CW:0] outst;
  logic  fin;
  logic  in_empty, in_full, out_empty, out_full_i;
  logic [CW-1:0] in_cnt, out_cnt;
  word_t in_head, out_head;
  logic  wr_sel, rd_sel, wr_fire, rd_fire, drop;

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_in (
    .clk, .rst_n, .clr(start), .push(m_rvalid), .wdata(m_rdata),
    .pop(in_pop && !in_empty), .rdata(in_head), .empty(in_empty), .full(in_full),
    .count(in_cnt));

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_out (
    .clk, .rst_n, .clr(start), .push(out_push), .wdata(out_data),
    .pop(wr_fire || drop), .rdata(out_head), .empty(out_empty), .full(out_full_i),
    .count(out_cnt));

  assign in_data  = in_empty ? '0 : in_head;
  assign in_wait  = in_empty && (rd_left != 0 || outst != 0);
  assign out_full = out_full_i;

  // Output words beyond the requested length are discarded.
  assign drop   = busy && !out_empty && (wr_left == 0);
  assign wr_sel = busy && !out_empty && (wr_left != 0);
  assign rd_sel = busy && !wr_sel && !fin && (rd_left != 0) &&
                  ((CW+1)'(in_cnt) + outst < (CW+1)'(FIFO_DEPTH));

  assign m_req   = wr_sel || rd_sel;
  assign m_we    = wr_sel;
  assign m_addr  = wr_sel ? wr_addr : rd_addr;
  assign m_wdata = out_head;
  assign wr_fire = wr_sel && m_gnt;
  assign rd_fire = rd_sel && m_gnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      fin     <= 1'b0;
      rd_addr <= '0;
      wr_addr <= '0;
      rd_left <= '0;
      wr_left <= '0;
      outst   <= '0;
    end else begin
      done  <= 1'b0;
      outst <= outst + (rd_fire ? (CW+1)'(1) : '0) - (m_rvalid ? (CW+1)'(1) : '0);
      if (start) begin
        busy    <= 1'b1;
        fin     <= 1'b0;
        rd_addr <= prm.in_addr;
        rd_left <= prm.in_len;
        wr_addr <= prm.out_addr;
        wr_left <= prm.out_len;
      end else begin
        if (exec_done) fin <= 1'b1;
        if (rd_fire) begin
          rd_addr <= rd_addr + 1'b1;
          rd_left <= rd_left - 1'b1;
        end
        if (wr_fire) begin
          wr_addr <= wr_addr + 1'b1;
          wr_left <= wr_left - 1'b1;
        end
        if (busy && fin && out_empty && outst == 0 && !m_rvalid) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  a_rvalid_expected: assert property (@(posedge clk) disable iff (!rst_n)
                                      m_rvalid |-> outst != 0);
  a_no_start_busy:   assert property (@(posedge clk) disable iff (!rst_n)
                                      start |-> !busy);
endmodule
