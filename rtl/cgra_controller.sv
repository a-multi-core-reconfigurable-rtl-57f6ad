// cgra_controller: arbitrates the cores' acceleration requests for the shared
// CGRA.
//
// Each core has a set of memory-mapped kernel parameter registers (input
// address and length, output address and length, loop iterations), written
// and read through reg_* before the core issues ACCEL #kid. An ACCEL is held
// as pending for its core and moved into the request queue, one per cycle,
// lowest core first. The request at the head of the queue is served in
// order: its kernel header (number of columns, schedule length, address of
// the configuration words) is read from the Configuration RAM, and as soon as
// that many adjacent columns are free and the CGRA can accept a kernel for
// configuration, the request is sent to the CGRA together with the first
// column and the core's parameters, the columns are marked busy and the head
// is removed. When the CGRA reports a core's kernel finished (ch_done), the
// columns owned by that core are freed and accel_done tells the synchronizer
// to wake the core.
//
// Timing: an idle controller sends a request 3 cycles after ACCEL if
// resources are free (1 to enqueue, 1 to read the header, 1 to map). A request
// waits in the queue while its columns are taken; the queue keeps arrival
// order, so a large kernel at the head holds back smaller ones behind it.
//
// The document gives the request queue, the mapping "when enough resources
// are available" and the memory-mapped parameters. First-come first-served
// order, adjacency of columns and the register map are this design's choices.
module cgra_controller
  import cgra_pkg::*;
#(
  parameter int unsigned N_CORES = 8,
  parameter int unsigned COLS    = 4,
  parameter int unsigned CRAM_AW = 10,
  localparam int unsigned QW = CORE_W + 8,
  localparam int unsigned IW = (N_CORES > 1) ? $clog2(N_CORES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // memory-mapped parameter registers, one set per core
  input  logic               reg_we    [N_CORES],
  input  logic [2:0]         reg_addr  [N_CORES],
  input  word_t              reg_wdata [N_CORES],
  output word_t              reg_rdata [N_CORES],
  // ACCEL #kid
  input  logic               accel_valid[N_CORES],
  input  logic [7:0]         accel_kid  [N_CORES],
  // Configuration RAM read port (kernel headers)
  output logic [CRAM_AW-1:0] cram_addr,
  input  logic [CFG_W-1:0]   cram_rdata,
  // towards the CGRA
  output logic               req_valid,
  output accel_req_t         req,
  input  logic               req_ready,
  input  logic [N_CORES-1:0] ch_done,
  // towards the synchronizer
  output logic               accel_done [N_CORES],
  // status
  output logic [COLS-1:0]    col_busy,
  output logic               q_empty
);
  kparam_t             prm  [N_CORES];
  logic                pend [N_CORES];
  logic [7:0]          pkid [N_CORES];
  logic [CORE_W-1:0]   col_owner [COLS];

  // ---------------- parameter registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prm <= '{default: '0};
    end else begin
      for (int i = 0; i < N_CORES; i++) begin
        if (reg_we[i]) begin
          unique case (int'(reg_addr[i]))
            REG_IN_ADDR:  prm[i].in_addr  <= reg_wdata[i];
            REG_IN_LEN:   prm[i].in_len   <= reg_wdata[i];
            REG_OUT_ADDR: prm[i].out_addr <= reg_wdata[i];
            REG_OUT_LEN:  prm[i].out_len  <= reg_wdata[i];
            REG_ITERS:    prm[i].iters    <= reg_wdata[i];
            default: ;
          endcase
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N_CORES; i++) begin
      unique case (int'(reg_addr[i]))
        REG_IN_ADDR:  reg_rdata[i] = prm[i].in_addr;
        REG_IN_LEN:   reg_rdata[i] = prm[i].in_len;
        REG_OUT_ADDR: reg_rdata[i] = prm[i].out_addr;
        REG_OUT_LEN:  reg_rdata[i] = prm[i].out_len;
        REG_ITERS:    reg_rdata[i] = prm[i].iters;
        default:      reg_rdata[i] = '0;
      endcase
    end
  end

  // ---------------- request queue ----------------
  logic          q_push, q_pop, q_full;
  logic [QW-1:0] q_wdata, q_rdata;
  logic [CORE_W-1:0] pick;
  logic [$clog2(N_CORES+1)-1:0] q_count;

  always_comb begin
    q_push = 1'b0;
    pick   = '0;
    for (int i = N_CORES - 1; i >= 0; i--) begin
      if (pend[i]) begin
        q_push = 1'b1;
        pick   = CORE_W'(i);
      end
    end
    q_push  = q_push && !q_full;
    q_wdata = {pick, pkid[pick[IW-1:0]]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= '{default: 1'b0};
      pkid <= '{default: '0};
    end else begin
      for (int i = 0; i < N_CORES; i++) begin
        if (q_push && int'(pick) == i) pend[i] <= 1'b0;
        if (accel_valid[i]) begin
          pend[i] <= 1'b1;
          pkid[i] <= accel_kid[i];
        end
      end
    end
  end

  sync_fifo #(.WIDTH(QW), .DEPTH(N_CORES)) u_q (
    .clk, .rst_n, .clr(1'b0), .push(q_push), .wdata(q_wdata), .pop(q_pop),
    .rdata(q_rdata), .empty(q_empty), .full(q_full), .count(q_count));

  // ---------------- mapping ----------------
  typedef enum logic [1:0] {S_IDLE, S_HDR, S_MAP} state_e;
  state_e state;
  kernel_hdr_t hdr;
  logic [CORE_W-1:0] h_core;
  logic              fit;
  logic [COL_W-1:0]  fit_col;
  logic [COLS-1:0]   fit_mask;

  assign h_core    = q_rdata[QW-1:8];
  assign cram_addr = CRAM_AW'(q_rdata[7:0]);
  assign hdr       = kernel_hdr_t'(cram_rdata);

  // first group of hdr.ncols adjacent free columns
  always_comb begin
    fit      = 1'b0;
    fit_col  = '0;
    fit_mask = '0;
    for (int c = COLS - 1; c >= 0; c--) begin
      logic [COLS-1:0] m;
      m = '0;
      for (int j = 0; j < COLS; j++) begin
        if (j >= c && j < c + int'(hdr.ncols)) m[j] = 1'b1;
      end
      if (hdr.ncols != 0 && c + int'(hdr.ncols) <= COLS && (m & col_busy) == '0) begin
        fit      = 1'b1;
        fit_col  = COL_W'(c);
        fit_mask = m;
      end
    end
  end

  assign req_valid = (state == S_MAP) && fit;
  assign req.core      = h_core;
  assign req.hdr       = hdr;
  assign req.col_start = fit_col;
  assign req.prm       = prm[h_core[IW-1:0]];
  assign q_pop         = req_valid && req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      col_busy   <= '0;
      col_owner  <= '{default: '0};
      accel_done <= '{default: 1'b0};
    end else begin
      unique case (state)
        S_IDLE: if (!q_empty) state <= S_HDR;
        S_HDR:  state <= S_MAP;
        S_MAP:  if (q_pop) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
      for (int i = 0; i < N_CORES; i++) accel_done[i] <= ch_done[i];
      for (int c = 0; c < COLS; c++) begin
        if (col_busy[c] && ch_done[col_owner[c][IW-1:0]]) col_busy[c] <= 1'b0;
        if (q_pop && fit_mask[c]) begin
          col_busy[c]  <= 1'b1;
          col_owner[c] <= h_core;
        end
      end
    end
  end

  a_hdr_sane: assert property (@(posedge clk) disable iff (!rst_n)
                               state == S_MAP |-> hdr.ncols != 0 && 32'(hdr.ncols) <= COLS);
endmodule
