// cgra: the shared coarse-grained reconfigurable accelerator.
//
// A ROWS x COLS mesh of reconfigurable cells (rc_cell), one program counter
// per column (column_pc), a configuration loader (cgra_config_loader) and one
// DMA channel (dma_channel) per core. The CGRA controller grants a kernel
// together with the adjacent columns it may use; the loader accepts it (which
// also starts the requesting core's DMA channel prefetching the kernel's
// input), copies the kernel's configuration words from the Configuration RAM
// into those columns and then launches them. From then on the kernel's columns
// run in lock-step, each cell executing the configuration word chosen by its
// column PC, while the loader is free to configure the next kernel on other
// columns: several kernels execute concurrently on disjoint column groups.
//
// Streams: the leftmost column of a kernel (its leader) carries the control
// words that consume the input stream (the input word is visible to every cell
// of the kernel as operand IN) and emit the output of a chosen leader-column
// cell into the output stream. If an input word has not yet arrived or the
// output FIFO is full, all columns of that kernel stall for the cycle; other
// kernels are unaffected. When the last iteration ends, the channel writes
// out what is left and pulses ch_done for its core.
//
// Memory ports m_* are per channel (= per core) and follow the crossbar's
// request/grant protocol: grant in the same cycle, read data one cycle later.
//
// Follows the document: mesh of cells with neighbour connections, column-wise
// PCs, configuration fetched by the CGRA from the Configuration RAM, one kernel
// configured at a time but several executing on separate columns, multi-channel
// DMA using the requesting processors' memory ports. This design's own
// choices: mesh size, the leader-column streaming scheme, the stall rule and
// zero at the mesh edges.
module cgra
  import cgra_pkg::*;
#(
  parameter int unsigned ROWS       = 4,
  parameter int unsigned COLS       = 4,
  parameter int unsigned CFG_DEPTH  = 16,
  parameter int unsigned N_CH       = 8,
  parameter int unsigned CRAM_AW    = 10,
  parameter int unsigned FIFO_DEPTH = 4,
  localparam int unsigned PCW = $clog2(CFG_DEPTH),
  localparam int unsigned RW  = $clog2(ROWS + 1),
  localparam int unsigned CHW = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // granted kernel requests from the CGRA controller
  input  logic               req_valid,
  input  accel_req_t         req,
  output logic               req_ready,
  // Configuration RAM read port
  output logic [CRAM_AW-1:0] cram_addr,
  input  logic [CFG_W-1:0]   cram_rdata,
  // completion, one pulse per finished kernel, indexed by core
  output logic [N_CH-1:0]    ch_done,
  // status
  output logic [COLS-1:0]    col_active,
  output logic [COLS-1:0]    col_stall,
  output logic               loading,
  // DMA memory ports, one per core
  output logic               m_req   [N_CH],
  output logic               m_we    [N_CH],
  output addr_t              m_addr  [N_CH],
  output word_t              m_wdata [N_CH],
  input  logic               m_gnt   [N_CH],
  input  word_t              m_rdata [N_CH],
  input  logic               m_rvalid[N_CH]
);
  // ---------------- configuration loader ----------------
  logic               accept, launch, cfg_we;
  accel_req_t         cur;
  logic [COL_W-1:0]   cfg_col;
  logic [RW-1:0]      cfg_row;
  logic [PCW-1:0]     cfg_step;
  logic [CFG_W-1:0]   cfg_data;

  cgra_config_loader #(.ROWS(ROWS), .COLS(COLS), .CFG_DEPTH(CFG_DEPTH), .CRAM_AW(CRAM_AW)) u_loader (
    .clk, .rst_n, .req_valid, .req, .req_ready, .accept, .cur,
    .cram_addr, .cram_rdata, .cfg_we, .cfg_col, .cfg_row, .cfg_step, .cfg_data, .launch);

  assign loading = !req_ready;

  // ---------------- column ownership ----------------
  logic [CORE_W-1:0] owner  [COLS];
  logic              leader [COLS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owner  <= '{default: '0};
      leader <= '{default: 1'b0};
    end else if (launch) begin
      for (int c = 0; c < COLS; c++) begin
        if (c >= int'(cur.col_start) && c < int'(cur.col_start) + int'(cur.hdr.ncols)) begin
          owner[c]  <= cur.core;
          leader[c] <= (c == int'(cur.col_start));
        end
      end
    end
  end

  // ---------------- columns and cells ----------------
  logic           c_en   [COLS];
  logic           c_last [COLS];
  logic           c_stall[COLS];
  logic [PCW-1:0] c_pc   [COLS];
  col_cfg_t       c_ctl  [COLS];
  word_t          cell_out[ROWS][COLS];

  // per-channel stream signals
  word_t ch_in_data [N_CH];
  logic  ch_in_wait [N_CH];
  logic  ch_out_full[N_CH];
  logic  ch_pop     [N_CH];
  logic  ch_push    [N_CH];
  word_t ch_out_data[N_CH];
  logic  ch_exec_done[N_CH];
  logic  ch_stall   [N_CH];

  for (genvar c = 0; c < COLS; c++) begin : g_col
    logic in_group;
    assign in_group = launch && (c >= int'(cur.col_start)) &&
                      (c < int'(cur.col_start) + int'(cur.hdr.ncols));

    column_pc #(.CFG_DEPTH(CFG_DEPTH)) u_pc (
      .clk, .rst_n,
      .cfg_we  (cfg_we && cfg_col == COL_W'(c) && cfg_row == '0),
      .cfg_addr(cfg_step),
      .cfg_data(col_cfg_t'(cfg_data[$bits(col_cfg_t)-1:0])),
      .start   (in_group),
      .len     (cur.hdr.len),
      .iters   (cur.prm.iters),
      .stall   (c_stall[c]),
      .active  (col_active[c]),
      .en      (c_en[c]),
      .pc      (c_pc[c]),
      .ctl     (c_ctl[c]),
      .last    (c_last[c]));

    assign c_stall[c]   = col_active[c] && ch_stall[owner[c][CHW-1:0]];
    assign col_stall[c] = c_stall[c];

    for (genvar r = 0; r < ROWS; r++) begin : g_row
      rc_cell #(.CFG_DEPTH(CFG_DEPTH)) u_rc (
        .clk, .rst_n,
        .cfg_we  (cfg_we && cfg_col == COL_W'(c) && cfg_row == RW'(r + 1)),
        .cfg_addr(cfg_step),
        .cfg_data(rc_cfg_t'(cfg_data[$bits(rc_cfg_t)-1:0])),
        .pc      (c_pc[c]),
        .en      (c_en[c]),
        .clr     (in_group),
        .nb_n    ((r > 0)        ? cell_out[(r > 0) ? r-1 : 0][c] : '0),
        .nb_s    ((r < ROWS-1)   ? cell_out[(r < ROWS-1) ? r+1 : r][c] : '0),
        .nb_e    ((c < COLS-1)   ? cell_out[r][(c < COLS-1) ? c+1 : c] : '0),
        .nb_w    ((c > 0)        ? cell_out[r][(c > 0) ? c-1 : 0] : '0),
        .in_data (ch_in_data[owner[c][CHW-1:0]]),
        .out     (cell_out[r][c]));
    end
  end

  // ---------------- stream routing: leader column -> channel ----------------
  always_comb begin
    for (int k = 0; k < N_CH; k++) begin
      logic pop, push;
      word_t od;
      logic  lst;
      pop  = 1'b0;
      push = 1'b0;
      od   = '0;
      lst  = 1'b0;
      for (int c = 0; c < COLS; c++) begin
        if (col_active[c] && leader[c] && int'(owner[c]) == k) begin
          pop  = c_ctl[c].pop;
          push = c_ctl[c].push;
          od   = cell_out[int'(c_ctl[c].out_row) % ROWS][c];
          lst  = c_last[c];
        end
      end
      ch_stall[k]     = (pop && ch_in_wait[k]) || (push && ch_out_full[k]);
      ch_pop[k]       = pop && !ch_stall[k];
      ch_push[k]      = push && !ch_stall[k];
      ch_out_data[k]  = od;
      ch_exec_done[k] = lst;
    end
  end

  // ---------------- DMA channels ----------------
  for (genvar k = 0; k < N_CH; k++) begin : g_ch
    logic busy;
    dma_channel #(.FIFO_DEPTH(FIFO_DEPTH)) u_dma (
      .clk, .rst_n,
      .start    (accept && req.core == CORE_W'(k)),
      .prm      (req.prm),
      .exec_done(ch_exec_done[k]),
      .busy     (busy),
      .done     (ch_done[k]),
      .in_pop   (ch_pop[k]),
      .in_data  (ch_in_data[k]),
      .in_wait  (ch_in_wait[k]),
      .out_push (ch_push[k]),
      .out_data (ch_out_data[k]),
      .out_full (ch_out_full[k]),
      .m_req    (m_req[k]),
      .m_we     (m_we[k]),
      .m_addr   (m_addr[k]),
      .m_wdata  (m_wdata[k]),
      .m_gnt    (m_gnt[k]),
      .m_rdata  (m_rdata[k]),
      .m_rvalid (m_rvalid[k]));
  end

  a_owner_ok: assert property (@(posedge clk) disable iff (!rst_n)
                               accept |-> int'(req.core) < N_CH);
endmodule
