// mc_cgra_top: multi-core bio-signal processing platform with a shared
// coarse-grained reconfigurable array (CGRA) accelerator.
//
// N_CORES processors (outside this module: their ports are brought out as
// core_*) share
//   * an instruction memory of IM_BANKS banks behind a combinational crossbar
//     (one extra crossbar master, iml_*, loads programs);
//   * a data memory of DM_BANKS banks behind a second combinational crossbar;
//   * a synchronizer that clock-gates each core (clock_gate per core) while it
//     sleeps on a synchronization point or waits for a CGRA kernel;
//   * a CGRA controller with per-core memory-mapped kernel parameter
//     registers and a request queue, reading kernel headers from the
//     Configuration RAM (loaded through cram_*);
//   * the CGRA itself, whose DMA channel k reaches the data memory through
//     core k's crossbar port while core k is gated for its kernel.
//
// Data address map of a core (16-bit word addresses): bit 15 clear selects
// the data memory (word-interleaved over the banks); bit 15 set selects the
// core's own kernel parameter registers, offset in bits 2:0 (0 input address,
// 1 input length, 2 output address, 3 output length, 4 iterations).
//
// Kernel offload sequence: the core writes its parameters, issues ACCEL #kid
// (core_a_valid with core_a_kid) and is gated from the next cycle; the
// controller queues the request, maps it onto free columns when there are
// enough, the CGRA configures and runs it and its DMA channel streams data
// through the core's port; when the outputs are stored the core's clock
// resumes.
//
// Timing: all ports are synchronous to clk. Memory ports grant in the
// request cycle and return read data one cycle later (core_*_rvalid).
//
// Follows the document: 8 cores, 8 instruction banks, 16 data banks,
// combinational crossbars, synchronizer with clock gating, CGRA controller
// with request queue and Configuration RAM, shared CGRA with multi-channel DMA
// on the requesting cores' memory ports, ACCEL with memory-mapped parameters.
// Own choices: bank sizes, word widths, mesh size, address map.
module mc_cgra_top
  import cgra_pkg::*;
#(
  parameter int unsigned N_CORES       = 8,
  parameter int unsigned IM_BANKS      = 8,
  parameter int unsigned DM_BANKS      = 16,
  parameter int unsigned IM_BANK_DEPTH = 2048,
  parameter int unsigned DM_BANK_DEPTH = 2048,
  parameter int unsigned INSTR_W       = 24,
  parameter int unsigned ROWS          = 4,
  parameter int unsigned COLS          = 4,
  parameter int unsigned CFG_DEPTH     = 16,
  parameter int unsigned CRAM_DEPTH    = 1024,
  parameter int unsigned N_POINTS      = 8,
  localparam int unsigned IM_AW   = $clog2(IM_BANKS * IM_BANK_DEPTH),
  localparam int unsigned DM_AW   = $clog2(DM_BANKS * DM_BANK_DEPTH),
  localparam int unsigned CRAM_AW = $clog2(CRAM_DEPTH),
  localparam int unsigned PTW     = (N_POINTS > 1) ? $clog2(N_POINTS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               test_en,
  // per-core gated clocks
  output logic               core_clk     [N_CORES],
  output logic               core_clk_en  [N_CORES],
  // instruction ports
  input  logic               core_i_req   [N_CORES],
  input  logic [IM_AW-1:0]   core_i_addr  [N_CORES],
  output logic               core_i_gnt   [N_CORES],
  output logic [INSTR_W-1:0] core_i_rdata [N_CORES],
  output logic               core_i_rvalid[N_CORES],
  // data ports
  input  logic               core_d_req   [N_CORES],
  input  logic               core_d_we    [N_CORES],
  input  addr_t              core_d_addr  [N_CORES],
  input  word_t              core_d_wdata [N_CORES],
  output logic               core_d_gnt   [N_CORES],
  output word_t              core_d_rdata [N_CORES],
  output logic               core_d_rvalid[N_CORES],
  // synchronization instructions
  input  logic               core_s_valid [N_CORES],
  input  sync_op_e           core_s_op    [N_CORES],
  input  logic [PTW-1:0]     core_s_pt    [N_CORES],
  // ACCEL #kid
  input  logic               core_a_valid [N_CORES],
  input  logic [7:0]         core_a_kid   [N_CORES],
  // instruction memory loading
  input  logic               iml_we,
  input  logic [IM_AW-1:0]   iml_addr,
  input  logic [INSTR_W-1:0] iml_wdata,
  output logic               iml_gnt,
  // Configuration RAM loading
  input  logic               cram_we,
  input  logic [CRAM_AW-1:0] cram_waddr,
  input  logic [CFG_W-1:0]   cram_wdata,
  // status
  output logic [COLS-1:0]    col_active,
  output logic [COLS-1:0]    col_stall,
  output logic [COLS-1:0]    col_busy,
  output logic               cgra_loading,
  output logic               accel_queue_empty
);
  localparam int unsigned NIM = N_CORES + 1;

  // ---------------- instruction memory ----------------
  logic               im_m_req   [NIM];
  logic               im_m_we    [NIM];
  logic [IM_AW-1:0]   im_m_addr  [NIM];
  logic [INSTR_W-1:0] im_m_wdata [NIM];
  logic               im_m_gnt   [NIM];
  logic [INSTR_W-1:0] im_m_rdata [NIM];
  logic               im_m_rvalid[NIM];
  logic               im_b_req   [IM_BANKS];
  logic               im_b_we    [IM_BANKS];
  logic [IM_AW-$clog2(IM_BANKS)-1:0] im_b_addr [IM_BANKS];
  logic [INSTR_W-1:0] im_b_wdata [IM_BANKS];
  logic [INSTR_W-1:0] im_b_rdata [IM_BANKS];

  for (genvar i = 0; i < N_CORES; i++) begin : g_im_m
    assign im_m_req[i]      = core_i_req[i];
    assign im_m_we[i]       = 1'b0;
    assign im_m_addr[i]     = core_i_addr[i];
    assign im_m_wdata[i]    = '0;
    assign core_i_gnt[i]    = im_m_gnt[i];
    assign core_i_rdata[i]  = im_m_rdata[i];
    assign core_i_rvalid[i] = im_m_rvalid[i];
  end
  assign im_m_req[N_CORES]   = iml_we;
  assign im_m_we[N_CORES]    = 1'b1;
  assign im_m_addr[N_CORES]  = iml_addr;
  assign im_m_wdata[N_CORES] = iml_wdata;
  assign iml_gnt             = im_m_gnt[N_CORES];

  xbar #(.N_M(NIM), .N_B(IM_BANKS), .AW(IM_AW), .DW(INSTR_W)) u_im_xbar (
    .clk, .rst_n,
    .m_req(im_m_req), .m_we(im_m_we), .m_addr(im_m_addr), .m_wdata(im_m_wdata),
    .m_gnt(im_m_gnt), .m_rdata(im_m_rdata), .m_rvalid(im_m_rvalid),
    .b_req(im_b_req), .b_we(im_b_we), .b_addr(im_b_addr), .b_wdata(im_b_wdata),
    .b_rdata(im_b_rdata));

  for (genvar b = 0; b < IM_BANKS; b++) begin : g_im_bank
    mem_bank #(.DEPTH(IM_BANK_DEPTH), .WIDTH(INSTR_W)) u_bank (
      .clk, .req(im_b_req[b]), .we(im_b_we[b]), .addr(im_b_addr[b]),
      .wdata(im_b_wdata[b]), .rdata(im_b_rdata[b]));
  end

  // ---------------- synchronizer and clock gates ----------------
  logic accel_done [N_CORES];
  logic sleeping   [N_CORES];
  logic accel_wait [N_CORES];
  logic [3:0] sync_count [N_POINTS];

  synchronizer #(.N_CORES(N_CORES), .N_POINTS(N_POINTS)) u_sync (
    .clk, .rst_n,
    .sync_valid(core_s_valid), .sync_op(core_s_op), .sync_pt(core_s_pt),
    .accel_issue(core_a_valid), .accel_done(accel_done),
    .clk_en(core_clk_en), .sleeping(sleeping), .accel_wait(accel_wait),
    .count(sync_count));

  for (genvar i = 0; i < N_CORES; i++) begin : g_cg
    clock_gate u_cg (.clk_i(clk), .en(core_clk_en[i]), .test_en(test_en), .clk_o(core_clk[i]));
  end

  // ---------------- data port steering ----------------
  logic              dm_m_req   [N_CORES];
  logic              dm_m_we    [N_CORES];
  logic [DM_AW-1:0]  dm_m_addr  [N_CORES];
  word_t             dm_m_wdata [N_CORES];
  logic              dm_m_gnt   [N_CORES];
  word_t             dm_m_rdata [N_CORES];
  logic              dm_m_rvalid[N_CORES];

  logic              dma_req   [N_CORES];
  logic              dma_we    [N_CORES];
  addr_t             dma_addr  [N_CORES];
  word_t             dma_wdata [N_CORES];
  logic              dma_gnt   [N_CORES];
  logic              dma_rvalid[N_CORES];

  logic              reg_we    [N_CORES];
  logic [2:0]        reg_addr  [N_CORES];
  word_t             reg_rdata [N_CORES];
  logic              mmio      [N_CORES];
  logic              mmio_rv   [N_CORES];
  word_t             mmio_rd   [N_CORES];

  for (genvar i = 0; i < N_CORES; i++) begin : g_port
    assign mmio[i]     = core_d_addr[i][ADDR_W-1];
    assign reg_we[i]   = core_d_req[i] && core_d_we[i] && mmio[i];
    assign reg_addr[i] = core_d_addr[i][2:0];

    // the DMA channel owns the port while the core waits for its kernel
    assign dm_m_req[i]   = accel_wait[i] ? dma_req[i] : (core_d_req[i] && !mmio[i]);
    assign dm_m_we[i]    = accel_wait[i] ? dma_we[i]  : core_d_we[i];
    assign dm_m_addr[i]  = accel_wait[i] ? dma_addr[i][DM_AW-1:0] : core_d_addr[i][DM_AW-1:0];
    assign dm_m_wdata[i] = accel_wait[i] ? dma_wdata[i] : core_d_wdata[i];
    assign dma_gnt[i]    = accel_wait[i] && dm_m_gnt[i];
    assign dma_rvalid[i] = accel_wait[i] && dm_m_rvalid[i];

    assign core_d_gnt[i]    = !accel_wait[i] && (mmio[i] ? core_d_req[i] : dm_m_gnt[i]);
    assign core_d_rvalid[i] = mmio_rv[i] || (!accel_wait[i] && dm_m_rvalid[i]);
    assign core_d_rdata[i]  = mmio_rv[i] ? mmio_rd[i] : dm_m_rdata[i];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        mmio_rv[i] <= 1'b0;
        mmio_rd[i] <= '0;
      end else begin
        mmio_rv[i] <= core_d_req[i] && !core_d_we[i] && mmio[i] && !accel_wait[i];
        mmio_rd[i] <= reg_rdata[i];
      end
    end
  end

  // ---------------- data memory ----------------
  logic              dm_b_req   [DM_BANKS];
  logic              dm_b_we    [DM_BANKS];
  logic [DM_AW-$clog2(DM_BANKS)-1:0] dm_b_addr [DM_BANKS];
  word_t             dm_b_wdata [DM_BANKS];
  word_t             dm_b_rdata [DM_BANKS];

  xbar #(.N_M(N_CORES), .N_B(DM_BANKS), .AW(DM_AW), .DW(DATA_W)) u_dm_xbar (
    .clk, .rst_n,
    .m_req(dm_m_req), .m_we(dm_m_we), .m_addr(dm_m_addr), .m_wdata(dm_m_wdata),
    .m_gnt(dm_m_gnt), .m_rdata(dm_m_rdata), .m_rvalid(dm_m_rvalid),
    .b_req(dm_b_req), .b_we(dm_b_we), .b_addr(dm_b_addr), .b_wdata(dm_b_wdata),
    .b_rdata(dm_b_rdata));

  for (genvar b = 0; b < DM_BANKS; b++) begin : g_dm_bank
    mem_bank #(.DEPTH(DM_BANK_DEPTH), .WIDTH(DATA_W)) u_bank (
      .clk, .req(dm_b_req[b]), .we(dm_b_we[b]), .addr(dm_b_addr[b]),
      .wdata(dm_b_wdata[b]), .rdata(dm_b_rdata[b]));
  end

  // ---------------- CGRA controller, Configuration RAM, CGRA ----------------
  logic [CRAM_AW-1:0] cram_addr_ctl, cram_addr_cgra;
  logic [CFG_W-1:0]   cram_rdata_ctl, cram_rdata_cgra;
  logic               req_valid, req_ready;
  accel_req_t         req;
  logic [N_CORES-1:0] ch_done;

  config_ram #(.DEPTH(CRAM_DEPTH), .WIDTH(CFG_W)) u_cram (
    .clk, .we(cram_we), .waddr(cram_waddr), .wdata(cram_wdata),
    .raddr_a(cram_addr_ctl), .rdata_a(cram_rdata_ctl),
    .raddr_b(cram_addr_cgra), .rdata_b(cram_rdata_cgra));

  cgra_controller #(.N_CORES(N_CORES), .COLS(COLS), .CRAM_AW(CRAM_AW)) u_ctl (
    .clk, .rst_n,
    .reg_we(reg_we), .reg_addr(reg_addr), .reg_wdata(core_d_wdata), .reg_rdata(reg_rdata),
    .accel_valid(core_a_valid), .accel_kid(core_a_kid),
    .cram_addr(cram_addr_ctl), .cram_rdata(cram_rdata_ctl),
    .req_valid, .req, .req_ready, .ch_done,
    .accel_done(accel_done), .col_busy, .q_empty(accel_queue_empty));

  cgra #(.ROWS(ROWS), .COLS(COLS), .CFG_DEPTH(CFG_DEPTH), .N_CH(N_CORES),
         .CRAM_AW(CRAM_AW)) u_cgra (
    .clk, .rst_n,
    .req_valid, .req, .req_ready,
    .cram_addr(cram_addr_cgra), .cram_rdata(cram_rdata_cgra),
    .ch_done, .col_active, .col_stall, .loading(cgra_loading),
    .m_req(dma_req), .m_we(dma_we), .m_addr(dma_addr), .m_wdata(dma_wdata),
    .m_gnt(dma_gnt), .m_rdata(dm_m_rdata), .m_rvalid(dma_rvalid));
endmodule
