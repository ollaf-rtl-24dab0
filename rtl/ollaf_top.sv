// ollaf_top: the OLLAF fine grained dynamically reconfigurable fabric.
//
// N_COL identical columns sit side by side. Each column carries its own
// configuration manager (HCM), context manager (CMU) and local context and
// configuration memories, and exposes one port on the application
// communication medium. The hardware supervisor (a microprocessor running the
// real-time kernel, outside this module) drives everything through the
// control bus port cb_req/cb_rsp and keeps the central repository, whose
// memory port ccr_* is also brought out here. Status of every column is
// brought out for observation.
//
// A preemption of task T1 by T2 on a column, as the supervisor performs it:
//   1. copy T2's configuration and context into the column's local memories
//      (TGT_CFGMEM, TGT_CTXMEM, TGT_TAG), unless they are already cached;
//   2. command the HCM and the CMU to restore them into the hidden planes
//      while T1 keeps running;
//   3. write TGT_SWAP (or COL_SWAP): both planes switch in one clock cycle,
//      during which no task advances; T2 runs from the next cycle;
//   4. command the CMU to save T1's context, now in the hidden plane, with a
//      new version number, and copy it to the central repository.
// Default sizes: 8 columns of 32 elements, 4-bit communication ports, 10
// local slots and 128 central slots. The OLLAF architecture fixes only the 4-input
// LUT, the ten local entries and "more than 100" central entries; the
// column count and height and the port width are this design's choices.
module ollaf_top #(
  parameter int unsigned N_COL     = 8,
  parameter int unsigned N_LE      = 32,
  parameter int unsigned COMM_W    = 4,
  parameter int unsigned LCM_SLOTS = 10,
  parameter int unsigned CCR_SLOTS = 128,
  localparam int unsigned SEL_W     = ollaf_pkg::sel_width(2 * N_LE + COMM_W + 1),
  localparam int unsigned CFG_W     = N_LE * (17 + 5 * SEL_W) + (COMM_W + 1) * SEL_W,
  localparam int unsigned CCR_WORDS = (CFG_W + 31) / 32,
  localparam int unsigned CCR_AW    = ollaf_pkg::sel_width(CCR_SLOTS * CCR_WORDS),
  localparam int unsigned CCR_SW    = ollaf_pkg::sel_width(CCR_SLOTS)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // control bus, from the hardware supervisor
  input  ollaf_pkg::cb_req_t           cb_req,
  output ollaf_pkg::cb_rsp_t           cb_rsp,
  // central context/configuration repository, supervisor side
  input  logic                         ccr_en,
  input  logic                         ccr_we,
  input  logic [CCR_AW-1:0]            ccr_addr,
  input  logic [31:0]                  ccr_wdata,
  output logic [31:0]                  ccr_rdata,
  input  logic                         ccr_tag_we,
  input  logic [CCR_SW-1:0]            ccr_tag_slot,
  input  ollaf_pkg::ctx_tag_t          ccr_tag_wdata,
  output ollaf_pkg::ctx_tag_t          ccr_tag_rdata,
  // column status
  output logic [N_COL-1:0]             col_run,
  output logic [N_COL-1:0]             col_ctx_sel,
  output logic [N_COL-1:0]             col_cfg_sel,
  output logic [N_COL-1:0]             col_cmu_busy,
  output logic [N_COL-1:0]             col_hcm_busy,
  output logic [N_COL-1:0][N_LE-1:0]   col_state
);

  logic clr;
  assign clr = !rst_n;

  logic [N_COL-1:0]              col_sel, ctx_swap, cfg_swap, comm_stb;
  logic [N_COL-1:0][31:0]        col_rdata;
  logic [N_COL-1:0][COMM_W-1:0]  comm_tx, comm_rx;
  logic                          comm_en;
  logic [31:0]                   comm_rdata;

  ctrl_bus #(.N_COL(N_COL)) u_bus (
    .clk       (clk),
    .clr       (clr),
    .m_req     (cb_req),
    .m_rsp     (cb_rsp),
    .col_sel   (col_sel),
    .col_rdata (col_rdata),
    .ctx_swap  (ctx_swap),
    .cfg_swap  (cfg_swap),
    .comm_en   (comm_en),
    .comm_rdata(comm_rdata)
  );

  for (genvar c = 0; c < N_COL; c++) begin : g_col
    column_tile #(.N_LE(N_LE), .COMM_W(COMM_W), .LCM_SLOTS(LCM_SLOTS)) u_tile (
      .clk       (clk),
      .clr       (clr),
      .sel       (col_sel[c]),
      .req       (cb_req),
      .rdata     (col_rdata[c]),
      .g_ctx_swap(ctx_swap[c]),
      .g_cfg_swap(cfg_swap[c]),
      .comm_in   (comm_rx[c]),
      .comm_out  (comm_tx[c]),
      .comm_stb  (comm_stb[c]),
      .run       (col_run[c]),
      .ctx_sel   (col_ctx_sel[c]),
      .cfg_sel   (col_cfg_sel[c]),
      .cmu_busy  (col_cmu_busy[c]),
      .hcm_busy  (col_hcm_busy[c]),
      .state     (col_state[c])
    );
  end

  comm_medium #(.N_COL(N_COL), .COMM_W(COMM_W)) u_comm (
    .clk    (clk),
    .clr    (clr),
    .tx_data(comm_tx),
    .tx_stb (comm_stb),
    .rx_data(comm_rx),
    .en     (comm_en),
    .we     (cb_req.we),
    .addr   (cb_req.addr),
    .wdata  (cb_req.wdata),
    .rdata  (comm_rdata)
  );

  ccr #(.SLOTS(CCR_SLOTS), .SLOT_WORDS(CCR_WORDS)) u_ccr (
    .clk      (clk),
    .clr      (clr),
    .en       (ccr_en),
    .we       (ccr_we),
    .addr     (ccr_addr),
    .wdata    (ccr_wdata),
    .rdata    (ccr_rdata),
    .tag_we   (ccr_tag_we),
    .tag_slot (ccr_tag_slot),
    .tag_wdata(ccr_tag_wdata),
    .tag_rdata(ccr_tag_rdata)
  );

endmodule
