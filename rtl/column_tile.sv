// column_tile: one OLLAF column with its OS support hardware.
//
// Groups what sits in one column of the fabric: the reconfigurable column
// itself, its Hardware Configuration Manager (HCM) and local configuration
// memory, its Context Management Unit (CMU) and local context memory, and a
// control bus slave through which the supervisor drives all of them. The
// contexts and configurations of the tasks expected next on this column are
// loaded into the local memories over the control bus; the managers then move
// them into the hidden planes behind the running task, and a swap makes them
// active in one clock cycle.
//
// Control bus slave (selected by sel, request fields in req):
//   TGT_CMU / TGT_HCM   write: command (mgr_cmd_t); read: mgr_status_t
//   TGT_CTXMEM          32-bit words of the local context memory
//   TGT_CFGMEM          32-bit words of the local configuration memory
//   TGT_TAG             addr = slot; data bit 8 valid, bits 7:0 version
//   TGT_COL  COL_CTRL   bit 0: run (read adds bit 1 context plane, bit 2
//                       configuration plane)
//            COL_RESET  write: reset the run plane flip-flops for one cycle
//            COL_SWAP   write: bit 0 swaps the context plane, bit 1 the
//                       configuration plane, in the cycle of the write
// Reads answer on rdata one cycle after the request. g_ctx_swap/g_cfg_swap
// come from the global swap register, so that all columns of a task switch
// in the same cycle. A swap must not coincide with a transfer into the plane
// it swaps; an assertion checks this. The register map is this design's own.
module column_tile #(
  parameter int unsigned N_LE      = 32,
  parameter int unsigned COMM_W    = 4,
  parameter int unsigned LCM_SLOTS = 10,
  localparam int unsigned SEL_W    = ollaf_pkg::sel_width(2 * N_LE + COMM_W + 1),
  localparam int unsigned CFG_W    = N_LE * (17 + 5 * SEL_W) + (COMM_W + 1) * SEL_W
) (
  input  logic                  clk,
  input  logic                  clr,
  // control bus
  input  logic                  sel,
  input  ollaf_pkg::cb_req_t    req,
  output logic [31:0]           rdata,
  input  logic                  g_ctx_swap,
  input  logic                  g_cfg_swap,
  // communication medium port
  input  logic [COMM_W-1:0]     comm_in,
  output logic [COMM_W-1:0]     comm_out,
  output logic                  comm_stb,
  // status
  output logic                  run,
  output logic                  ctx_sel,
  output logic                  cfg_sel,
  output logic                  cmu_busy,
  output logic                  hcm_busy,
  output logic [N_LE-1:0]       state
);
  import ollaf_pkg::*;

  localparam int unsigned CTX_AW = sel_width(LCM_SLOTS * ((N_LE + 31) / 32));
  localparam int unsigned CFG_AW = sel_width(LCM_SLOTS * ((CFG_W + 31) / 32));
  localparam int unsigned SW     = sel_width(LCM_SLOTS);

  logic wr, rd;
  assign wr = sel && req.valid && req.we;
  assign rd = sel && req.valid && !req.we;

  // ---- column control ----
  logic task_rst, ctx_swap, cfg_swap;

  always_ff @(posedge clk) begin
    if (clr)                                        run <= 1'b0;
    else if (wr && req.tgt == TGT_COL && req.addr == COL_CTRL) run <= req.wdata[0];
  end

  assign task_rst = wr && req.tgt == TGT_COL && req.addr == COL_RESET;
  assign ctx_swap = g_ctx_swap || (wr && req.tgt == TGT_COL && req.addr == COL_SWAP && req.wdata[0]);
  assign cfg_swap = g_cfg_swap || (wr && req.tgt == TGT_COL && req.addr == COL_SWAP && req.wdata[1]);

  // ---- column ----
  logic ctx_scan_en, ctx_scan_in, ctx_scan_out;
  logic cfg_scan_en, cfg_scan_in;

  logic_column #(.N_LE(N_LE), .COMM_W(COMM_W)) u_col (
    .clk         (clk),
    .clr         (clr),
    .run         (run),
    .task_rst    (task_rst),
    .ctx_swap    (ctx_swap),
    .cfg_swap    (cfg_swap),
    .ctx_scan_en (ctx_scan_en),
    .ctx_scan_in (ctx_scan_in),
    .ctx_scan_out(ctx_scan_out),
    .cfg_scan_en (cfg_scan_en),
    .cfg_scan_in (cfg_scan_in),
    .cfg_scan_out(),             // the HCM never reads configurations back
    .comm_in     (comm_in),
    .comm_out    (comm_out),
    .comm_stb    (comm_stb),
    .ctx_sel     (ctx_sel),
    .cfg_sel     (cfg_sel),
    .state       (state)
  );

  // ---- context management ----
  mgr_status_t cmu_st, hcm_st;
  logic [SW-1:0] cm_slot, hm_slot;
  logic [sel_width(N_LE)-1:0]  cm_bit;
  logic [sel_width(CFG_W)-1:0] hm_bit;
  logic cm_re, cm_we, cm_wdata, cm_rdata, cm_tag_we, hm_re, hm_rdata;
  ctx_tag_t cm_tag_wdata, cm_tag, tag_rdata;
  logic [31:0] ctx_rdata, cfg_rdata;

  cmu #(.CTX_BITS(N_LE), .SLOTS(LCM_SLOTS)) u_cmu (
    .clk        (clk),
    .clr        (clr),
    .cmd_valid  (wr && req.tgt == TGT_CMU),
    .cmd        (mgr_cmd_t'(req.wdata)),
    .status     (cmu_st),
    .done       (),
    .scan_en    (ctx_scan_en),
    .scan_in    (ctx_scan_in),
    .scan_out   (ctx_scan_out),
    .m_slot     (cm_slot),
    .m_bit      (cm_bit),
    .m_re       (cm_re),
    .m_we       (cm_we),
    .m_wdata    (cm_wdata),
    .m_rdata    (cm_rdata),
    .m_tag_we   (cm_tag_we),
    .m_tag_wdata(cm_tag_wdata),
    .m_tag      (cm_tag)
  );

  lcm #(.SLOTS(LCM_SLOTS), .SLOT_BITS(N_LE), .USE_TAGS(1'b1)) u_ctx_mem (
    .clk        (clk),
    .clr        (clr),
    .a_slot     (cm_slot),
    .a_bit      (cm_bit),
    .a_re       (cm_re),
    .a_we       (cm_we),
    .a_wdata    (cm_wdata),
    .a_rdata    (cm_rdata),
    .a_tag_we   (cm_tag_we),
    .a_tag_wdata(cm_tag_wdata),
    .a_tag      (cm_tag),
    .b_en       (sel && req.valid && req.tgt == TGT_CTXMEM),
    .b_we       (req.we),
    .b_addr     (req.addr[CTX_AW-1:0]),
    .b_wdata    (req.wdata),
    .b_rdata    (ctx_rdata),
    .b_tag_we   (wr && req.tgt == TGT_TAG),
    .b_tag_slot (req.addr[SW-1:0]),
    .b_tag_wdata(ctx_tag_t'(req.wdata[VER_W:0])),
    .b_tag_rdata(tag_rdata)
  );

  // ---- configuration management ----
  hcm #(.CFG_BITS(CFG_W), .SLOTS(LCM_SLOTS)) u_hcm (
    .clk      (clk),
    .clr      (clr),
    .cmd_valid(wr && req.tgt == TGT_HCM),
    .cmd      (mgr_cmd_t'(req.wdata)),
    .status   (hcm_st),
    .done     (),
    .scan_en  (cfg_scan_en),
    .scan_in  (cfg_scan_in),
    .m_slot   (hm_slot),
    .m_bit    (hm_bit),
    .m_re     (hm_re),
    .m_rdata  (hm_rdata)
  );

  lcm #(.SLOTS(LCM_SLOTS), .SLOT_BITS(CFG_W), .USE_TAGS(1'b0)) u_cfg_mem (
    .clk        (clk),
    .clr        (clr),
    .a_slot     (hm_slot),
    .a_bit      (hm_bit),
    .a_re       (hm_re),
    .a_we       (1'b0),
    .a_wdata    (1'b0),
    .a_rdata    (hm_rdata),
    .a_tag_we   (1'b0),
    .a_tag_wdata('0),
    .a_tag      (),
    .b_en       (sel && req.valid && req.tgt == TGT_CFGMEM),
    .b_we       (req.we),
    .b_addr     (req.addr[CFG_AW-1:0]),
    .b_wdata    (req.wdata),
    .b_rdata    (cfg_rdata),
    .b_tag_we   (1'b0),
    .b_tag_slot ('0),
    .b_tag_wdata('0),
    .b_tag_rdata()
  );

  assign cmu_busy = cmu_st.busy;
  assign hcm_busy = hcm_st.busy;

  // ---- read response, one cycle after the request ----
  cb_tgt_e     rd_tgt;
  logic [31:0] rd_reg;

  always_ff @(posedge clk) begin
    if (clr) begin
      rd_tgt <= TGT_COL;
      rd_reg <= '0;
    end else if (rd) begin
      rd_tgt <= req.tgt;
      unique case (req.tgt)
        TGT_CMU: rd_reg <= cmu_st;
        TGT_HCM: rd_reg <= hcm_st;
        TGT_TAG: rd_reg <= 32'(tag_rdata);
        TGT_COL: rd_reg <= (req.addr == COL_CTRL) ? {29'd0, cfg_sel, ctx_sel, run} : 32'd0;
        default: rd_reg <= 32'd0;
      endcase
    end
  end

  always_comb begin
    unique case (rd_tgt)
      TGT_CTXMEM: rdata = ctx_rdata;
      TGT_CFGMEM: rdata = cfg_rdata;
      default:    rdata = rd_reg;
    endcase
  end

  // A plane must not be swapped while its hidden side is being shifted.
  a_no_ctx_swap_during_scan: assert property (@(posedge clk) disable iff (clr)
    ctx_swap |-> !ctx_scan_en);
  a_no_cfg_swap_during_scan: assert property (@(posedge clk) disable iff (clr)
    cfg_swap |-> !cfg_scan_en);

endmodule
