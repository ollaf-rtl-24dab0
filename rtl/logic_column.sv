// logic_column: one reconfigurable column of the OLLAF logic core.
//
// The core is split into identical columns; a task occupies a whole number of
// columns and can be moved between columns without changing its
// configuration. A column holds N_LE logic elements, their multiplexor
// interconnect, a dual configuration plane and a dual-plane context scanpath
// that links the flip-flops of all its elements. Context and configuration
// have separate scanpaths and separate plane selects, so a context can be
// swapped without touching the configuration.
//
// Configuration word (CFG_W bits, bit k in configuration point k):
//   element i, base b = i*LE_CFG_W:
//     [b+15:b]            LUT contents
//     [b+16]              1: flip-flop always enabled, 0: use routed CE
//     [b+17+j*SEL_W +: SEL_W]  select of input j (j = 0..3: A..D, 4: CE)
//   base N_LE*LE_CFG_W:   COMM_W data selects, then the strobe select
// Context word (CTX_W = N_LE bits): bit k is the flip-flop of element k.
//
// Swap timing: a ctx_swap or cfg_swap pulse toggles the matching plane select
// at the next rising edge. In that same cycle the run plane does not capture,
// so a task switch costs exactly one clock cycle: the outgoing task's last
// state is frozen into what becomes the hidden plane and the incoming task
// runs from the following edge. Separate select registers for context and
// configuration, the frozen swap cycle and a column-wide task reset are this
// design's choices.
module logic_column #(
  parameter int unsigned N_LE   = 32,
  parameter int unsigned COMM_W = 4,
  localparam int unsigned SEL_W    = ollaf_pkg::sel_width(2 * N_LE + COMM_W + 1),
  localparam int unsigned LE_CFG_W = 16 + 1 + 5 * SEL_W,
  localparam int unsigned CFG_W    = N_LE * LE_CFG_W + (COMM_W + 1) * SEL_W,
  localparam int unsigned CTX_W    = N_LE
) (
  input  logic              clk,
  input  logic              clr,
  input  logic              run,          // task in the run plane executes
  input  logic              task_rst,     // reset run-plane flip-flops
  input  logic              ctx_swap,
  input  logic              cfg_swap,
  // hidden context scanpath
  input  logic              ctx_scan_en,
  input  logic              ctx_scan_in,
  output logic              ctx_scan_out,
  // hidden configuration scanpath
  input  logic              cfg_scan_en,
  input  logic              cfg_scan_in,
  output logic              cfg_scan_out,
  // port on the application communication medium
  input  logic [COMM_W-1:0] comm_in,
  output logic [COMM_W-1:0] comm_out,
  output logic              comm_stb,
  // status
  output logic              ctx_sel,      // active context plane
  output logic              cfg_sel,      // active configuration plane
  output logic [N_LE-1:0]   state         // run-plane flip-flops (qx)
);

  logic [CFG_W-1:0]           cfg;
  logic [N_LE-1:0]            lx, qx;
  logic [N_LE-1:0][3:0]       abcd;
  logic [N_LE-1:0]            ce;
  logic [N_LE*5*SEL_W-1:0]    le_sel;
  logic [N_LE:0]              ctx_chain;
  logic                       run_en;

  always_ff @(posedge clk) begin
    if (clr) begin
      ctx_sel <= 1'b0;
      cfg_sel <= 1'b0;
    end else begin
      if (ctx_swap) ctx_sel <= ~ctx_sel;
      if (cfg_swap) cfg_sel <= ~cfg_sel;
    end
  end

  assign run_en = run && !ctx_swap && !cfg_swap;

  cfg_plane #(.W(CFG_W)) u_cfg (
    .clk     (clk),
    .clr     (clr),
    .sel     (cfg_sel),
    .scan_en (cfg_scan_en),
    .scan_in (cfg_scan_in),
    .scan_out(cfg_scan_out),
    .cfg     (cfg)
  );

  always_comb begin
    for (int i = 0; i < N_LE; i++)
      le_sel[i*5*SEL_W +: 5*SEL_W] = cfg[i*LE_CFG_W + 17 +: 5*SEL_W];
  end

  col_interconnect #(.N_LE(N_LE), .COMM_W(COMM_W), .SEL_W(SEL_W)) u_ic (
    .lx      (lx),
    .qx      (qx),
    .comm_in (comm_in),
    .le_sel  (le_sel),
    .out_sel (cfg[N_LE*LE_CFG_W +: (COMM_W+1)*SEL_W]),
    .abcd    (abcd),
    .ce      (ce),
    .comm_out(comm_out),
    .comm_stb(comm_stb)
  );

  assign ctx_chain[0] = ctx_scan_in;

  for (genvar i = 0; i < N_LE; i++) begin : g_le
    logic_element u_le (
      .clk         (clk),
      .clr         (clr),
      .abcd        (abcd[i]),
      .ce          (ce[i]),
      .rst         (task_rst),
      .run_en      (run_en),
      .cfg_lut     (cfg[i*LE_CFG_W +: 16]),
      .cfg_ce_force(cfg[i*LE_CFG_W + 16]),
      .csrs        (ctx_sel),
      .scan_en     (ctx_scan_en),
      .cs_in       (ctx_chain[i]),
      .cs_out      (ctx_chain[i+1]),
      .lx          (lx[i]),
      .qx          (qx[i])
    );
  end

  assign ctx_scan_out = ctx_chain[N_LE];
  assign state        = qx;

endmodule
