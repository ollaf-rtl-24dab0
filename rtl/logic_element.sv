// logic_element: the task designer's view of one OLLAF logic element.
//
// A 4-input look-up table drives the combinational output lx and the D input
// of a flip-flop whose output is qx. The flip-flop has a clock enable and a
// reset, and a configuration multiplexor decides whether the clock enable
// comes from the routed ce input or is always on. The flip-flop is a dual
// plane memory point, so the element also carries a hidden context scanpath
// (cs_in / cs_out) and follows the plane select csrs of its column.
//
// From the OLLAF architecture: LUT inputs A..D, outputs LX and QX, DFF with CE and R,
// configurable multiplexors in front of clock and CE. This design's choices:
// the clock multiplexor is not modelled (the whole fabric runs on one clock),
// the CE multiplexor picks between the routed CE and a constant 1, and LUT bit
// i is the output for abcd == i (A is the least significant input).
//
// Timing: lx is combinational in abcd and cfg_lut; qx changes on the rising
// edge of clk when run_en and the effective clock enable are high.
module logic_element (
  input  logic        clk,
  input  logic        clr,
  input  logic [3:0]  abcd,          // {D, C, B, A}
  input  logic        ce,            // routed clock enable
  input  logic        rst,           // functional reset of the run plane
  input  logic        run_en,        // column is executing
  // configuration (from the active configuration plane)
  input  logic [15:0] cfg_lut,
  input  logic        cfg_ce_force,  // 1: flip-flop always enabled
  // hidden context scanpath
  input  logic        csrs,
  input  logic        scan_en,
  input  logic        cs_in,
  output logic        cs_out,
  // outputs
  output logic        lx,
  output logic        qx
);

  assign lx = cfg_lut[abcd];

  dual_plane_ff u_ff (
    .clk    (clk),
    .clr    (clr),
    .csrs   (csrs),
    .d      (lx),
    .run_en (run_en && (cfg_ce_force || ce)),
    .rst    (rst),
    .q      (qx),
    .cs_in  (cs_in),
    .scan_en(scan_en),
    .cs_out (cs_out)
  );

endmodule
