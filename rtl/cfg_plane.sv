// cfg_plane: dual configuration plane of one column.
//
// Every configuration memory point is a dual plane memory point: the active
// plane drives the fabric (cfg) and never changes while a task runs, the
// hidden plane forms a scanpath through which the next configuration is
// shifted in behind the running task. Toggling sel exchanges the planes.
// The OLLAF architecture models configuration points as D flip-flops and uses the same
// dual plane scheme as for contexts; that is what this module does.
//
// Scan order: scan_in enters point 0, point k feeds point k+1 and scan_out is
// point W-1. After W shifts the bit shifted in first sits in point W-1, so a
// loader that sends bit W-1 first leaves bit k in point k.
//
// Timing: one shift per rising clock edge with scan_en high; the planes swap
// when the sel input changes (it is a register of the column).
module cfg_plane #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         sel,
  input  logic         scan_en,
  input  logic         scan_in,
  output logic         scan_out,
  output logic [W-1:0] cfg
);

  logic [W:0] chain;
  assign chain[0] = scan_in;

  for (genvar k = 0; k < W; k++) begin : g_pt
    dual_plane_ff u_pt (
      .clk    (clk),
      .clr    (clr),
      .csrs   (sel),
      .d      (1'b0),     // configuration never changes while running
      .run_en (1'b0),
      .rst    (1'b0),
      .q      (cfg[k]),
      .cs_in  (chain[k]),
      .scan_en(scan_en),
      .cs_out (chain[k+1])
    );
  end

  assign scan_out = chain[W];

endmodule
