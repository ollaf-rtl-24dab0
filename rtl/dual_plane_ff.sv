// dual_plane_ff: one dual plane memory point of the OLLAF fabric.
//
// Two flip-flops share one memory point. The select input csrs decides their
// roles: with csrs = 0, flip-flop 1 belongs to the run plane (it captures d
// and drives q) and flip-flop 2 to the scan plane (it shifts cs_in and drives
// cs_out); with csrs = 1 the roles are exchanged. Toggling csrs therefore swaps
// a whole running state for a state that was shifted in behind it, which is
// what makes a task switch cost a single clock cycle. The structure (two
// flip-flops, input multiplexors on D and CSin, output multiplexors on Q and
// CSout, one common select) follows the OLLAF architecture.
//
// Timing: all updates happen on the rising edge of clk. run_en gates the run
// plane, scan_en the scan plane. rst is the functional (task) reset and clears
// only the run plane flip-flop; clr clears both flip-flops. One clock for both
// planes and synchronous resets are this design's choices.
module dual_plane_ff (
  input  logic clk,
  input  logic clr,      // system clear of both planes
  input  logic csrs,     // plane select: 0 -> FF1 runs, 1 -> FF2 runs
  // run plane
  input  logic d,
  input  logic run_en,
  input  logic rst,
  output logic q,
  // scan plane
  input  logic cs_in,
  input  logic scan_en,
  output logic cs_out
);

  logic ff1, ff2;

  always_ff @(posedge clk) begin
    if (clr) begin
      ff1 <= 1'b0;
    end else if (!csrs) begin
      if (rst)         ff1 <= 1'b0;
      else if (run_en) ff1 <= d;
    end else if (scan_en) begin
      ff1 <= cs_in;
    end
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      ff2 <= 1'b0;
    end else if (csrs) begin
      if (rst)         ff2 <= 1'b0;
      else if (run_en) ff2 <= d;
    end else if (scan_en) begin
      ff2 <= cs_in;
    end
  end

  assign q      = csrs ? ff2 : ff1;
  assign cs_out = csrs ? ff1 : ff2;

endmodule
