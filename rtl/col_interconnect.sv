// col_interconnect: multiplexor based routing of one OLLAF column.
//
// Every routed input of the column (the four LUT inputs and the clock enable
// of each logic element, and the data and strobe bits of the column's port on
// the communication medium) is driven by a multiplexor whose select comes from
// the configuration plane. The OLLAF architecture chose multiplexors over pass
// transistors so that configuration bits grow with log2 of the number of
// choices; the source list below is this design's choice.
//
// Sources, by select value:
//   0 .. N_LE-1                 lx of element i (feed-forward only, see below)
//   N_LE .. 2*N_LE-1            qx of element i-N_LE
//   2*N_LE .. 2*N_LE+COMM_W-1   bit of the communication medium input port
//   2*N_LE+COMM_W               constant 1
//   larger values               constant 0
// Element i uses select fields 5*i+0..3 for A..D and 5*i+4 for CE.
//
// Element k may only take lx of elements 0..k-1; selecting the lx of element
// k or above gives 0. LUTs can thus be cascaded inside one clock cycle, but no
// configuration, not even the random contents of a plane at power-up, can
// close a combinational loop. The communication outputs may take any lx.
//
// Timing: purely combinational. Tools that analyse whole vectors may still
// report a loop from lx back to abcd; the bit-level masking above breaks it.
module col_interconnect #(
  parameter int unsigned N_LE   = 32,
  parameter int unsigned COMM_W = 4,
  parameter int unsigned SEL_W  = ollaf_pkg::sel_width(2 * N_LE + COMM_W + 1)
) (
  input  logic [N_LE-1:0]                 lx,
  input  logic [N_LE-1:0]                 qx,
  input  logic [COMM_W-1:0]               comm_in,
  input  logic [N_LE*5*SEL_W-1:0]         le_sel,
  input  logic [(COMM_W+1)*SEL_W-1:0]     out_sel,
  output logic [N_LE-1:0][3:0]            abcd,
  output logic [N_LE-1:0]                 ce,
  output logic [COMM_W-1:0]               comm_out,
  output logic                            comm_stb
);

  localparam int unsigned N_SRC = 2 * N_LE + COMM_W + 1;

  logic [N_SRC-1:0] src;
  assign src = {1'b1, comm_in, qx, lx};

  function automatic logic pick(logic [N_SRC-1:0] s, logic [SEL_W-1:0] k);
    return (int'(k) < N_SRC) ? s[k] : 1'b0;
  endfunction

  always_comb begin
    for (int i = 0; i < N_LE; i++) begin
      logic [N_SRC-1:0] src_i;
      src_i = src;
      for (int k = i; k < N_LE; k++) src_i[k] = 1'b0;   // lx of element >= i
      for (int j = 0; j < 4; j++)
        abcd[i][j] = pick(src_i, le_sel[(5*i+j)*SEL_W +: SEL_W]);
      ce[i] = pick(src_i, le_sel[(5*i+4)*SEL_W +: SEL_W]);
    end
    for (int j = 0; j < COMM_W; j++)
      comm_out[j] = pick(src, out_sel[j*SEL_W +: SEL_W]);
    comm_stb = pick(src, out_sel[COMM_W*SEL_W +: SEL_W]);
  end

endmodule
