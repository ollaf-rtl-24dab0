// ollaf_tb_pkg: configuration builders shared by the OLLAF testbenches.
//
// A column configuration is laid out as in logic_column: element i starts at
// bit i*LE_CFG_W with 16 LUT bits, the always-enabled bit and five select
// fields (A, B, C, D, CE) of SEL_W bits; the COMM_W+1 output selects follow
// the last element. Sources: lx 0..n-1, qx n..2n-1, communication input
// 2n..2n+cw-1, constant 1 at 2n+cw.
package ollaf_tb_pkg;

  localparam int unsigned MAXCFG = 2048;
  typedef logic [MAXCFG-1:0] cfgvec_t;

  function automatic int unsigned sel_w(int unsigned n, int unsigned cw);
    return ollaf_pkg::sel_width(2 * n + cw + 1);
  endfunction

  function automatic int unsigned le_cfg_w(int unsigned n, int unsigned cw);
    return 17 + 5 * sel_w(n, cw);
  endfunction

  function automatic int unsigned cfg_w(int unsigned n, int unsigned cw);
    return n * le_cfg_w(n, cw) + (cw + 1) * sel_w(n, cw);
  endfunction

  function automatic void set_field(ref cfgvec_t v, input int unsigned pos,
                                    input int unsigned width, input int unsigned val);
    for (int unsigned b = 0; b < width; b++) v[pos+b] = val[b];
  endfunction

  // Elements 0..3 form a 4-bit state machine: next state = tbl[state], all
  // four reading qx of elements 0..3. Port data bit j = qx of element j,
  // strobe = constant 1.
  function automatic cfgvec_t fsm_cfg(int unsigned n, int unsigned cw, logic [15:0][3:0] tbl);
    cfgvec_t v = '0;
    int unsigned sw = sel_w(n, cw);
    int unsigned lw = le_cfg_w(n, cw);
    for (int unsigned k = 0; k < 4; k++) begin
      for (int unsigned s = 0; s < 16; s++) v[k*lw + s] = tbl[s][k];
      v[k*lw + 16] = 1'b1;
      for (int unsigned j = 0; j < 4; j++) set_field(v, k*lw + 17 + j*sw, sw, n + j);
    end
    for (int unsigned j = 0; j < cw; j++) set_field(v, n*lw + j*sw, sw, (j < 4) ? n + j : 2*n + cw + 1);
    set_field(v, n*lw + cw*sw, sw, 2*n + cw);
    return v;
  endfunction

  function automatic cfgvec_t counter_cfg(int unsigned n, int unsigned cw, bit down);
    logic [15:0][3:0] tbl;
    for (int s = 0; s < 16; s++) tbl[s] = down ? 4'(s - 1) : 4'(s + 1);
    return fsm_cfg(n, cw, tbl);
  endfunction

  // Elements 0..3 register communication input bits 0..3 every cycle; port
  // data bit j = qx of element j, strobe = constant 1.
  function automatic cfgvec_t latch_cfg(int unsigned n, int unsigned cw);
    cfgvec_t v = '0;
    int unsigned sw = sel_w(n, cw);
    int unsigned lw = le_cfg_w(n, cw);
    for (int unsigned k = 0; k < 4; k++) begin
      v[k*lw +: 16] = 16'hAAAA;                       // lx = A
      v[k*lw + 16]  = 1'b1;
      set_field(v, k*lw + 17, sw, 2*n + k);            // A = comm_in[k]
    end
    for (int unsigned j = 0; j < cw; j++) set_field(v, n*lw + j*sw, sw, (j < 4) ? n + j : 2*n + cw + 1);
    set_field(v, n*lw + cw*sw, sw, 2*n + cw);
    return v;
  endfunction

endpackage
