// tb_col_interconnect: random sources and selects, each routed output
// compared with a reference built from the documented source list,
// including the feed-forward rule for lx sources.
module tb_col_interconnect;
  localparam int unsigned N = 4, CW = 2;
  localparam int unsigned NS = 2 * N + CW + 1;
  localparam int unsigned SW = ollaf_pkg::sel_width(NS);
  logic [N-1:0] lx, qx;
  logic [CW-1:0] comm_in, comm_out;
  logic [N*5*SW-1:0] le_sel;
  logic [(CW+1)*SW-1:0] out_sel;
  logic [N-1:0][3:0] abcd;
  logic [N-1:0] ce;
  logic comm_stb;
  int checks = 0, failures = 0;

  col_interconnect #(.N_LE(N), .COMM_W(CW)) dut (.*);

  function automatic logic ref_src(int unsigned k, int unsigned le = N);
    if (k < N) return (k < le) ? lx[k] : 1'b0;
    if (k < 2*N) return qx[k-N];
    if (k < 2*N+CW) return comm_in[k-2*N];
    if (k == 2*N+CW) return 1'b1;
    return 1'b0;
  endfunction

  task automatic check(input logic got, input logic exp);
    checks++;
    if (got !== exp) failures++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      lx = N'($urandom); qx = N'($urandom); comm_in = CW'($urandom);
      for (int i = 0; i < N*5; i++) le_sel[i*SW +: SW] = SW'($urandom);
      for (int i = 0; i <= CW; i++) out_sel[i*SW +: SW] = SW'($urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        for (int j = 0; j < 4; j++) check(abcd[i][j], ref_src(le_sel[(5*i+j)*SW +: SW], i));
        check(ce[i], ref_src(le_sel[(5*i+4)*SW +: SW], i));
      end
      for (int j = 0; j < CW; j++) check(comm_out[j], ref_src(out_sel[j*SW +: SW]));
      check(comm_stb, ref_src(out_sel[CW*SW +: SW]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
