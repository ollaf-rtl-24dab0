// tb_dual_plane_ff: random test of one dual plane memory point against a
// two-register reference model; checks q and cs_out every cycle and that a
// plane swap exchanges the run and scan values.
module tb_dual_plane_ff;
  logic clk = 1'b0;
  logic clr, csrs, d, run_en, rst, cs_in, scan_en, q, cs_out;
  logic m1, m2;
  int checks = 0, failures = 0, swaps = 0;

  dual_plane_ff dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1'b1; csrs = 0; d = 0; run_en = 0; rst = 0; cs_in = 0; scan_en = 0;
    @(posedge clk); #1;
    clr = 1'b0; m1 = 0; m2 = 0;
    for (int i = 0; i < 2000; i++) begin
      logic nsel;
      d = 1'($urandom); run_en = 1'($urandom); rst = ($urandom % 8) == 0;
      cs_in = 1'($urandom); scan_en = 1'($urandom);
      nsel = (($urandom % 6) == 0) ? ~csrs : csrs;
      if (nsel != csrs) swaps++;
      csrs = nsel;
      #1;
      checks++;
      if (q !== (csrs ? m2 : m1) || cs_out !== (csrs ? m1 : m2)) begin
        failures++;
        if (failures < 5) $display("mismatch at %0d: q=%b cs_out=%b m1=%b m2=%b sel=%b", i, q, cs_out, m1, m2, csrs);
      end
      @(posedge clk);
      if (!csrs) begin
        if (rst) m1 = 0; else if (run_en) m1 = d;
        if (scan_en) m2 = cs_in;
      end else begin
        if (rst) m2 = 0; else if (run_en) m2 = d;
        if (scan_en) m1 = cs_in;
      end
      #1;
    end
    if (swaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
