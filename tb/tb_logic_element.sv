// tb_logic_element: checks the LUT function for every input value of random
// LUT contents, the clock enable (routed and forced), the functional reset,
// and the hidden context scan plane with a plane swap.
module tb_logic_element;
  logic clk = 1'b0;
  logic clr, ce, rst, run_en, cfg_ce_force, csrs, scan_en, cs_in, cs_out, lx, qx;
  logic [3:0]  abcd;
  logic [15:0] cfg_lut;
  logic run_m, scan_m;
  int checks = 0, failures = 0;

  logic_element dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 8) $display("%s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    clr = 1; ce = 0; rst = 0; run_en = 0; cfg_ce_force = 0; csrs = 0; scan_en = 0; cs_in = 0;
    abcd = 0; cfg_lut = 0;
    @(posedge clk); #1 clr = 0; run_m = 0; scan_m = 0;
    // combinational LUT
    for (int t = 0; t < 20; t++) begin
      cfg_lut = 16'($urandom);
      for (int a = 0; a < 16; a++) begin
        abcd = 4'(a); #1;
        check(lx, cfg_lut[a], "lx");
      end
    end
    // sequential behaviour against a model
    for (int i = 0; i < 3000; i++) begin
      cfg_lut = 16'($urandom); abcd = 4'($urandom); ce = 1'($urandom);
      cfg_ce_force = ($urandom % 4) == 0; rst = ($urandom % 10) == 0; run_en = ($urandom % 8) != 0;
      scan_en = 1'($urandom); cs_in = 1'($urandom);
      if (($urandom % 10) == 0) begin
        logic t;
        csrs = ~csrs; t = run_m; run_m = scan_m; scan_m = t;
      end
      #1;
      check(qx, run_m, "qx");
      check(cs_out, scan_m, "cs_out");
      @(posedge clk);
      if (rst) run_m = 0; else if (run_en && (ce || cfg_ce_force)) run_m = cfg_lut[abcd];
      if (scan_en) scan_m = cs_in;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
