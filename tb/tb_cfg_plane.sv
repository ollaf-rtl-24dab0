// tb_cfg_plane: shifts random configurations into the hidden plane while the
// active one must stay unchanged, swaps, and checks that bit k of the word
// (sent MSB first) lands in configuration point k; also checks scan_out.
module tb_cfg_plane;
  localparam int unsigned W = 24;
  logic clk = 1'b0;
  logic clr, sel, scan_en, scan_in, scan_out;
  logic [W-1:0] cfg, active_m, word;
  int checks = 0, failures = 0;

  cfg_plane #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1; sel = 0; scan_en = 0; scan_in = 0;
    @(posedge clk); #1 clr = 0; active_m = '0;
    for (int t = 0; t < 20; t++) begin
      word = W'($urandom) ^ (W'($urandom) << 13);
      for (int j = 0; j < W; j++) begin
        scan_en = 1; scan_in = word[W-1-j];
        @(posedge clk); #1;
        checks++; if (cfg !== active_m) failures++;
      end
      scan_en = 0;
      checks++; if (scan_out !== word[W-1]) failures++;
      sel = ~sel; #1;
      checks++;
      if (cfg !== word) begin
        failures++;
        $display("after swap %0d: cfg=%h expected %h", t, cfg, word);
      end
      active_m = word;
      @(posedge clk); #1;
      checks++; if (cfg !== word) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
