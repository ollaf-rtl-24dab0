// tb_ccr: writes every word of a small repository, reads it back in random
// order with one cycle of latency, and checks the version tags.
module tb_ccr;
  import ollaf_pkg::*;
  localparam int unsigned SLOTS = 6, SW_ = 5, DEPTH = SLOTS * SW_;
  logic clk = 1'b0;
  logic clr, en, we, tag_we;
  logic [4:0] addr;
  logic [2:0] tag_slot;
  logic [31:0] wdata, rdata, m [DEPTH];
  ctx_tag_t tag_wdata, tag_rdata, mt [SLOTS];
  int checks = 0, failures = 0;

  ccr #(.SLOTS(SLOTS), .SLOT_WORDS(SW_)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%0t %s: got %0h expected %0h", $time, what, got, exp);
    end
  endtask

  initial begin
    clr = 1; en = 0; we = 0; addr = 0; wdata = 0; tag_we = 0; tag_slot = 0; tag_wdata = '0;
    @(posedge clk); #1 clr = 0;
    for (int s = 0; s < SLOTS; s++) begin
      tag_slot = 3'(s); #1; check(32'(tag_rdata), 0, "tags clear"); mt[s] = '0;
    end
    for (int w = 0; w < DEPTH; w++) begin
      en = 1; we = 1; addr = 5'(w); wdata = $urandom; m[w] = wdata;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 500; i++) begin
      int a = $urandom % DEPTH;
      en = 1; we = 0; addr = 5'(a);
      tag_we = 1'($urandom); tag_slot = 3'($urandom % SLOTS); tag_wdata = ctx_tag_t'($urandom);
      @(posedge clk); #1;
      check(rdata, m[a], "read back");
      if (tag_we) mt[tag_slot] = tag_wdata;
      tag_we = 0; #1;
      check(32'(tag_rdata), 32'(mt[tag_slot]), "tag");
      if ($urandom % 4 == 0) begin
        en = 1; we = 1; wdata = $urandom; m[a] = wdata;
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
