// tb_lcm: random single-bit accesses on the manager port and word accesses
// on the bus port of a 4-slot, 40-bit memory, compared with a reference
// array; also checks the version tags, their clear, and port A priority.
module tb_lcm;
  import ollaf_pkg::*;
  localparam int unsigned SLOTS = 4, SB = 40, WPS = 2, DEPTH = SLOTS * WPS;
  logic clk = 1'b0;
  logic clr;
  logic [1:0] a_slot; logic [5:0] a_bit; logic a_re, a_we, a_wdata, a_rdata, a_tag_we;
  ctx_tag_t a_tag_wdata, a_tag, b_tag_wdata, b_tag_rdata;
  logic b_en, b_we, b_tag_we; logic [2:0] b_addr; logic [31:0] b_wdata, b_rdata;
  logic [1:0] b_tag_slot;
  logic [31:0] m [DEPTH];
  ctx_tag_t mt [SLOTS];
  int checks = 0, failures = 0;

  lcm #(.SLOTS(SLOTS), .SLOT_BITS(SB), .USE_TAGS(1'b1)) dut (.*);

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
    logic exp_a; logic [31:0] exp_b; logic chk_a, chk_b;
    clr = 1; a_re = 0; a_we = 0; a_tag_we = 0; b_en = 0; b_we = 0; b_tag_we = 0;
    a_slot = 0; a_bit = 0; a_wdata = 0; a_tag_wdata = '0; b_addr = 0; b_wdata = 0;
    b_tag_slot = 0; b_tag_wdata = '0;
    @(posedge clk); #1 clr = 0;
    for (int s = 0; s < SLOTS; s++) begin
      b_tag_slot = 2'(s); a_slot = 2'(s); #1;
      check(32'(b_tag_rdata), 0, "tag cleared"); check(32'(a_tag), 0, "tag cleared A");
      mt[s] = '0;
    end
    // fill through port B
    for (int w = 0; w < DEPTH; w++) begin
      b_en = 1; b_we = 1; b_addr = 3'(w); b_wdata = $urandom; m[w] = b_wdata;
      @(posedge clk); #1;
    end
    b_en = 0;
    chk_a = 0; chk_b = 0; exp_a = 0; exp_b = 0;
    for (int i = 0; i < 3000; i++) begin
      int aw, ap;
      a_slot = 2'($urandom); a_bit = 6'($urandom % SB);
      a_re = 1'($urandom); a_we = ($urandom % 3) == 0; a_wdata = 1'($urandom);
      a_tag_we = ($urandom % 8) == 0; a_tag_wdata = ctx_tag_t'($urandom);
      b_en = 1'($urandom); b_we = 1'($urandom); b_addr = 3'($urandom); b_wdata = $urandom;
      b_tag_we = ($urandom % 8) == 0; b_tag_slot = 2'($urandom); b_tag_wdata = ctx_tag_t'($urandom);
      #1;
      check(32'(a_tag), 32'(mt[a_slot]), "tag A");
      check(32'(b_tag_rdata), 32'(mt[b_tag_slot]), "tag B");
      aw = a_slot * WPS + a_bit / 32; ap = a_bit % 32;
      @(posedge clk);
      if (chk_a) check(32'(a_rdata), 32'(exp_a), "port A read");
      if (chk_b) check(b_rdata, exp_b, "port B read");
      chk_a = a_re; exp_a = m[aw][ap];
      chk_b = b_en && !b_we; exp_b = m[b_addr];
      if (b_en && b_we) m[b_addr] = b_wdata;
      if (a_we) m[aw][ap] = a_wdata;
      if (b_tag_we) mt[b_tag_slot] = b_tag_wdata;
      if (a_tag_we) mt[a_slot] = a_tag_wdata;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
