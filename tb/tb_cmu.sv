// tb_cmu: the context manager with a local context memory and a behavioural
// 8-bit hidden scanpath. Checks the version check on restore (a stale
// version is refused and nothing is shifted), restore of a slot into the
// scanpath in CTX_BITS+1 cycles, save into a slot in CTX_BITS cycles with its
// tag, the non-destructive save, and refusal of busy or out-of-range commands.
module tb_cmu;
  import ollaf_pkg::*;
  localparam int unsigned N = 8, SLOTS = 4;
  logic clk = 1'b0;
  logic clr, cmd_valid, done, scan_en, scan_in, scan_out;
  mgr_cmd_t cmd;
  mgr_status_t status;
  logic [1:0] m_slot; logic [2:0] m_bit; logic m_re, m_we, m_wdata, m_rdata, m_tag_we;
  ctx_tag_t m_tag_wdata, m_tag, b_tag_rdata;
  logic b_en, b_we, b_tag_we; logic [1:0] b_addr, b_tag_slot; logic [31:0] b_wdata, b_rdata;
  ctx_tag_t b_tag_wdata;
  logic [N-1:0] chain;
  int checks = 0, failures = 0;

  cmu #(.CTX_BITS(N), .SLOTS(SLOTS)) dut (.*);
  lcm #(.SLOTS(SLOTS), .SLOT_BITS(N)) u_mem (
    .clk, .clr, .a_slot(m_slot), .a_bit(m_bit), .a_re(m_re), .a_we(m_we), .a_wdata(m_wdata),
    .a_rdata(m_rdata), .a_tag_we(m_tag_we), .a_tag_wdata(m_tag_wdata), .a_tag(m_tag),
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata, .b_tag_we, .b_tag_slot, .b_tag_wdata, .b_tag_rdata);

  // behavioural hidden scanpath: enters at bit 0, leaves from bit N-1
  always_ff @(posedge clk) if (scan_en) chain <= {chain[N-2:0], scan_in};
  assign scan_out = chain[N-1];

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  task automatic issue(input mop_e op, input int slot, input int ver);
    cmd = '{ver: 8'(ver), slot: 8'(slot), rsvd: '0, op: op};
    cmd_valid = 1;
    @(posedge clk); #1;
    cmd_valid = 0;
  endtask

  // cycles spent busy after the command was accepted; start counts busy
  // cycles already spent
  task automatic wait_idle(output int cyc, input int start = 0);
    cyc = start;
    while (status.busy) begin
      @(posedge clk); #1;
      cyc++;
    end
  endtask

  initial begin
    int cyc;
    logic [N-1:0] p, np;
    clr = 1; cmd_valid = 0; cmd = '0; b_en = 0; b_we = 0; b_addr = 0; b_wdata = 0;
    b_tag_we = 0; b_tag_slot = 0; b_tag_wdata = '0; chain = '0;
    @(posedge clk); #1 clr = 0;
    for (int t = 0; t < 8; t++) begin
      p = N'($urandom);
      // the supervisor puts context p, version 5+t, into slot 2
      b_en = 1; b_we = 1; b_addr = 2; b_wdata = 32'(p); b_tag_we = 1; b_tag_slot = 2;
      b_tag_wdata = '{valid: 1'b1, ver: 8'(5 + t)};
      @(posedge clk); #1;
      b_en = 0; b_we = 0; b_tag_we = 0;
      chain = ~p; np = ~p;
      issue(MOP_RESTORE, 2, 4 + t);             // stale version
      check(status.error, 1, "stale version refused");
      check(status.busy, 0, "nothing started");
      check(32'(chain), 32'(np), "scanpath untouched");
      issue(MOP_RESTORE, 2, 5 + t);
      check(status.error, 0, "restore accepted");
      wait_idle(cyc);
      check(cyc, N + 1, "restore cycles");
      check(32'(chain), 32'(p), "restored context");
      // save a new context into slot 3 with version 9+t
      p = N'($urandom); chain = p;
      issue(MOP_SAVE, 3, 9 + t);
      issue(MOP_SAVE, 1, 1);                     // arrives while busy
      check(status.error, 1, "busy command refused");
      wait_idle(cyc, 1);
      check(cyc, N, "save cycles");
      check(32'(chain), 32'(p), "save is non-destructive");
      b_en = 1; b_we = 0; b_addr = 3; b_tag_slot = 3;
      #1 check(32'(b_tag_rdata), {23'd0, 1'b1, 8'(9 + t)}, "saved tag");
      @(posedge clk); #1 b_en = 0;
      check(b_rdata[N-1:0], 32'(p), "saved context");
      b_tag_slot = 1; #1;
      check(32'(b_tag_rdata), 0, "refused save left slot 1 alone");
    end
    issue(MOP_SAVE, SLOTS, 1);
    check(status.error, 1, "out of range slot refused");
    check(status.done_cnt, 16, "completed transfers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
