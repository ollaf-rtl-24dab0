// tb_hcm: the configuration manager with a local configuration memory and a
// behavioural 40-bit hidden configuration scanpath. Checks that a slot
// arrives bit for bit in CFG_BITS+1 cycles, that the scanpath is only
// shifted during a transfer, and that save and out-of-range commands are
// refused.
module tb_hcm;
  import ollaf_pkg::*;
  localparam int unsigned N = 40, SLOTS = 3;
  logic clk = 1'b0;
  logic clr, cmd_valid, done, scan_en, scan_in;
  mgr_cmd_t cmd;
  mgr_status_t status;
  logic [1:0] m_slot; logic [5:0] m_bit; logic m_re, m_rdata;
  logic b_en, b_we; logic [2:0] b_addr; logic [31:0] b_wdata, b_rdata;
  logic [N-1:0] chain, p [SLOTS];
  int checks = 0, failures = 0, shifts = 0;

  hcm #(.CFG_BITS(N), .SLOTS(SLOTS)) dut (.*);
  lcm #(.SLOTS(SLOTS), .SLOT_BITS(N), .USE_TAGS(1'b0)) u_mem (
    .clk, .clr, .a_slot(m_slot), .a_bit(m_bit), .a_re(m_re), .a_we(1'b0), .a_wdata(1'b0),
    .a_rdata(m_rdata), .a_tag_we(1'b0), .a_tag_wdata('0), .a_tag(),
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata, .b_tag_we(1'b0), .b_tag_slot('0),
    .b_tag_wdata('0), .b_tag_rdata());

  always_ff @(posedge clk) if (scan_en) begin
    chain <= {chain[N-2:0], scan_in};
    shifts <= shifts + 1;
  end

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%0t %s: got %0h expected %0h", $time, what, got, exp);
    end
  endtask

  task automatic issue(input mop_e op, input int slot);
    cmd = '{ver: 8'd0, slot: 8'(slot), rsvd: '0, op: op};
    cmd_valid = 1;
    @(posedge clk); #1;
    cmd_valid = 0;
  endtask

  initial begin
    int cyc, s0;
    clr = 1; cmd_valid = 0; cmd = '0; b_en = 0; b_we = 0; b_addr = 0; b_wdata = 0; chain = '0;
    @(posedge clk); #1 clr = 0;
    for (int s = 0; s < SLOTS; s++) begin
      p[s] = {8'($urandom), 32'($urandom)};
      b_en = 1; b_we = 1; b_addr = 3'(2*s);     b_wdata = p[s][31:0];  @(posedge clk); #1;
      b_addr = 3'(2*s + 1); b_wdata = {24'd0, p[s][39:32]};        @(posedge clk); #1;
    end
    b_en = 0; b_we = 0;
    for (int r = 0; r < 6; r++) begin
      int s = r % SLOTS;
      s0 = shifts;
      issue(MOP_RESTORE, s);
      check(status.error, 0, "load accepted");
      cyc = 0;
      while (status.busy) begin @(posedge clk); #1; cyc++; end
      check(cyc, N + 1, "load cycles");
      check(chain, p[s], "configuration in scanpath");
      check(shifts - s0, N, "one shift per bit");
      s0 = shifts;
      repeat (3) @(posedge clk); #1;
      check(shifts - s0, 0, "idle: no shift");
    end
    issue(MOP_SAVE, 0);
    check(status.error, 1, "save refused");
    issue(MOP_RESTORE, SLOTS);
    check(status.error, 1, "slot out of range refused");
    check(status.busy, 0, "idle");
    check(status.done_cnt, 6, "completed loads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
