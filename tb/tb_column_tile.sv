// tb_column_tile: one column with its managers and local memories, driven
// only through its control bus slave. A 4-bit up counter (configuration and
// context loaded into the local memories, restored by HCM and CMU, then
// swapped in) is preempted by a down counter that was restored behind it
// while it ran; the outgoing context is saved with a new version and read
// back. Also checks the version refusal, register reads, the global swap
// inputs, the task reset and the port on the communication medium.
module tb_column_tile;
  import ollaf_pkg::*;
  import ollaf_tb_pkg::*;
  localparam int unsigned N = 8, CW = 4, SLOTS = 4;
  localparam int unsigned CFGW = cfg_w(N, CW), CFG_WORDS = (CFGW + 31) / 32;

  logic clk = 1'b0;
  logic clr, sel, g_ctx_swap, g_cfg_swap, comm_stb, run, ctx_sel, cfg_sel, cmu_busy, hcm_busy;
  cb_req_t req;
  logic [31:0] rdata;
  logic [CW-1:0] comm_in, comm_out;
  logic [N-1:0] state;
  int checks = 0, failures = 0;

  column_tile #(.N_LE(N), .COMM_W(CW), .LCM_SLOTS(SLOTS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] u4(int x);
    return x[3:0];
  endfunction

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%0t %s: got %0h expected %0h", $time, what, got, exp);
    end
  endtask

  task automatic wr(input cb_tgt_e tgt, input int addr, input logic [31:0] data);
    req = '{valid: 1'b1, we: 1'b1, col: '0, tgt: tgt, addr: 16'(addr), wdata: data};
    sel = 1;
    @(posedge clk); #1;
    req.valid = 0; sel = 0;
  endtask

  task automatic rd(input cb_tgt_e tgt, input int addr, output logic [31:0] data);
    req = '{valid: 1'b1, we: 1'b0, col: '0, tgt: tgt, addr: 16'(addr), wdata: '0};
    sel = 1;
    @(posedge clk); #1;
    req.valid = 0; sel = 0;
    data = rdata;
  endtask

  task automatic wait_idle();
    logic [31:0] s1, s2;
    do begin rd(TGT_CMU, 0, s1); rd(TGT_HCM, 0, s2); end while (s1[0] || s2[0]);
  endtask

  task automatic load_task(input int slot, input cfgvec_t cv, input int ctx, input int ver);
    for (int w = 0; w < CFG_WORDS; w++) wr(TGT_CFGMEM, slot * CFG_WORDS + w, cv[32*w +: 32]);
    wr(TGT_CTXMEM, slot, 32'(ctx));
    wr(TGT_TAG, slot, {23'd0, 1'b1, 8'(ver)});
  endtask

  function automatic logic [31:0] cmdw(mop_e op, int slot, int ver);
    mgr_cmd_t c = '{ver: 8'(ver), slot: 8'(slot), rsvd: '0, op: op};
    return c;
  endfunction

  initial begin
    logic [31:0] d;
    logic [3:0] prev, frozen;
    cfgvec_t up = counter_cfg(N, CW, 1'b0), down = counter_cfg(N, CW, 1'b1);
    clr = 1; sel = 0; req = '0; g_ctx_swap = 0; g_cfg_swap = 0; comm_in = '0;
    repeat (2) @(posedge clk); #1 clr = 0;
    load_task(0, up, 3, 1);
    rd(TGT_CFGMEM, 1, d);            check(d, up[32 +: 32], "config word read back");
    rd(TGT_TAG, 0, d);               check(d, 32'h101, "tag read back");
    wr(TGT_CMU, 0, cmdw(MOP_RESTORE, 0, 2));
    rd(TGT_CMU, 0, d);               check(d[1:0], 2'b10, "stale version refused");
    wr(TGT_HCM, 0, cmdw(MOP_RESTORE, 0, 0));
    wr(TGT_CMU, 0, cmdw(MOP_RESTORE, 0, 1));
    wait_idle();
    wr(TGT_COL, COL_CTRL, 1);
    wr(TGT_COL, COL_SWAP, 3);
    check(state, 3, "first task starts from its context");
    rd(TGT_COL, COL_CTRL, d);        check(d, 7, "control register");
    // context-only swap there and back: configuration plane stays put
    wr(TGT_COL, COL_SWAP, 1);
    check({30'd0, cfg_sel, ctx_sel}, 2'b10, "context-only swap");
    wr(TGT_COL, COL_SWAP, 1);
    check({30'd0, cfg_sel, ctx_sel}, 2'b11, "context swapped back");
    check(32'(comm_out), 32'(state[3:0] ), "port follows state");
    check(comm_stb, 1, "port strobe");
    // second task restored behind the running one
    load_task(1, down, 10, 1);
    wr(TGT_HCM, 0, cmdw(MOP_RESTORE, 1, 0));
    wr(TGT_CMU, 0, cmdw(MOP_RESTORE, 1, 1));
    prev = state[3:0];
    @(posedge clk); #1;
    check(32'(state[3:0]), 32'(u4(int'(prev) + 1)), "runs while restoring");
    wait_idle();
    frozen = state[3:0];
    g_ctx_swap = 1; g_cfg_swap = 1;
    @(posedge clk); #1;
    g_ctx_swap = 0; g_cfg_swap = 0;
    check(state, 10, "preempting task starts from its context");
    @(posedge clk); #1;
    check(state, 9, "down count");
    wr(TGT_CMU, 0, cmdw(MOP_SAVE, 2, 2));
    wait_idle();
    rd(TGT_TAG, 2, d);               check(d, 32'h102, "saved version tag");
    rd(TGT_CTXMEM, 2, d);            check(d[N-1:0], 32'(frozen), "saved context");
    rd(TGT_CMU, 0, d);               check(d[31:16], 3, "CMU transfers");
    rd(TGT_HCM, 0, d);               check(d[31:16], 2, "HCM transfers");
    wr(TGT_COL, COL_RESET, 1);
    check(state, 0, "task reset");
    wr(TGT_COL, COL_CTRL, 0);
    d = 32'(state);
    repeat (3) @(posedge clk); #1;
    check(32'(state), d, "stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
