// tb_ollaf_top: end-to-end run of the whole fabric at its default size
// (8 columns of 32 elements), with the testbench playing the hardware
// supervisor on the control bus and the central repository port.
//
// Scenario:
//   1. The configurations of three tasks are written into the central
//      repository and copied from there into the columns' local memories.
//   2. T1, a 4-bit up counter, is restored into column 0 and swapped in.
//      A restore with a stale version is refused first.
//   3. T3, a task spanning columns 1 and 2, is restored into both and
//      swapped in with one global swap: each column registers what it
//      receives on the communication medium, column 1 from T1's channel 0 and
//      column 2 from column 1's channel 1.
//   4. T2, a down counter, is restored behind T1 while T1 runs; the swap
//      costs one cycle; T1's context is saved with a new version, checked,
//      and copied back to the repository with its tag.
//   5. T1 is resumed from its hidden plane (context and configuration swap
//      back) and continues from where it stopped; a context-only swap is
//      exercised; a task reset clears column 0.
// Every mechanism is counted and a mechanism that never happened is a
// failure.
module tb_ollaf_top;
  import ollaf_pkg::*;
  import ollaf_tb_pkg::*;
  localparam int unsigned NCOL = 8, N = 32, CW = 4;
  localparam int unsigned CFGW = cfg_w(N, CW), CFG_WORDS = (CFGW + 31) / 32;
  localparam int unsigned CCR_AW = sel_width(128 * CFG_WORDS);

  logic clk = 1'b0;
  logic rst_n;
  cb_req_t cb_req;
  cb_rsp_t cb_rsp;
  logic ccr_en, ccr_we, ccr_tag_we;
  logic [CCR_AW-1:0] ccr_addr;
  logic [31:0] ccr_wdata, ccr_rdata;
  logic [6:0] ccr_tag_slot;
  ctx_tag_t ccr_tag_wdata, ccr_tag_rdata;
  logic [NCOL-1:0] col_run, col_ctx_sel, col_cfg_sel, col_cmu_busy, col_hcm_busy;
  logic [NCOL-1:0][N-1:0] col_state;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_cfg_restore = 0, n_ctx_restore = 0, n_ctx_save = 0, n_version_refused = 0;
  int n_swap = 0, n_multi_swap = 0, n_ctx_only_swap = 0, n_comm = 0, n_ccr_copy = 0;
  int n_run_during_transfer = 0, n_task_reset = 0, n_resume = 0;

  ollaf_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  task automatic wr(input int col, input cb_tgt_e tgt, input int addr, input logic [31:0] data);
    cb_req = '{valid: 1'b1, we: 1'b1, col: 8'(col), tgt: tgt, addr: 16'(addr), wdata: data};
    @(posedge clk); #1;
    cb_req.valid = 0;
  endtask

  task automatic rd(input int col, input cb_tgt_e tgt, input int addr, output logic [31:0] data);
    cb_req = '{valid: 1'b1, we: 1'b0, col: 8'(col), tgt: tgt, addr: 16'(addr), wdata: '0};
    @(posedge clk); #1;
    cb_req.valid = 0;
    if (!cb_rsp.rvalid) begin failures++; $display("missing rvalid"); end
    data = cb_rsp.rdata;
  endtask

  function automatic logic [31:0] cmdw(mop_e op, int slot, int ver);
    mgr_cmd_t c = '{ver: 8'(ver), slot: 8'(slot), rsvd: '0, op: op};
    return c;
  endfunction

  task automatic ccr_store(input int slot, input cfgvec_t cv);
    for (int w = 0; w < CFG_WORDS; w++) begin
      ccr_en = 1; ccr_we = 1; ccr_addr = CCR_AW'(slot * CFG_WORDS + w); ccr_wdata = cv[32*w +: 32];
      @(posedge clk); #1;
    end
    ccr_en = 0; ccr_we = 0;
  endtask

  // copy a configuration from the repository into a column's local memory
  task automatic ccr_to_lcm(input int slot, input int col, input int lslot);
    for (int w = 0; w < CFG_WORDS; w++) begin
      ccr_en = 1; ccr_we = 0; ccr_addr = CCR_AW'(slot * CFG_WORDS + w);
      @(posedge clk); #1;
      ccr_en = 0;
      wr(col, TGT_CFGMEM, lslot * CFG_WORDS + w, ccr_rdata);
    end
    n_ccr_copy++;
  endtask

  task automatic put_ctx(input int col, input int lslot, input int ctx, input int ver);
    wr(col, TGT_CTXMEM, lslot, 32'(ctx));
    wr(col, TGT_TAG, lslot, {23'd0, 1'b1, 8'(ver)});
  endtask

  // issue a restore on both managers of a column and wait for the end,
  // returning the number of cycles the HCM was busy
  task automatic restore(input int col, input int lslot, input int ver, output int cyc);
    logic [31:0] d;
    wr(col, TGT_HCM, 0, cmdw(MOP_RESTORE, lslot, 0));
    wr(col, TGT_CMU, 0, cmdw(MOP_RESTORE, lslot, ver));
    rd(col, TGT_CMU, 0, d);
    check(d[1], 0, "restore accepted");
    cyc = 3;     // cycles already spent since the HCM command edge
    while (col_hcm_busy[col] || col_cmu_busy[col]) begin @(posedge clk); #1; cyc++; end
    n_cfg_restore++; n_ctx_restore++;
  endtask

  initial begin
    logic [31:0] d;
    logic [3:0] prev, frozen, c1;
    int cyc;
    cfgvec_t up = counter_cfg(N, CW, 1'b0), down = counter_cfg(N, CW, 1'b1), lat = latch_cfg(N, CW);
    rst_n = 0; cb_req = '0; ccr_en = 0; ccr_we = 0; ccr_addr = '0; ccr_wdata = '0;
    ccr_tag_we = 0; ccr_tag_slot = '0; ccr_tag_wdata = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;

    // 1. repository and local memories
    ccr_store(0, up); ccr_store(1, down); ccr_store(2, lat);
    ccr_to_lcm(0, 0, 0);
    ccr_to_lcm(1, 0, 1);
    ccr_to_lcm(2, 1, 0);
    ccr_to_lcm(2, 2, 0);
    rd(0, TGT_CFGMEM, CFG_WORDS + 3, d);  check(d, down[32*3 +: 32], "local configuration copy");
    // communication bindings: col0 -> ch0 -> col1 -> ch1 -> col2 -> ch2
    wr(0, TGT_COMM, 16'h100, {15'd0, 1'b1, 8'd0, 8'd0});
    wr(0, TGT_COMM, 16'h101, {15'd0, 1'b1, 8'd1, 8'd0});
    wr(0, TGT_COMM, 16'h102, {15'd0, 1'b1, 8'd2, 8'd1});

    // 2. T1 on column 0
    put_ctx(0, 0, 3, 1);
    wr(0, TGT_CMU, 0, cmdw(MOP_RESTORE, 0, 7));
    rd(0, TGT_CMU, 0, d);
    check(d[1], 1, "stale version refused");
    if (d[1]) n_version_refused++;
    restore(0, 0, 1, cyc);
    check(cyc, CFGW + 1 + 1, "configuration restore latency (cycles)");
    $display("restore latency of one column: %0d cycles for %0d configuration bits", cyc, CFGW);
    wr(0, TGT_COL, COL_CTRL, 1);
    wr(0, TGT_COL, COL_SWAP, 3);
    n_swap++;
    check(col_state[0], 3, "T1 starts from its context");

    // 3. T3 on columns 1 and 2, one global swap
    put_ctx(1, 0, 0, 1); put_ctx(2, 0, 0, 1);
    restore(1, 0, 1, cyc);
    restore(2, 0, 1, cyc);
    wr(1, TGT_COL, COL_CTRL, 1);
    wr(2, TGT_COL, COL_CTRL, 1);
    wr(0, TGT_SWAP, 0, (32'd1 << SWAP_CTX_BIT) | (32'd1 << SWAP_CFG_BIT) | 32'b110);
    check(32'(col_cfg_sel[2:1]), 3, "both columns swapped in the same cycle");
    check(32'(col_ctx_sel[2:1]), 3, "both context planes swapped");
    n_multi_swap++;
    repeat (3) @(posedge clk); #1;
    begin
      logic [3:0] h0 [2], h1 [2];
      h0[1] = col_state[0][3:0]; h1[1] = col_state[1][3:0];
      @(posedge clk); #1;
      h0[0] = col_state[0][3:0]; h1[0] = col_state[1][3:0];
      for (int i = 0; i < 20; i++) begin
        @(posedge clk); #1;
        // a value crosses the medium in two cycles: into the channel register,
        // then into the receiving column's flip-flops
        check(32'(col_state[1][3:0]), 32'(h0[1]), "column 1 receives channel 0");
        check(32'(col_state[2][3:0]), 32'(h1[1]), "column 2 receives channel 1");
        if (col_state[1][3:0] == h0[1]) n_comm++;
        h0[1] = h0[0]; h1[1] = h1[0];
        h0[0] = col_state[0][3:0]; h1[0] = col_state[1][3:0];
      end
    end
    wr(2, TGT_COL, COL_CTRL, 0);          // stop column 2, its output settles
    repeat (2) @(posedge clk); #1;
    rd(0, TGT_COMM, 2, d);
    check(d, 32'(col_state[2][3:0]), "channel 2 read by the supervisor");
    // global context-only swap of columns 1 and 2, there and back
    wr(0, TGT_SWAP, 0, (32'd1 << SWAP_CTX_BIT) | 32'b110);
    check(32'(col_ctx_sel[2:1]), 0, "global context-only swap");
    check(32'(col_cfg_sel[2:1]), 3, "configuration planes untouched");
    wr(0, TGT_SWAP, 0, (32'd1 << SWAP_CTX_BIT) | 32'b110);
    check(32'(col_ctx_sel[2:1]), 3, "context planes swapped back");
    n_ctx_only_swap++;

    // 4. T2 restored behind T1, swap, save T1
    put_ctx(0, 1, 12, 1);
    wr(0, TGT_HCM, 0, cmdw(MOP_RESTORE, 1, 0));
    wr(0, TGT_CMU, 0, cmdw(MOP_RESTORE, 1, 1));
    while (col_hcm_busy[0] || col_cmu_busy[0]) begin
      prev = col_state[0][3:0];
      @(posedge clk); #1;
      check(32'(col_state[0][3:0]), 32'(u4(int'(prev) + 1)), "T1 runs during the transfer");
      n_run_during_transfer++;
    end
    n_cfg_restore++; n_ctx_restore++;
    frozen = col_state[0][3:0];
    wr(0, TGT_COL, COL_SWAP, 3);
    n_swap++;
    check(col_state[0], 12, "T2 starts from its context right after the swap cycle");
    @(posedge clk); #1;
    check(col_state[0], 11, "T2 counts down");
    wr(0, TGT_CMU, 0, cmdw(MOP_SAVE, 2, 2));
    while (col_cmu_busy[0]) begin @(posedge clk); #1; end
    n_ctx_save++;
    rd(0, TGT_TAG, 2, d);     check(d, 32'h102, "saved context version");
    rd(0, TGT_CTXMEM, 2, d);  check(d, 32'(frozen), "saved context is T1's frozen state");
    // copy the saved context and its version to the repository (slot 3)
    ccr_en = 1; ccr_we = 1; ccr_addr = CCR_AW'(3 * CFG_WORDS); ccr_wdata = d;
    ccr_tag_we = 1; ccr_tag_slot = 3; ccr_tag_wdata = '{valid: 1'b1, ver: 8'd2};
    @(posedge clk); #1;
    ccr_we = 0; ccr_tag_we = 0;
    @(posedge clk); #1;
    ccr_en = 0;
    check(ccr_rdata, 32'(frozen), "context in the repository");
    check(32'(ccr_tag_rdata), 32'h102, "version in the repository");

    // 5. resume T1 from the hidden planes (save left them intact)
    wr(0, TGT_COL, COL_SWAP, 3);
    n_swap++;
    check(col_state[0], 32'(frozen), "T1 resumes where it stopped");
    @(posedge clk); #1;
    check(32'(col_state[0][3:0]), 32'(u4(int'(frozen) + 1)), "T1 counts on");
    if (col_state[0][3:0] == frozen + 4'd1) n_resume++;
    // context-only swap: T1's configuration with T2's saved-behind context
    d = 32'(col_cfg_sel[0]);
    wr(0, TGT_COL, COL_SWAP, 1);
    n_ctx_only_swap++;
    check(32'(col_cfg_sel[0]), d, "configuration plane unchanged");
    c1 = col_state[0][3:0];
    @(posedge clk); #1;
    check(32'(col_state[0][3:0]), 32'(u4(int'(c1) + 1)), "up counting on the swapped context");
    wr(0, TGT_COL, COL_RESET, 1);
    check(col_state[0], 0, "task reset");
    n_task_reset++;

    $display("mechanisms: cfg_restore=%0d ctx_restore=%0d ctx_save=%0d version_refused=%0d swap=%0d multi_column_swap=%0d ctx_only_swap=%0d comm=%0d ccr_copy=%0d run_during_transfer=%0d resume=%0d task_reset=%0d",
             n_cfg_restore, n_ctx_restore, n_ctx_save, n_version_refused, n_swap, n_multi_swap,
             n_ctx_only_swap, n_comm, n_ccr_copy, n_run_during_transfer, n_resume, n_task_reset);
    if (n_cfg_restore == 0) failures++;
    if (n_ctx_restore == 0) failures++;
    if (n_ctx_save == 0) failures++;
    if (n_version_refused == 0) failures++;
    if (n_swap == 0) failures++;
    if (n_multi_swap == 0) failures++;
    if (n_ctx_only_swap == 0) failures++;
    if (n_comm == 0) failures++;
    if (n_ccr_copy == 0) failures++;
    if (n_run_during_transfer == 0) failures++;
    if (n_resume == 0) failures++;
    if (n_task_reset == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
