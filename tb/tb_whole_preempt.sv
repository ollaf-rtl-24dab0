// tb_whole_preempt: preemption of the whole fabric at its default size.
//
// Every one of the 8 columns runs its own 4-bit up counter (task T1, started
// from context c). A down counter (task T2, context 15-c) is restored behind
// each of them, all columns in parallel, and one global swap exchanges all
// 256 flip-flops and all 8 configurations at once. Over a window of 40 cycles
// around the swap the testbench counts, per column, the cycles in which a
// task made progress; the overhead H is the number of cycles without
// progress and must be 1, as for a single column. The efficiency
// 1 - H/P for an OS tick P of 10^6 cycles is printed. Afterwards all T1
// contexts are saved in parallel and checked against the frozen states.
module tb_whole_preempt;
  import ollaf_pkg::*;
  import ollaf_tb_pkg::*;
  localparam int unsigned NCOL = 8, N = 32, CW = 4;
  localparam int unsigned CFGW = cfg_w(N, CW), CFG_WORDS = (CFGW + 31) / 32;
  localparam int unsigned CCR_AW = sel_width(128 * CFG_WORDS);
  localparam int unsigned WIN = 40, PRE = 20;

  logic clk = 1'b0;
  logic rst_n;
  cb_req_t cb_req;
  cb_rsp_t cb_rsp;
  logic [NCOL-1:0] col_run, col_ctx_sel, col_cfg_sel, col_cmu_busy, col_hcm_busy;
  logic [NCOL-1:0][N-1:0] col_state;
  logic [31:0] ccr_rdata;
  ctx_tag_t ccr_tag_rdata;
  int checks = 0, failures = 0;

  ollaf_top dut (
    .clk, .rst_n, .cb_req, .cb_rsp,
    .ccr_en(1'b0), .ccr_we(1'b0), .ccr_addr('0), .ccr_wdata('0), .ccr_rdata,
    .ccr_tag_we(1'b0), .ccr_tag_slot('0), .ccr_tag_wdata('0), .ccr_tag_rdata,
    .col_run, .col_ctx_sel, .col_cfg_sel, .col_cmu_busy, .col_hcm_busy, .col_state);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  task automatic wr(input int col, input cb_tgt_e tgt, input int addr, input logic [31:0] data);
    cb_req = '{valid: 1'b1, we: 1'b1, col: 8'(col), tgt: tgt, addr: 16'(addr), wdata: data};
    @(posedge clk); #1;
    cb_req.valid = 0;
  endtask

  task automatic rd(input int col, input cb_tgt_e tgt, input int addr, output logic [31:0] data);
    cb_req = '{valid: 1'b1, we: 1'b0, col: 8'(col), tgt: tgt, addr: 16'(addr), wdata: '0};
    @(posedge clk); #1;
    cb_req.valid = 0;
    data = cb_rsp.rdata;
  endtask

  function automatic logic [31:0] cmdw(mop_e op, int slot, int ver);
    mgr_cmd_t c = '{ver: 8'(ver), slot: 8'(slot), rsvd: '0, op: op};
    return c;
  endfunction

  task automatic wait_all_idle();
    while (col_hcm_busy != 0 || col_cmu_busy != 0) begin @(posedge clk); #1; end
  endtask

  task automatic restore_all(input int slot);
    for (int c = 0; c < NCOL; c++) begin
      wr(c, TGT_HCM, 0, cmdw(MOP_RESTORE, slot, 0));
      wr(c, TGT_CMU, 0, cmdw(MOP_RESTORE, slot, 1));
    end
    wait_all_idle();
  endtask

  function automatic logic [3:0] u4(int x);
    return x[3:0];
  endfunction

  initial begin
    logic [31:0] d;
    logic [NCOL-1:0][3:0] prev, frozen;
    logic [NCOL-1:0] down;
    int progress [NCOL];
    cfgvec_t up = counter_cfg(N, CW, 1'b0), dn = counter_cfg(N, CW, 1'b1);
    rst_n = 0; cb_req = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int c = 0; c < NCOL; c++) begin
      for (int w = 0; w < CFG_WORDS; w++) begin
        wr(c, TGT_CFGMEM, w, up[32*w +: 32]);
        wr(c, TGT_CFGMEM, CFG_WORDS + w, dn[32*w +: 32]);
      end
      wr(c, TGT_CTXMEM, 0, 32'(c));       wr(c, TGT_TAG, 0, 32'h101);
      wr(c, TGT_CTXMEM, 1, 32'(15 - c));  wr(c, TGT_TAG, 1, 32'h101);
      wr(c, TGT_COL, COL_CTRL, 1);
    end
    restore_all(0);
    wr(0, TGT_SWAP, 0, 32'hC000_0000 | 32'((1 << NCOL) - 1));
    for (int c = 0; c < NCOL; c++) check(col_state[c], c, "T1 start state");
    restore_all(1);
    // window around the global swap
    for (int c = 0; c < NCOL; c++) begin progress[c] = 0; down[c] = 0; end
    for (int t = 0; t < WIN; t++) begin
      for (int c = 0; c < NCOL; c++) prev[c] = col_state[c][3:0];
      if (t == PRE) begin
        frozen = prev;
        cb_req = '{valid: 1'b1, we: 1'b1, col: 8'd0, tgt: TGT_SWAP, addr: '0,
                   wdata: 32'hC000_0000 | 32'((1 << NCOL) - 1)};
      end
      @(posedge clk); #1;
      cb_req.valid = 0;
      for (int c = 0; c < NCOL; c++) begin
        if (t == PRE) check(col_state[c], 15 - c, "T2 restored state after the swap");
        else if (!down[c] && col_state[c][3:0] == u4(int'(prev[c]) + 1)) progress[c]++;
        else if ( down[c] && col_state[c][3:0] == u4(int'(prev[c]) - 1)) progress[c]++;
        if (t == PRE) down[c] = 1;
      end
    end
    for (int c = 0; c < NCOL; c++) begin
      check(WIN - progress[c], 1, "preemption overhead H (cycles)");
    end
    $display("whole-fabric preemption: %0d flip-flops, %0d configuration bits, H = %0d cycle(s), efficiency 1 - %0d/1000000",
             NCOL * N, NCOL * CFGW, WIN - progress[0], WIN - progress[0]);
    // save every T1 context in parallel, then check
    for (int c = 0; c < NCOL; c++) wr(c, TGT_CMU, 0, cmdw(MOP_SAVE, 2, 2));
    wait_all_idle();
    for (int c = 0; c < NCOL; c++) begin
      rd(c, TGT_CTXMEM, 2, d);
      check(d, 32'(frozen[c]), "saved T1 context");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
