// tb_ctrl_bus: drives random requests into the control bus with behavioural
// slaves (each returns a fixed word) and checks column selection, the
// communication medium select, the multi-column swap pulses and the routing
// of read data one cycle later.
module tb_ctrl_bus;
  import ollaf_pkg::*;
  localparam int unsigned NC = 4;
  logic clk = 1'b0;
  logic clr;
  cb_req_t m_req;
  cb_rsp_t m_rsp;
  logic [NC-1:0] col_sel, ctx_swap, cfg_swap;
  logic [NC-1:0][31:0] col_rdata;
  logic comm_en;
  logic [31:0] comm_rdata;
  int checks = 0, failures = 0, swaps = 0;

  ctrl_bus #(.N_COL(NC)) dut (.*);

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
    logic [31:0] exp_d; logic exp_v;
    clr = 1; m_req = '0;
    for (int c = 0; c < NC; c++) col_rdata[c] = 32'hC000_0000 | 32'(c);
    comm_rdata = 32'hCCCC_0001;
    @(posedge clk); #1 clr = 0;
    exp_v = 0; exp_d = 0;
    for (int i = 0; i < 3000; i++) begin
      logic [NC-1:0] es, ex, eg;
      m_req.valid = 1'($urandom); m_req.we = 1'($urandom);
      m_req.col = 8'($urandom % (NC + 1)); m_req.tgt = cb_tgt_e'($urandom);
      m_req.addr = 16'($urandom); m_req.wdata = $urandom;
      #1;
      for (int c = 0; c < NC; c++) begin
        es[c] = m_req.valid && m_req.tgt != TGT_COMM && m_req.tgt != TGT_SWAP && m_req.col == c;
        ex[c] = m_req.valid && m_req.we && m_req.tgt == TGT_SWAP && m_req.wdata[c] && m_req.wdata[30];
        eg[c] = m_req.valid && m_req.we && m_req.tgt == TGT_SWAP && m_req.wdata[c] && m_req.wdata[31];
      end
      if (ex != 0 || eg != 0) swaps++;
      check(32'(col_sel), 32'(es), "column select");
      check(32'(ctx_swap), 32'(ex), "context swap");
      check(32'(cfg_swap), 32'(eg), "config swap");
      check(32'(comm_en), 32'(m_req.valid && m_req.tgt == TGT_COMM), "comm select");
      check(32'(m_rsp.rvalid), 32'(exp_v), "rvalid");
      if (exp_v) check(m_rsp.rdata, exp_d, "read data");
      exp_v = m_req.valid && !m_req.we;
      if (m_req.tgt == TGT_COMM) exp_d = comm_rdata;
      else if (m_req.tgt != TGT_SWAP && m_req.col < NC) exp_d = col_rdata[m_req.col];
      else exp_d = 0;
      @(posedge clk); #1;
    end
    if (swaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
