// tb_logic_column: a column of 8 elements runs a 4-bit up counter loaded
// through the hidden configuration and context scanpaths, then a down counter
// is shifted in behind it while it keeps counting. Checks: the active plane
// is untouched by shifting, the swap costs exactly one cycle (no element
// advances at the swap edge and the new task starts from its restored
// state), the outgoing context comes out of the scanpath intact, the
// communication port follows the state, and the task reset clears it.
module tb_logic_column;
  import ollaf_tb_pkg::*;
  localparam int unsigned N = 8, CW = 4;
  localparam int unsigned CFGW = cfg_w(N, CW);

  logic clk = 1'b0;
  logic clr, run, task_rst, ctx_swap, cfg_swap;
  logic ctx_scan_en, ctx_scan_in, ctx_scan_out, cfg_scan_en, cfg_scan_in, cfg_scan_out;
  logic [CW-1:0] comm_in, comm_out;
  logic comm_stb, ctx_sel, cfg_sel;
  logic [N-1:0] state;
  int checks = 0, failures = 0;

  logic_column #(.N_LE(N), .COMM_W(CW)) dut (.*);

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

  // Shift configuration and context into the hidden planes together,
  // checking every cycle that the running counter still advances by dir.
  task automatic load_hidden(input cfgvec_t cv, input logic [N-1:0] ctx, input int dir, input bit chk);
    logic [3:0] prev;
    for (int j = 0; j < CFGW; j++) begin
      cfg_scan_en = 1; cfg_scan_in = cv[CFGW-1-j];
      ctx_scan_en = (j < N); ctx_scan_in = (j < N) ? ctx[N-1-j] : 1'b0;
      prev = state[3:0];
      @(posedge clk); #1;
      if (chk) check(state[3:0], u4(int'(prev) + dir), "running during shift");
    end
    cfg_scan_en = 0; ctx_scan_en = 0;
  endtask

  initial begin
    logic [3:0] v;
    logic [N-1:0] out;
    clr = 1; run = 0; task_rst = 0; ctx_swap = 0; cfg_swap = 0;
    ctx_scan_en = 0; ctx_scan_in = 0; cfg_scan_en = 0; cfg_scan_in = 0; comm_in = '0;
    repeat (2) @(posedge clk);
    #1 clr = 0; run = 1;
    load_hidden(counter_cfg(N, CW, 1'b0), N'(5), 0, 1'b1);   // empty config: state holds 0
    check(state, 0, "idle before swap");
    ctx_swap = 1; cfg_swap = 1;
    @(posedge clk); #1;
    ctx_swap = 0; cfg_swap = 0;
    check(state, 5, "restored context after swap");
    check({ctx_sel, cfg_sel}, 2'b11, "plane selects");
    for (int i = 1; i <= 10; i++) begin
      @(posedge clk); #1;
      check(state[3:0], u4(5 + i), "up count");
      check(comm_out, u4(5 + i), "port data");
      check(comm_stb, 1, "port strobe");
    end
    // shift the next task in behind the running counter
    load_hidden(counter_cfg(N, CW, 1'b1), N'(9), 1, 1'b1);
    v = state[3:0];
    ctx_swap = 1; cfg_swap = 1;
    @(posedge clk); #1;
    ctx_swap = 0; cfg_swap = 0;
    check(state, 9, "second task starts from its context");
    @(posedge clk); #1;
    check(state, 8, "down count");
    // outgoing context: shift out, MSB first
    for (int j = 0; j < N; j++) begin
      out[N-1-j] = ctx_scan_out;
      ctx_scan_en = 1; ctx_scan_in = 0;
      @(posedge clk); #1;
    end
    ctx_scan_en = 0;
    check(out, N'(v), "saved context equals frozen state");
    // context-only swap: down counter config with the (now zero) hidden context
    v = state[3:0];
    ctx_swap = 1;
    @(posedge clk); #1;
    ctx_swap = 0;
    check(state, 0, "context swap keeps configuration");
    @(posedge clk); #1;
    check(state[3:0], 4'hF, "down count after context swap");
    task_rst = 1;
    @(posedge clk); #1;
    task_rst = 0;
    check(state, 0, "task reset");
    run = 0;
    repeat (3) @(posedge clk); #1;
    check(state, 0, "stopped column holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
