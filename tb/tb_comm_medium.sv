// tb_comm_medium: random column traffic and bus accesses on a 4-column
// medium, compared with a reference model of channels and bindings; checks
// the reset bindings, transmit enable, lowest-column priority, receive
// routing and one-cycle bus reads.
module tb_comm_medium;
  localparam int unsigned NC = 4, CW = 4;
  logic clk = 1'b0;
  logic clr, en, we;
  logic [NC-1:0][CW-1:0] tx_data, rx_data;
  logic [NC-1:0] tx_stb;
  logic [15:0] addr;
  logic [31:0] wdata, rdata;
  logic [CW-1:0] ch [NC];
  logic [16:0] bnd [NC];
  int checks = 0, failures = 0, collisions = 0;

  comm_medium #(.N_COL(NC), .COMM_W(CW)) dut (.*);

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
    logic [31:0] exp_r; logic chk_r;
    clr = 1; en = 0; we = 0; addr = 0; wdata = 0; tx_data = '0; tx_stb = '0;
    @(posedge clk); #1 clr = 0;
    for (int c = 0; c < NC; c++) begin
      ch[c] = '0; bnd[c] = {1'b0, 8'(c), 8'(c)};
      en = 1; we = 0; addr = 16'h100 | 16'(c);
      @(posedge clk); #1;
      check(rdata, 32'(bnd[c]), "reset binding");
    end
    chk_r = 0; exp_r = 0;
    for (int i = 0; i < 3000; i++) begin
      int nw;
      tx_data = (NC*CW)'($urandom); tx_stb = NC'($urandom);
      en = ($urandom % 3) == 0; we = 1'($urandom);
      addr = 1'($urandom) ? (16'h100 | 16'($urandom % (NC + 1))) : 16'($urandom % (NC + 1));
      wdata = {15'd0, 1'($urandom), 6'd0, 2'($urandom), 6'd0, 2'($urandom)};
      #1;
      for (int c = 0; c < NC; c++) check(32'(rx_data[c]), 32'(ch[bnd[c][7:0]]), "rx routing");
      @(posedge clk);
      if (chk_r) check(rdata, exp_r, "bus read");
      chk_r = en && !we;
      if (chk_r) exp_r = addr[8] ? ((addr[7:0] < NC) ? 32'(bnd[addr[7:0]]) : 0)
                                 : ((addr[7:0] < NC) ? 32'(ch[addr[7:0]]) : 0);
      if (en && we && !addr[8] && addr[7:0] < NC) ch[addr[7:0]] = wdata[CW-1:0];
      nw = 0;
      for (int c = NC - 1; c >= 0; c--)
        if (bnd[c][16] && tx_stb[c]) begin
          ch[bnd[c][15:8]] = tx_data[c];
          nw++;
        end
      if (nw > 1) collisions++;
      // a new binding applies from the next cycle on
      if (en && we && addr[8] && addr[7:0] < NC) bnd[addr[7:0]] = wdata[16:0];
      #1;
    end
    if (collisions == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
