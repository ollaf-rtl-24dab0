// comm_medium: application communication medium of the OLLAF fabric.
//
// Each column has one port on the medium. Tasks exchange data through a set
// of exchange registers (channels) rather than through wires between
// columns, so a task's communication stays the same wherever it is placed and
// whether it is running or not: the supervisor binds each column's port to
// the channels of the task it currently holds.
//
//   Column c, each cycle: if its binding enables transmit and tx_stb[c] is
//     high, channel tx_ch takes tx_data[c] at the rising edge (when several
//     columns write one channel, the lowest column wins). rx_data[c] always
//     shows channel rx_ch.
//   Bus port (control bus target TGT_COMM): addr[8] = 0 reads or writes
//     channel addr[7:0] (a column writing the same channel wins); addr[8] = 1
//     reads or writes the binding of column addr[7:0]: bit 16 transmit
//     enable, bits 15:8 tx channel, bits 7:0 rx channel. Read data follows
//     one cycle after the request. After reset every channel is zero and
//     column c is bound to channel c with transmit disabled.
//
// The OLLAF architecture asks for a communication port per column and "some sort of
// exchange memories"; channel registers, bindings and the write priority are
// this design's choices.
module comm_medium #(
  parameter int unsigned N_COL  = 8,
  parameter int unsigned COMM_W = 4,
  parameter int unsigned N_CH   = N_COL
) (
  input  logic                          clk,
  input  logic                          clr,
  input  logic [N_COL-1:0][COMM_W-1:0]  tx_data,
  input  logic [N_COL-1:0]              tx_stb,
  output logic [N_COL-1:0][COMM_W-1:0]  rx_data,
  // control bus port
  input  logic                          en,
  input  logic                          we,
  input  logic [15:0]                   addr,
  input  logic [31:0]                   wdata,
  output logic [31:0]                   rdata
);

  typedef struct packed {
    logic       tx_en;
    logic [7:0] tx_ch;
    logic [7:0] rx_ch;
  } bind_t;

  logic [N_CH-1:0][COMM_W-1:0] chan;
  bind_t                       binding [N_COL];

  always_ff @(posedge clk) begin
    if (clr) begin
      chan <= '0;
      for (int c = 0; c < N_COL; c++)
        binding[c] <= '{tx_en: 1'b0, tx_ch: 8'(c), rx_ch: 8'(c)};
    end else begin
      if (en && we && !addr[8] && int'(addr[7:0]) < N_CH)
        chan[addr[7:0]] <= wdata[COMM_W-1:0];
      if (en && we && addr[8] && int'(addr[7:0]) < N_COL)
        binding[addr[7:0]] <= bind_t'(wdata[16:0]);
      // columns last, highest first, so the lowest column has the final word
      for (int c = N_COL - 1; c >= 0; c--)
        if (binding[c].tx_en && tx_stb[c] && int'(binding[c].tx_ch) < N_CH)
          chan[binding[c].tx_ch] <= tx_data[c];
    end
  end

  always_comb begin
    for (int c = 0; c < N_COL; c++)
      rx_data[c] = (int'(binding[c].rx_ch) < N_CH) ? chan[binding[c].rx_ch] : '0;
  end

  always_ff @(posedge clk) begin
    if (clr) rdata <= '0;
    else if (en && !we) begin
      if (!addr[8])
        rdata <= (int'(addr[7:0]) < N_CH) ? 32'(chan[addr[7:0]]) : 32'd0;
      else
        rdata <= (int'(addr[7:0]) < N_COL) ? 32'(binding[addr[7:0]]) : 32'd0;
    end
  end

endmodule
