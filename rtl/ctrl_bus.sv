// ctrl_bus: dedicated control bus from the hardware supervisor to the columns.
//
// One master (the supervisor) issues requests (ollaf_pkg::cb_req_t); the bus
// broadcasts the request fields, raises the select of the addressed column,
// or of the communication medium for TGT_COMM, and returns the addressed
// slave's read data one cycle later with rvalid set. A write to TGT_SWAP is
// handled by the bus itself: wdata bit c selects column c, bit 30 swaps the
// context planes and bit 31 the configuration planes of all selected columns
// in the same clock cycle, which is how a task that spans several columns is
// switched at once. Reads of TGT_SWAP or of a column that does not exist
// return zero. The OLLAF architecture only names the control bus; its protocol is this
// design's choice. Every request completes in one cycle; there is no wait.
module ctrl_bus #(
  parameter int unsigned N_COL = 8
) (
  input  logic                       clk,
  input  logic                       clr,
  // master
  input  ollaf_pkg::cb_req_t         m_req,
  output ollaf_pkg::cb_rsp_t         m_rsp,
  // columns
  output logic [N_COL-1:0]           col_sel,
  input  logic [N_COL-1:0][31:0]     col_rdata,
  output logic [N_COL-1:0]           ctx_swap,
  output logic [N_COL-1:0]           cfg_swap,
  // communication medium
  output logic                       comm_en,
  input  logic [31:0]                comm_rdata
);
  import ollaf_pkg::*;

  typedef enum logic [1:0] {SRC_NONE, SRC_COL, SRC_COMM} src_e;

  logic                     col_tgt, swap_wr;
  src_e                     rd_src;
  logic [CB_CW-1:0]         rd_col;
  logic                     rd_valid;

  assign col_tgt = m_req.valid && m_req.tgt != TGT_COMM && m_req.tgt != TGT_SWAP;
  assign comm_en = m_req.valid && m_req.tgt == TGT_COMM;
  assign swap_wr = m_req.valid && m_req.we && m_req.tgt == TGT_SWAP;

  always_comb begin
    for (int c = 0; c < N_COL; c++) begin
      col_sel[c]  = col_tgt && int'(m_req.col) == c;
      ctx_swap[c] = swap_wr && m_req.wdata[c] && m_req.wdata[SWAP_CTX_BIT];
      cfg_swap[c] = swap_wr && m_req.wdata[c] && m_req.wdata[SWAP_CFG_BIT];
    end
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      rd_valid <= 1'b0;
      rd_src   <= SRC_NONE;
      rd_col   <= '0;
    end else begin
      rd_valid <= m_req.valid && !m_req.we;
      rd_col   <= m_req.col;
      if (comm_en)                               rd_src <= SRC_COMM;
      else if (col_tgt && int'(m_req.col) < N_COL) rd_src <= SRC_COL;
      else                                       rd_src <= SRC_NONE;
    end
  end

  always_comb begin
    m_rsp.rvalid = rd_valid;
    unique case (rd_src)
      SRC_COL:  m_rsp.rdata = col_rdata[rd_col];
      SRC_COMM: m_rsp.rdata = comm_rdata;
      default:  m_rsp.rdata = '0;
    endcase
  end

  initial assert (N_COL <= SWAP_CTX_BIT) else $error("ctrl_bus: at most 30 columns fit the swap mask");

endmodule
