// hcm: Hardware Configuration Manager of one column.
//
// A simplified context manager without a saving mechanism: on MOP_RESTORE it
// shifts one configuration from the column's local configuration memory into
// the hidden configuration plane, one bit per clock, while the task in the
// active plane keeps running. Configurations never change during execution,
// so there is no save and no version check. The transfer takes CFG_BITS+1
// cycles (one cycle of memory read latency, then one shift per bit), bit
// CFG_BITS-1 first so that bit k lands in configuration point k. MOP_SAVE, a
// command while busy or a slot beyond SLOTS is refused and sets error.
//
// From the OLLAF architecture: one HCM per column, same scheme as the CMU without
// saving. The command format is this design's choice.
module hcm #(
  parameter int unsigned CFG_BITS = 64,
  parameter int unsigned SLOTS    = 10,
  localparam int unsigned BW = ollaf_pkg::sel_width(CFG_BITS),
  localparam int unsigned SW = ollaf_pkg::sel_width(SLOTS),
  localparam int unsigned CW = ollaf_pkg::sel_width(CFG_BITS + 1)
) (
  input  logic                    clk,
  input  logic                    clr,
  input  logic                    cmd_valid,
  input  ollaf_pkg::mgr_cmd_t     cmd,
  output ollaf_pkg::mgr_status_t  status,
  output logic                    done,
  // hidden configuration scanpath
  output logic                    scan_en,
  output logic                    scan_in,
  // local configuration memory, port A (read only)
  output logic [SW-1:0]           m_slot,
  output logic [BW-1:0]           m_bit,
  output logic                    m_re,
  input  logic                    m_rdata
);
  import ollaf_pkg::*;

  logic            busy;
  logic [CW-1:0]   cnt;
  logic [SW-1:0]   slot_r;
  logic            error;
  logic [15:0]     done_cnt;
  logic            cmd_ok;

  assign cmd_ok = !busy && (cmd.op == MOP_RESTORE) && (int'(cmd.slot) < SLOTS);

  always_ff @(posedge clk) begin
    if (clr) begin
      busy     <= 1'b0;
      cnt      <= '0;
      slot_r   <= '0;
      error    <= 1'b0;
      done_cnt <= '0;
    end else begin
      if (cmd_valid) error <= !cmd_ok;
      if (cmd_valid && cmd_ok) begin
        busy   <= 1'b1;
        slot_r <= SW'(cmd.slot);
        cnt    <= '0;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
        if (int'(cnt) == CFG_BITS) begin
          busy     <= 1'b0;
          done_cnt <= done_cnt + 1'b1;
        end
      end
    end
  end

  always_comb begin
    m_slot  = slot_r;
    m_re    = busy && (int'(cnt) < CFG_BITS);
    m_bit   = m_re ? BW'(CFG_BITS - 1 - int'(cnt)) : '0;
    scan_en = busy && (cnt != '0);
    scan_in = m_rdata;
    done    = busy && (int'(cnt) == CFG_BITS);
  end

  assign status = '{done_cnt: done_cnt, rsvd: '0, error: error, busy: busy};

endmodule
