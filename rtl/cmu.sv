// cmu: Context Management Unit of one column.
//
// The CMU moves contexts between the hidden plane of the column's dual-plane
// context scanpath and the column's local context memory, one bit per clock,
// while the task in the run plane keeps executing. Commands (ollaf_pkg::
// mgr_cmd_t) come from the supervisor:
//   MOP_RESTORE slot, ver : the slot's tag must be valid and equal to ver,
//       otherwise the command is refused (error set, nothing shifted). The
//       slot is then shifted into the hidden plane. CTX_BITS+1 cycles (one
//       cycle of memory read latency, then one shift per bit).
//   MOP_SAVE slot, ver    : the hidden plane is shifted out into the slot and
//       the slot is tagged valid with version ver. CTX_BITS cycles. The bits
//       leaving the scanpath are fed back into it, so the hidden plane still
//       holds the context afterwards.
// A command that arrives while busy, or names a slot beyond SLOTS, is refused.
// Bit k of a slot is the flip-flop of element k: the CMU sends or receives
// bit CTX_BITS-1 first.
//
// From the OLLAF architecture: the CMU transfers contexts between scanpath and local
// memory and tags each saved context with a version number kept by the
// operating system. The command format, the hardware check of the version on
// restore and the non-destructive save are this design's choices.
module cmu #(
  parameter int unsigned CTX_BITS = 32,
  parameter int unsigned SLOTS    = 10,
  localparam int unsigned BW = ollaf_pkg::sel_width(CTX_BITS),
  localparam int unsigned SW = ollaf_pkg::sel_width(SLOTS),
  localparam int unsigned CW = ollaf_pkg::sel_width(CTX_BITS + 1)
) (
  input  logic                    clk,
  input  logic                    clr,
  input  logic                    cmd_valid,
  input  ollaf_pkg::mgr_cmd_t     cmd,
  output ollaf_pkg::mgr_status_t  status,
  output logic                    done,       // one-cycle pulse at the end of a transfer
  // hidden context scanpath
  output logic                    scan_en,
  output logic                    scan_in,
  input  logic                    scan_out,
  // local context memory, port A
  output logic [SW-1:0]           m_slot,
  output logic [BW-1:0]           m_bit,
  output logic                    m_re,
  output logic                    m_we,
  output logic                    m_wdata,
  input  logic                    m_rdata,
  output logic                    m_tag_we,
  output ollaf_pkg::ctx_tag_t     m_tag_wdata,
  input  ollaf_pkg::ctx_tag_t     m_tag
);
  import ollaf_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_RESTORE, S_SAVE} state_e;

  state_e          state;
  logic [CW-1:0]   cnt;
  logic [SW-1:0]   slot_r;
  logic [VER_W-1:0] ver_r;
  logic            error;
  logic [15:0]     done_cnt;
  logic            cmd_ok;

  // A command is accepted when idle, the slot exists, and for a restore the
  // slot holds a valid context of the requested version.
  always_comb begin
    cmd_ok = 1'b0;
    if (state == S_IDLE && int'(cmd.slot) < SLOTS) begin
      unique case (cmd.op)
        MOP_RESTORE: cmd_ok = m_tag.valid && (m_tag.ver == cmd.ver);
        MOP_SAVE:    cmd_ok = 1'b1;
        default:     cmd_ok = 1'b0;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      state    <= S_IDLE;
      cnt      <= '0;
      slot_r   <= '0;
      ver_r    <= '0;
      error    <= 1'b0;
      done_cnt <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (cmd_valid) begin
            error <= !cmd_ok;
            if (cmd_ok) begin
              slot_r <= SW'(cmd.slot);
              ver_r  <= cmd.ver;
              cnt    <= '0;
              state  <= (cmd.op == MOP_SAVE) ? S_SAVE : S_RESTORE;
            end
          end
        end
        S_RESTORE: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == CTX_BITS) begin
            state    <= S_IDLE;
            done_cnt <= done_cnt + 1'b1;
          end
          if (cmd_valid) error <= 1'b1;
        end
        S_SAVE: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == CTX_BITS - 1) begin
            state    <= S_IDLE;
            done_cnt <= done_cnt + 1'b1;
          end
          if (cmd_valid) error <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    m_slot      = (state == S_IDLE) ? SW'(cmd.slot) : slot_r;
    m_bit       = '0;
    m_re        = 1'b0;
    m_we        = 1'b0;
    m_wdata     = scan_out;
    m_tag_we    = 1'b0;
    m_tag_wdata = '{valid: 1'b1, ver: ver_r};
    scan_en     = 1'b0;
    scan_in     = 1'b0;
    done        = 1'b0;
    unique case (state)
      S_RESTORE: begin
        if (int'(cnt) < CTX_BITS) begin
          m_re  = 1'b1;
          m_bit = BW'(CTX_BITS - 1 - int'(cnt));
        end
        if (cnt != '0) begin
          scan_en = 1'b1;
          scan_in = m_rdata;
        end
        done = (int'(cnt) == CTX_BITS);
      end
      S_SAVE: begin
        m_we     = 1'b1;
        m_bit    = BW'(CTX_BITS - 1 - int'(cnt));
        scan_en  = 1'b1;
        scan_in  = scan_out;
        m_tag_we = (int'(cnt) == CTX_BITS - 1);
        done     = m_tag_we;
      end
      default: ;
    endcase
  end

  assign status = '{done_cnt: done_cnt, rsvd: '0, error: error, busy: (state != S_IDLE)};

endmodule
