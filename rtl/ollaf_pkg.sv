// ollaf_pkg: types and constants shared by the OLLAF fabric.
//
// The control bus carries one request per cycle from the hardware supervisor
// to the columns, the communication medium and the global swap register.
// A request names a column, a target inside that column and a word address;
// writes take effect at the clock edge, read data comes back one cycle later
// with rvalid set. The bus format, the target map and the command word of the
// context/configuration managers are this design's own choices: the OLLAF
// architecture only says that a dedicated control bus links the supervisor to all columns.
package ollaf_pkg;

  localparam int unsigned CB_DW  = 32;  // control bus data width
  localparam int unsigned CB_AW  = 16;  // word address inside a target
  localparam int unsigned CB_CW  = 8;   // column number
  localparam int unsigned VER_W  = 8;   // context version tag width

  // Targets of a control bus request.
  typedef enum logic [2:0] {
    TGT_CMU    = 3'd0,  // write: CMU command, read: CMU status
    TGT_HCM    = 3'd1,  // write: HCM command, read: HCM status
    TGT_CTXMEM = 3'd2,  // local context memory, 32-bit words
    TGT_CFGMEM = 3'd3,  // local configuration memory, 32-bit words
    TGT_TAG    = 3'd4,  // context version tags, address = slot
    TGT_COL    = 3'd5,  // column control registers
    TGT_COMM   = 3'd6,  // communication medium (column number ignored)
    TGT_SWAP   = 3'd7   // multi-column plane swap (column number ignored)
  } cb_tgt_e;

  typedef struct packed {
    logic                valid;
    logic                we;
    logic [CB_CW-1:0]    col;
    cb_tgt_e             tgt;
    logic [CB_AW-1:0]    addr;
    logic [CB_DW-1:0]    wdata;
  } cb_req_t;

  typedef struct packed {
    logic                rvalid;
    logic [CB_DW-1:0]    rdata;
  } cb_rsp_t;

  // Column control register addresses (TGT_COL).
  localparam logic [CB_AW-1:0] COL_CTRL  = 16'd0;  // bit0 run; read adds plane selects
  localparam logic [CB_AW-1:0] COL_RESET = 16'd1;  // write: one-cycle task reset of the run plane
  localparam logic [CB_AW-1:0] COL_SWAP  = 16'd2;  // write: bit0 swap context plane, bit1 swap config plane

  // Global swap word (TGT_SWAP): column mask in the low bits.
  localparam int unsigned SWAP_CTX_BIT = 30;
  localparam int unsigned SWAP_CFG_BIT = 31;

  // Operation of a context (CMU) or configuration (HCM) manager.
  typedef enum logic [1:0] {
    MOP_NONE    = 2'd0,
    MOP_RESTORE = 2'd1,  // LCM slot -> hidden plane
    MOP_SAVE    = 2'd2   // hidden plane -> LCM slot (CMU only)
  } mop_e;

  // Command word written to TGT_CMU / TGT_HCM.
  typedef struct packed {
    logic [VER_W-1:0] ver;    // [31:24] version to check (restore) or to tag (save)
    logic [7:0]       slot;   // [23:16] LCM slot
    logic [13:0]      rsvd;   // [15:2]
    mop_e             op;     // [1:0]
  } mgr_cmd_t;

  // Status word read from TGT_CMU / TGT_HCM.
  typedef struct packed {
    logic [15:0] done_cnt;    // [31:16] completed transfers since reset
    logic [13:0] rsvd;        // [15:2]
    logic        error;       // [1] last command refused
    logic        busy;        // [0]
  } mgr_status_t;

  // Tag word of a context slot: valid flag and version.
  typedef struct packed {
    logic             valid;
    logic [VER_W-1:0] ver;
  } ctx_tag_t;

  // Select width of an interconnect multiplexor with n sources.
  function automatic int unsigned sel_width(int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
