// lcm: local context / configuration memory of one column.
//
// Each column keeps a small store of contexts (or configurations) next to it,
// a first-level cache of the central repository: it holds the entries of the
// tasks most likely to run next on that column. The OLLAF architecture gives about ten
// entries per column; SLOTS defaults to 10. Each slot holds SLOT_BITS bits.
// For contexts (USE_TAGS = 1) every slot also carries a version tag, written
// by the context manager when it saves a context, which the supervisor uses
// to tell a current copy from a stale one.
//
// Storage is an array of 32-bit words, WPS words per slot, slot s starting at
// word s*WPS; bit b of a slot is bit b%32 of word b/32.
//   Port A (manager side, one bit per cycle): a_re reads the addressed bit,
//     the value appears on a_rdata after the next rising edge; a_we writes it.
//     a_tag is the tag of slot a_slot (combinational); a_tag_we sets it.
//   Port B (control bus side, 32-bit words): b_en/b_we, read data on b_rdata
//     one cycle later. b_tag_rdata is the tag of slot b_tag_slot.
// If both ports write the same word in one cycle, port A's bit wins. Word
// organisation, port widths and this priority are this design's choices.
module lcm #(
  parameter int unsigned SLOTS     = 10,
  parameter int unsigned SLOT_BITS = 32,
  parameter bit          USE_TAGS  = 1'b1,
  localparam int unsigned WPS  = (SLOT_BITS + 31) / 32,
  localparam int unsigned AW   = ollaf_pkg::sel_width(SLOTS * WPS),
  localparam int unsigned BW   = ollaf_pkg::sel_width(SLOT_BITS),
  localparam int unsigned SW   = ollaf_pkg::sel_width(SLOTS)
) (
  input  logic                  clk,
  input  logic                  clr,
  // port A: context/configuration manager
  input  logic [SW-1:0]         a_slot,
  input  logic [BW-1:0]         a_bit,
  input  logic                  a_re,
  input  logic                  a_we,
  input  logic                  a_wdata,
  output logic                  a_rdata,
  input  logic                  a_tag_we,
  input  ollaf_pkg::ctx_tag_t   a_tag_wdata,
  output ollaf_pkg::ctx_tag_t   a_tag,
  // port B: control bus
  input  logic                  b_en,
  input  logic                  b_we,
  input  logic [AW-1:0]         b_addr,
  input  logic [31:0]           b_wdata,
  output logic [31:0]           b_rdata,
  input  logic                  b_tag_we,
  input  logic [SW-1:0]         b_tag_slot,
  input  ollaf_pkg::ctx_tag_t   b_tag_wdata,
  output ollaf_pkg::ctx_tag_t   b_tag_rdata
);

  localparam int unsigned DEPTH = SLOTS * WPS;

  logic [31:0] mem [DEPTH];
  logic [AW-1:0] a_word;
  logic [4:0]    a_pos;

  assign a_word = AW'(int'(a_slot) * WPS + int'(a_bit) / 32);
  assign a_pos  = 5'(int'(a_bit) % 32);

  always_ff @(posedge clk) begin
    if (b_en && b_we && int'(b_addr) < DEPTH) mem[b_addr] <= b_wdata;
    if (a_we && int'(a_word) < DEPTH) mem[a_word][a_pos] <= a_wdata;
  end

  always_ff @(posedge clk) begin
    if (a_re && int'(a_word) < DEPTH) a_rdata <= mem[a_word][a_pos];
    if (b_en && !b_we) b_rdata <= (int'(b_addr) < DEPTH) ? mem[b_addr] : 32'h0;
  end

  if (USE_TAGS) begin : g_tags
    ollaf_pkg::ctx_tag_t tags [SLOTS];
    always_ff @(posedge clk) begin
      if (clr) begin
        for (int s = 0; s < SLOTS; s++) tags[s] <= '0;
      end else begin
        if (b_tag_we && int'(b_tag_slot) < SLOTS) tags[b_tag_slot] <= b_tag_wdata;
        if (a_tag_we && int'(a_slot) < SLOTS)     tags[a_slot]     <= a_tag_wdata;
      end
    end
    assign a_tag       = (int'(a_slot) < SLOTS)     ? tags[a_slot]     : '0;
    assign b_tag_rdata = (int'(b_tag_slot) < SLOTS) ? tags[b_tag_slot] : '0;
  end else begin : g_no_tags
    // Configuration memories carry no versions: every slot reads as untagged.
    assign a_tag       = '0;
    assign b_tag_rdata = '0;
  end

endmodule
