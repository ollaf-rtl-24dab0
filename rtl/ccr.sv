// ccr: Central Context/Configuration Repository of the hardware supervisor.
//
// The large memory, reserved for the operating system, that holds the
// configuration and the latest context of every task instance. Local memories
// of the columns act as caches in front of it; the supervisor copies entries
// between the two over the control bus, and keeps here the version number of
// every saved context so that it can tell which copy is current.
//
// SLOTS entries (the OLLAF architecture asks for "more than 100"; 128 here), each of
// SLOT_WORDS 32-bit words, which the default sizes to one configuration of
// the default column (1699 bits in 54 words). Word w of slot s is at address
// s*SLOT_WORDS + w. Single port, writes at the rising edge, read data one
// cycle after en with we low. Beside the data, one version tag per slot
// (valid flag and version), read combinationally. Port and organisation are
// this design's choices.
module ccr #(
  parameter int unsigned SLOTS      = 128,
  parameter int unsigned SLOT_WORDS = 54,
  localparam int unsigned DEPTH = SLOTS * SLOT_WORDS,
  localparam int unsigned AW    = ollaf_pkg::sel_width(DEPTH),
  localparam int unsigned SW    = ollaf_pkg::sel_width(SLOTS)
) (
  input  logic                  clk,
  input  logic                  clr,
  input  logic                  en,
  input  logic                  we,
  input  logic [AW-1:0]         addr,
  input  logic [31:0]           wdata,
  output logic [31:0]           rdata,
  input  logic                  tag_we,
  input  logic [SW-1:0]         tag_slot,
  input  ollaf_pkg::ctx_tag_t   tag_wdata,
  output ollaf_pkg::ctx_tag_t   tag_rdata
);

  logic [31:0]         mem  [DEPTH];
  ollaf_pkg::ctx_tag_t tags [SLOTS];

  always_ff @(posedge clk) begin
    if (en && int'(addr) < DEPTH) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      for (int s = 0; s < SLOTS; s++) tags[s] <= '0;
    end else if (tag_we && int'(tag_slot) < SLOTS) begin
      tags[tag_slot] <= tag_wdata;
    end
  end

  assign tag_rdata = (int'(tag_slot) < SLOTS) ? tags[tag_slot] : '0;

endmodule
