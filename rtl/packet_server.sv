// packet_server: global on-chip memory that holds the bodies of in-flight packets.
//
// Packets are not passed from kernel to kernel; only their header vector is.
// The whole packet stays here, in one of SLOTS fixed-size slots, from the time
// the ingress receives it until the deparser sends it out. The memory has two
// ports because an on-chip block RAM has two, so exactly two kernels use it:
// the ingress writes on port A and the deparser reads on port B, and no
// arbitration is needed.
//
// Port A: a_we writes a_data to word a_widx of slot a_slot.
// Port B: b_re reads word b_widx of slot b_slot; b_data shows it the next clock
// and keeps it until the next b_re. A read of a word written in the same clock
// returns the old contents.
// The two-port limit and the role of the memory follow the source text; the slot
// layout, word width and the split of one write port and one read port are this
// design's choice.
module packet_server
  import router_pkg::*;
#(
  parameter int unsigned N_SLOTS   = SLOTS,
  parameter int unsigned N_WORDS   = SLOT_WORDS,
  parameter int unsigned W         = WORD_W
) (
  input  logic                       clk,
  input  logic                       a_we,
  input  logic [$clog2(N_SLOTS)-1:0] a_slot,
  input  logic [$clog2(N_WORDS)-1:0] a_widx,
  input  logic [W-1:0]               a_data,
  input  logic                       b_re,
  input  logic [$clog2(N_SLOTS)-1:0] b_slot,
  input  logic [$clog2(N_WORDS)-1:0] b_widx,
  output logic [W-1:0]               b_data
);
  localparam int unsigned DEPTH = N_SLOTS * N_WORDS;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW-1:0] a_addr, b_addr;

  assign a_addr = AW'(a_slot) * AW'(N_WORDS) + AW'(a_widx);
  assign b_addr = AW'(b_slot) * AW'(N_WORDS) + AW'(b_widx);

  always_ff @(posedge clk)
    if (a_we) mem[a_addr] <= a_data;

  always_ff @(posedge clk)
    if (b_re) b_data <= mem[b_addr];
endmodule
