// ingress: receives packets, parks them in the packet server and starts their PHV.
//
// Packets arrive as a stream of WORD_W-bit words (Avalon-ST style: valid/ready,
// start and end of packet, number of empty bytes in the last word, source port).
// At the start of a packet the ingress takes the next packet-server slot and
// writes each word of the packet into it. While doing so it keeps the first 34
// bytes, the Ethernet and IPv4 header, and at the last word it writes one PHV
// to its output channel: the raw header plus the ingress port, the length in
// bytes and the slot. Slots are handed out in ring order and come back in the
// same order, because every later kernel keeps packet order; free_valid from the
// deparser returns the oldest slot. When all slots are taken the ingress holds
// in_ready low (back-pressure), and it also waits while the PHV channel is full.
// A packet shorter than the header (runt) or longer than a slot (the excess is
// not stored) is marked drop.
//
// Timing: one word per clock; the PHV is written in the clock that accepts the
// last word. The source text gives the job (build the PHV with ingress port,
// length and packet address); the ring allocation and the drop rules are this
// design's choice.
module ingress
  import router_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // packet stream in
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [WORD_W-1:0]  in_data,
  input  logic               in_sop,
  input  logic               in_eop,
  input  logic [EMPTY_W-1:0] in_empty,
  input  logic [PORT_W-1:0]  in_port,
  // packet server write port
  output logic               ps_we,
  output logic [SLOT_W-1:0]  ps_slot,
  output logic [WIDX_W-1:0]  ps_widx,
  output logic [WORD_W-1:0]  ps_data,
  // PHV channel out
  output logic               phv_valid,
  input  logic               phv_ready,
  output phv_t               phv,
  // slot released by the deparser
  input  logic               free_valid,
  output logic [SLOT_W:0]    slots_used
);
  logic              in_pkt;
  logic [SLOT_W-1:0] next_slot, cur_slot;
  logic [LEN_W-1:0]  widx;          // index of the word being received
  logic [WORD_W-1:0] word0;         // first word of the packet
  logic [15:0]       word1_hi;      // bytes 32..33 of the packet
  logic              oversize;
  logic              take, alloc;
  logic [LEN_W-1:0]  w;             // index of the accepted word
  logic [SLOT_W-1:0] s;             // slot of the accepted word
  hdr_t              hdr_now;
  logic [LEN_W-1:0]  len_now;

  assign in_ready = phv_ready && (in_pkt || (slots_used < (SLOT_W+1)'(SLOTS)));
  assign take     = in_valid && in_ready;
  assign alloc    = take && !in_pkt;
  assign w        = in_pkt ? widx : '0;
  assign s        = in_pkt ? cur_slot : next_slot;

  assign ps_we    = take && (w < LEN_W'(SLOT_WORDS));
  assign ps_slot  = s;
  assign ps_widx  = WIDX_W'(w);
  assign ps_data  = in_data;

  // Header bytes 0..33: word 0 gives bytes 0..31, word 1 bytes 32..33.
  always_comb begin
    if (w == '0)            hdr_now = hdr_t'({in_data, 16'h0});
    else if (w == LEN_W'(1)) hdr_now = hdr_t'({word0, in_data[WORD_W-1 -: 16]});
    else                    hdr_now = hdr_t'({word0, word1_hi});
    len_now = LEN_W'((w + 1'b1) * LEN_W'(WORD_BYTES)) - LEN_W'(in_empty);
  end

  always_comb begin
    phv_valid = take && in_eop;
    phv       = '0;
    phv.hdr             = hdr_now;
    phv.meta.in_port    = in_port;
    phv.meta.pkt_len    = len_now;
    phv.meta.slot       = s;
    phv.meta.drop       = (len_now < LEN_W'(HDR_BYTES)) || oversize ||
                          (w >= LEN_W'(SLOT_WORDS));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      in_pkt     <= 1'b0;
      next_slot  <= '0;
      cur_slot   <= '0;
      widx       <= '0;
      word0      <= '0;
      word1_hi   <= '0;
      oversize   <= 1'b0;
      slots_used <= '0;
    end else begin
      slots_used <= slots_used + (SLOT_W+1)'(alloc) - (SLOT_W+1)'(free_valid);
      if (alloc) begin
        cur_slot  <= next_slot;
        next_slot <= next_slot + 1'b1;
        oversize  <= 1'b0;
      end
      if (take) begin
        if (w == '0) word0 <= in_data;
        if (w == LEN_W'(1)) word1_hi <= in_data[WORD_W-1 -: 16];
        if (w >= LEN_W'(SLOT_WORDS)) oversize <= 1'b1;
        widx   <= w + 1'b1;
        in_pkt <= !in_eop;
      end
    end

  a_sop_first: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && !in_pkt) |-> in_sop)
    else $error("ingress: packet does not start with sop");
  a_no_free_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    free_valid |-> (slots_used != 0))
    else $error("ingress: slot released while none is in use");
endmodule
