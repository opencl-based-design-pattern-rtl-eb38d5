// deparser: egress kernel that rebuilds and sends each packet.
//
// Reads the final PHV of each packet in order. A PHV marked drop only releases
// its packet-server slot. Otherwise the deparser reads the packet's words from
// the packet server, one per clock, and sends them out with the edited header
// laid over the first 34 bytes: new MAC addresses, the decremented TTL and an
// IPv4 checksum recomputed for the new header (the egress checksum update). The
// egress port comes from the PHV. When the last word has been taken, the slot is
// released back to the ingress (free_valid).
//
// Interface: PHV channel in (valid/ready); packet-server read port (data one
// clock after b_re, held while b_re is low); Avalon-ST style stream out with
// start/end of packet, empty bytes in the last word and egress port.
// Timing: one word per clock while eg_ready is high; one idle clock between
// packets to read the next PHV. drops counts discarded packets.
// Reading the packet from the packet server and writing the packet out follow
// the source text; the on-the-fly header overlay (instead of writing the header
// back into memory) is this design's choice.
module deparser
  import router_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               phv_valid,
  output logic               phv_ready,
  input  phv_t               phv,
  output logic               ps_re,
  output logic [SLOT_W-1:0]  ps_slot,
  output logic [WIDX_W-1:0]  ps_widx,
  input  logic [WORD_W-1:0]  ps_data,
  output logic               eg_valid,
  input  logic               eg_ready,
  output logic [WORD_W-1:0]  eg_data,
  output logic               eg_sop,
  output logic               eg_eop,
  output logic [EMPTY_W-1:0] eg_empty,
  output logic [PORT_W-1:0]  eg_port,
  output logic               free_valid,
  output logic [31:0]        drops
);
  logic              busy;
  phv_t              cur;
  logic [LEN_W-1:0]  nwords, rd_w, out_w;
  logic [LEN_W-1:0]  len_words;
  logic              last_taken;
  logic [15:0]       csum;
  hdr_t              hdr_new;

  ipv4_checksum u_csum (.hdr(cur.hdr.ipv4), .csum(csum), .ok());

  assign len_words  = (phv.meta.pkt_len + LEN_W'(WORD_BYTES - 1)) >> EMPTY_W;
  assign phv_ready  = !busy;
  assign ps_re      = busy && (rd_w < nwords) && (!eg_valid || eg_ready);
  assign ps_slot    = cur.meta.slot;
  assign ps_widx    = WIDX_W'(rd_w);
  assign last_taken = eg_valid && eg_ready && (out_w == nwords - 1'b1);
  assign free_valid = (phv_valid && phv_ready && phv.meta.drop) || last_taken;

  always_comb begin
    hdr_new           = cur.hdr;
    hdr_new.ipv4.csum = csum;
    eg_data = ps_data;
    if (out_w == '0) eg_data = hdr_new[HDR_W-1:16];
    else if (out_w == LEN_W'(1)) eg_data[WORD_W-1 -: 16] = hdr_new[15:0];
    eg_sop   = (out_w == '0);
    eg_eop   = (out_w == nwords - 1'b1);
    eg_empty = EMPTY_W'(LEN_W'(nwords << EMPTY_W) - cur.meta.pkt_len);
    eg_port  = cur.meta.egress_port;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy     <= 1'b0;
      cur      <= '0;
      nwords   <= '0;
      rd_w     <= '0;
      out_w    <= '0;
      eg_valid <= 1'b0;
      drops    <= '0;
    end else begin
      if (phv_valid && phv_ready) begin
        cur <= phv;
        if (phv.meta.drop) drops <= drops + 1'b1;
        else begin
          busy   <= 1'b1;
          nwords <= len_words;
          rd_w   <= '0;
        end
      end
      if (ps_re) begin
        eg_valid <= 1'b1;
        out_w    <= rd_w;
        rd_w     <= rd_w + 1'b1;
      end else if (eg_ready) eg_valid <= 1'b0;
      if (last_taken) busy <= 1'b0;
    end

  a_eg_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (eg_valid && !eg_ready) |=> (eg_valid && $stable(eg_data)))
    else $error("deparser: output word changed while stalled");
endmodule
