// parser: fixed Ethernet + IPv4 parser with checksum verify, LANES PHVs per clock.
//
// The clock of the router is far below what one packet per clock needs at line
// rate, so the parser is made wide: it reads up to LANES PHVs from its input
// channel in one clock and writes up to LANES parsed PHVs in one clock. Each lane
// looks at the header bytes the ingress put into the PHV and sets the parse
// results: Ethernet present (the packet holds at least 14 bytes), IPv4 present
// (EtherType 0x0800, version 4, a 20-byte header and at least 34 bytes of
// packet), and IPv4 checksum correct. Packets that are not plain IPv4 or fail
// the checksum are marked drop; the header vector still travels on so the
// deparser can release the packet's slot.
//
// Interface: in_valid[i]/in_phv[i] from a multi-lane channel; in_take[i] tells
// the channel which lanes were read. out_valid[i]/out_phv[i] go to a multi-lane
// channel whose out_ready means LANES entries fit. Timing: one register stage,
// one clock of latency, LANES PHVs per clock at full rate.
// Two packets per clock and checksum verify at ingress follow the source text;
// the parse rules for a fixed Ethernet/IPv4 header stack are this design's.
module parser
  import router_pkg::*;
#(
  parameter int unsigned LANES = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LANES-1:0] in_valid,
  input  phv_t             in_phv  [LANES],
  output logic [LANES-1:0] in_take,
  output logic [LANES-1:0] out_valid,
  output phv_t             out_phv [LANES],
  input  logic             out_ready
);
  logic             advance;
  logic [15:0]      calc [LANES];
  logic [LANES-1:0] ok;
  phv_t             parsed [LANES];

  assign advance = (out_valid == '0) || out_ready;
  assign in_take = advance ? in_valid : '0;

  for (genvar g = 0; g < int'(LANES); g++) begin : g_lane
    ipv4_checksum u_csum (.hdr(in_phv[g].hdr.ipv4), .csum(calc[g]), .ok(ok[g]));

    always_comb begin
      parsed[g] = in_phv[g];
      parsed[g].meta.eth_valid  = (in_phv[g].meta.pkt_len >= LEN_W'(14));
      parsed[g].meta.ipv4_valid = parsed[g].meta.eth_valid &&
                                  (in_phv[g].hdr.eth.etype == ETYPE_IPV4) &&
                                  (in_phv[g].hdr.ipv4.version == 4'd4) &&
                                  (in_phv[g].hdr.ipv4.ihl == 4'd5) &&
                                  (in_phv[g].meta.pkt_len >= LEN_W'(HDR_BYTES));
      parsed[g].meta.csum_ok    = parsed[g].meta.ipv4_valid && ok[g];
      parsed[g].meta.drop       = in_phv[g].meta.drop || !parsed[g].meta.csum_ok;
    end

    always_ff @(posedge clk) if (advance && in_valid[g]) out_phv[g] <= parsed[g];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       out_valid <= '0;
    else if (advance) out_valid <= in_valid;
endmodule
