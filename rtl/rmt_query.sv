// rmt_query: query kernel of a match+action stage.
//
// Reads one PHV per clock from the upstream channel, builds the stage's lookup
// key and sends it to the lookup engine tagged with the stage number. The PHV
// itself goes into the stage's pending channel, where it waits for the result;
// the match half and the action half of the stage are separate kernels so that
// several lookups can be in flight and the action half never stalls the match
// half. A PHV already marked drop is passed on without a lookup.
//
// Keys (right-aligned in the KEY_W-bit key, zero padded):
//   ST_IPV4_LPM   destination IPv4 address
//   ST_FORWARD    next-hop IPv4 address set by the LPM stage
//   ST_SEND_FRAME egress port set by the LPM stage
// Interface: valid/ready channels; in_ready needs room in the pending channel
// and, when a lookup is needed, in the query channel. Combinational: the PHV and
// the query are written in the clock the PHV is read.
// The split into query and result kernels follows the source text; the keys
// follow the usual three-table IPv4 router and are this design's reading.
module rmt_query
  import router_pkg::*;
#(
  parameter stage_e STAGE = ST_IPV4_LPM
) (
  input  logic   in_valid,
  output logic   in_ready,
  input  phv_t   in_phv,
  output logic   q_valid,
  input  logic   q_ready,
  output query_t q,
  output logic   pend_valid,
  input  logic   pend_ready,
  output pend_t  pend
);
  logic lookup;

  assign lookup     = !in_phv.meta.drop;
  assign in_ready   = pend_ready && (!lookup || q_ready);
  assign pend_valid = in_valid && in_ready;
  assign q_valid    = in_valid && in_ready && lookup;
  assign pend       = '{lookup, in_phv};

  always_comb begin
    q.tag = TAG_W'(STAGE);
    case (STAGE)
      ST_IPV4_LPM: q.key = KEY_W'(in_phv.hdr.ipv4.dst);
      ST_FORWARD:  q.key = KEY_W'(in_phv.meta.nhop);
      default:     q.key = KEY_W'(in_phv.meta.egress_port);
    endcase
  end
endmodule
