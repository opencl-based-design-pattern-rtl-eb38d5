// rmt_result: action (result) kernel of a match+action stage.
//
// Takes the oldest PHV from the stage's pending channel and, if a lookup was
// issued for it, the next lookup result (results return in query order), and
// applies the stage's action to the PHV:
//   ST_IPV4_LPM   hit: next hop = action[47:16], egress port = action[7:0],
//                 IPv4 TTL decremented
//   ST_FORWARD    hit: Ethernet destination MAC = action
//   ST_SEND_FRAME hit: Ethernet source MAC = action
//   any miss:     PHV marked drop
// The edited PHV goes to the downstream channel.
// Interface: valid/ready channels. Combinational: the PHV is written in the clock
// both inputs are present and the output channel has room.
// Matching, then acting on the PHV with the entry's action data, follows the
// source text; the three actions are this design's reading of the IPv4 LPM,
// forward and send-frame stages.
module rmt_result
  import router_pkg::*;
#(
  parameter stage_e STAGE = ST_IPV4_LPM
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    pend_valid,
  output logic    pend_ready,
  input  pend_t   pend,
  input  logic    r_valid,
  output logic    r_ready,
  input  result_t r,
  output logic    out_valid,
  input  logic    out_ready,
  output phv_t    out_phv
);
  logic go;

  assign go         = pend_valid && (!pend.lookup || r_valid) && out_ready;
  assign pend_ready = go;
  assign r_ready    = go && pend.lookup;
  assign out_valid  = go;

  always_comb begin
    out_phv = pend.phv;
    if (pend.lookup) begin
      if (!r.hit) out_phv.meta.drop = 1'b1;
      else case (STAGE)
        ST_IPV4_LPM: begin
          out_phv.meta.nhop        = r.action[47:16];
          out_phv.meta.egress_port = r.action[PORT_W-1:0];
          out_phv.hdr.ipv4.ttl     = pend.phv.hdr.ipv4.ttl - 8'd1;
        end
        ST_FORWARD:  out_phv.hdr.eth.dst = r.action;
        default:     out_phv.hdr.eth.src = r.action;
      endcase
    end
  end

  a_tag: assert property (@(posedge clk) disable iff (!rst_n)
    (r_valid && r_ready) |-> (r.tag == TAG_W'(STAGE)))
    else $error("rmt_result: result for another stage");
endmodule
