// router_top: a layer-3 IPv4 router built from persistent kernels and channels.
//
// Every block is a kernel that runs forever on the items of its input channel:
//
//   stream in -> ingress -> [chan] -> parser (2 PHVs/clock) -> [chan]
//     -> IPv4 LPM stage (ternary engine) -> forward stage (exact engine)
//     -> send-frame stage (exact engine) -> deparser -> stream out
//
// Only the Packet Header Vector (PHV: headers plus metadata) travels down the
// pipeline. The packet itself is written once by the ingress into the packet
// server, a two-port on-chip memory, and read once by the deparser, which lays
// the edited header over it on the way out. The ingress verifies nothing; the
// parser checks the Ethernet/IPv4 header and its checksum; the LPM stage sets
// next hop and egress port and decrements the TTL; the forward stage sets the
// destination MAC from the next hop; the send-frame stage sets the source MAC
// from the egress port; the deparser recomputes the checksum. Any miss, a bad
// checksum or a non-IPv4 packet drops the packet. The host fills the tables
// through the control channel, one entry per command, routed to the update
// kernel of the table it names.
//
// Interface: packet stream in and out (WORD_W-bit words, valid/ready, sop, eop,
// empty bytes, port); control commands (valid/ready, ctl_cmd_t); drop count and
// number of occupied packet-server slots. Timing: the slowest lookup engine
// sets the rate; the LPM engine takes BANK_DEPTH/2 + 1 = 5 clocks per packet and
// the exact engines EX_BANK_DEPTH/2 + 1 = 3, so the router does one packet per
// 5 clocks.
// The kernel graph follows the source text's router; word width, slot count,
// engine sizes (64 x 8 ternary, 128 x 4 exact) and the encodings in router_pkg
// are this design's choice.
module router_top
  import router_pkg::*;
#(
  parameter int unsigned LANES         = 2,
  parameter int unsigned BANKS         = 64,
  parameter int unsigned BANK_DEPTH    = 8,
  parameter int unsigned EX_BANKS      = 128,
  parameter int unsigned EX_BANK_DEPTH = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [WORD_W-1:0]  in_data,
  input  logic               in_sop,
  input  logic               in_eop,
  input  logic [EMPTY_W-1:0] in_empty,
  input  logic [PORT_W-1:0]  in_port,
  output logic               eg_valid,
  input  logic               eg_ready,
  output logic [WORD_W-1:0]  eg_data,
  output logic               eg_sop,
  output logic               eg_eop,
  output logic [EMPTY_W-1:0] eg_empty,
  output logic [PORT_W-1:0]  eg_port,
  input  logic               ctl_valid,
  output logic               ctl_ready,
  input  ctl_cmd_t           ctl,
  output logic [31:0]        drops,
  output logic [SLOT_W:0]    slots_used
);
  // packet server ports
  logic              ps_we, ps_re;
  logic [SLOT_W-1:0] ps_wslot, ps_rslot;
  logic [WIDX_W-1:0] ps_wwidx, ps_rwidx;
  logic [WORD_W-1:0] ps_wdata, ps_rdata;
  logic              free_valid;

  // ingress -> parser channel (1 in, LANES out)
  logic              ig_valid, ig_ready;
  phv_t              ig_phv [1];
  logic [LANES-1:0]  pa_valid, pa_take;
  phv_t              pa_phv [LANES];
  // parser -> LPM channel (LANES in, 1 out)
  logic [LANES-1:0]  pp_valid;
  phv_t              pp_phv [LANES];
  logic              pp_ready;
  logic [0:0]        lpm_in_valid;
  phv_t              lpm_in_phv [1];
  logic              lpm_in_ready;
  // stage to stage
  logic              lpm_out_valid, fwd_in_ready, fwd_out_valid, sf_in_ready;
  logic              sf_out_valid, dp_ready;
  phv_t              lpm_out_phv, fwd_out_phv, sf_out_phv;
  logic [2:0]        ctl_rdy;

  ingress u_ingress (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .in_sop, .in_eop, .in_empty, .in_port,
    .ps_we, .ps_slot(ps_wslot), .ps_widx(ps_wwidx), .ps_data(ps_wdata),
    .phv_valid(ig_valid), .phv_ready(ig_ready), .phv(ig_phv[0]),
    .free_valid, .slots_used);

  packet_server u_pktsrv (
    .clk, .a_we(ps_we), .a_slot(ps_wslot), .a_widx(ps_wwidx), .a_data(ps_wdata),
    .b_re(ps_re), .b_slot(ps_rslot), .b_widx(ps_rwidx), .b_data(ps_rdata));

  chan_fifo #(.T(phv_t), .DEPTH(8), .PUSH_W(1), .POP_W(LANES)) u_ch_ingress (
    .clk, .rst_n, .in_valid(ig_valid), .in_data(ig_phv), .in_ready(ig_ready),
    .out_valid(pa_valid), .out_data(pa_phv), .out_ready(pa_take), .count());

  parser #(.LANES(LANES)) u_parser (
    .clk, .rst_n, .in_valid(pa_valid), .in_phv(pa_phv), .in_take(pa_take),
    .out_valid(pp_valid), .out_phv(pp_phv), .out_ready(pp_ready));

  chan_fifo #(.T(phv_t), .DEPTH(8), .PUSH_W(LANES), .POP_W(1)) u_ch_parser (
    .clk, .rst_n, .in_valid(pp_valid), .in_data(pp_phv), .in_ready(pp_ready),
    .out_valid(lpm_in_valid), .out_data(lpm_in_phv), .out_ready(lpm_in_ready), .count());

  rmt_stage #(.STAGE(ST_IPV4_LPM), .TERNARY(1'b1), .BANKS(BANKS), .BANK_DEPTH(BANK_DEPTH))
  u_lpm (
    .clk, .rst_n, .in_valid(lpm_in_valid[0]), .in_ready(lpm_in_ready), .in_phv(lpm_in_phv[0]),
    .out_valid(lpm_out_valid), .out_ready(fwd_in_ready), .out_phv(lpm_out_phv),
    .ctl_valid, .ctl_ready(ctl_rdy[0]), .ctl);

  rmt_stage #(.STAGE(ST_FORWARD), .TERNARY(1'b0), .BANKS(EX_BANKS), .BANK_DEPTH(EX_BANK_DEPTH))
  u_fwd (
    .clk, .rst_n, .in_valid(lpm_out_valid), .in_ready(fwd_in_ready), .in_phv(lpm_out_phv),
    .out_valid(fwd_out_valid), .out_ready(sf_in_ready), .out_phv(fwd_out_phv),
    .ctl_valid, .ctl_ready(ctl_rdy[1]), .ctl);

  rmt_stage #(.STAGE(ST_SEND_FRAME), .TERNARY(1'b0), .BANKS(EX_BANKS), .BANK_DEPTH(EX_BANK_DEPTH))
  u_sf (
    .clk, .rst_n, .in_valid(fwd_out_valid), .in_ready(sf_in_ready), .in_phv(fwd_out_phv),
    .out_valid(sf_out_valid), .out_ready(dp_ready), .out_phv(sf_out_phv),
    .ctl_valid, .ctl_ready(ctl_rdy[2]), .ctl);

  always_comb
    case (ctl.table_id)
      ST_IPV4_LPM: ctl_ready = ctl_rdy[0];
      ST_FORWARD:  ctl_ready = ctl_rdy[1];
      default:     ctl_ready = ctl_rdy[2];
    endcase

  deparser u_deparser (
    .clk, .rst_n, .phv_valid(sf_out_valid), .phv_ready(dp_ready), .phv(sf_out_phv),
    .ps_re, .ps_slot(ps_rslot), .ps_widx(ps_rwidx), .ps_data(ps_rdata),
    .eg_valid, .eg_ready, .eg_data, .eg_sop, .eg_eop, .eg_empty, .eg_port,
    .free_valid, .drops);
endmodule
