// rmt_stage: one match+action stage of the router.
//
// The stage is four kernels joined by channels:
//   rmt_query  -> query channel -> lookup engine -> rmt_result
//   rmt_query  -> pending channel (PHVs awaiting their result) -> rmt_result
//   table_update (control plane) -> engine write port
// The lookup engine is the ternary engine for the longest-prefix stage and the
// exact engine for the other two. Because the pending channel holds PEND_DEPTH
// PHVs and the query channel QDEPTH queries, the query kernel can run ahead of a
// slow engine and keep lookups back to back; the engine sets the stage's rate.
// Interface: PHV in and out as valid/ready channels, the shared control-plane
// command channel (ctl_ready is this stage's readiness; the router routes it by
// table id). Timing: one PHV per clock while no lookup is needed (drop-marked
// PHVs); otherwise one per engine lookup time, BANK_DEPTH/2 + 1 clocks (5 for
// the ternary defaults, 3 for the exact-match sizes the router uses).
// The query/engine/result/update structure follows the source text's RTL match+
// action stage with a dedicated engine per stage; FIFO depths are this design's.
module rmt_stage
  import router_pkg::*;
#(
  parameter stage_e      STAGE      = ST_IPV4_LPM,
  parameter bit          TERNARY    = 1'b1,
  parameter int unsigned BANKS      = 64,
  parameter int unsigned BANK_DEPTH = 8,
  parameter int unsigned QDEPTH     = 2,
  parameter int unsigned PEND_DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  input  phv_t     in_phv,
  output logic     out_valid,
  input  logic     out_ready,
  output phv_t     out_phv,
  input  logic     ctl_valid,
  output logic     ctl_ready,
  input  ctl_cmd_t ctl
);
  logic      qi_valid, qi_ready, qo_ready, pi_valid, pi_ready, po_ready;
  logic [0:0] qo_valid, po_valid;
  query_t    qi [1];
  query_t    qo [1];
  pend_t     pi [1];
  pend_t     po [1];
  logic      r_valid, r_ready;
  result_t   r;
  logic      wr_valid, wr_ready;
  entry_wr_t wr;

  rmt_query #(.STAGE(STAGE)) u_query (
    .in_valid, .in_ready, .in_phv,
    .q_valid(qi_valid), .q_ready(qi_ready), .q(qi[0]),
    .pend_valid(pi_valid), .pend_ready(pi_ready), .pend(pi[0]));

  chan_fifo #(.T(query_t), .DEPTH(QDEPTH)) u_qchan (
    .clk, .rst_n, .in_valid(qi_valid), .in_data(qi), .in_ready(qi_ready),
    .out_valid(qo_valid), .out_data(qo), .out_ready(qo_ready), .count());

  chan_fifo #(.T(pend_t), .DEPTH(PEND_DEPTH)) u_pchan (
    .clk, .rst_n, .in_valid(pi_valid), .in_data(pi), .in_ready(pi_ready),
    .out_valid(po_valid), .out_data(po), .out_ready(po_ready), .count());

  if (TERNARY) begin : g_tcam
    tcam_engine #(.BANKS(BANKS), .BANK_DEPTH(BANK_DEPTH)) u_engine (
      .clk, .rst_n, .q_valid(qo_valid[0]), .q_ready(qo_ready), .q(qo[0]),
      .r_valid, .r_ready, .r, .wr_valid, .wr_ready, .wr);
  end else begin : g_exact
    exact_engine #(.BANKS(BANKS), .BANK_DEPTH(BANK_DEPTH)) u_engine (
      .clk, .rst_n, .q_valid(qo_valid[0]), .q_ready(qo_ready), .q(qo[0]),
      .r_valid, .r_ready, .r, .wr_valid, .wr_ready, .wr);
  end

  rmt_result #(.STAGE(STAGE)) u_result (
    .clk, .rst_n, .pend_valid(po_valid[0]), .pend_ready(po_ready), .pend(po[0]),
    .r_valid, .r_ready, .r, .out_valid, .out_ready, .out_phv);

  table_update #(.TABLE(STAGE), .TERNARY(TERNARY)) u_update (
    .clk, .rst_n, .ctl_valid, .ctl_ready, .ctl, .wr_valid, .wr_ready, .wr);
endmodule
