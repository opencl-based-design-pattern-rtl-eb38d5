// exact_engine: block-RAM exact-match engine with the TCAM engine's interface.
//
// Used by the forward and send-frame tables, which look up a whole key (next-hop
// address, egress port) rather than a prefix. It is the TCAM engine without the
// mask: BANKS*BANK_DEPTH entries of {valid, key, action}, bank i / BANK_DEPTH,
// row i % BANK_DEPTH, every bank scanned two rows per clock in parallel, and the
// lowest valid entry whose key equals the query key wins. Because the engines
// share one interface, a stage can use either without change.
//
// Interface: q {key, tag} in, r {hit, index, action, tag} out, wr writes one
// entry (the mask field of the write is ignored); all valid/ready channels.
// Timing: as the TCAM engine, one lookup per BANK_DEPTH/2 + 1 clocks with the
// result that many clocks after the query: 3 clocks with the default 128 banks
// of 4 rows; a pending write goes first. The source text names an exact-match
// component with the TCAM's interface but does not describe its inside; the
// scan organisation and the table size (512 entries as 128 banks of 4, twice the
// TCAM's bank count as its block-RAM count suggests) are this design's choice.
module exact_engine
  import router_pkg::*;
#(
  parameter int unsigned BANKS      = 128,
  parameter int unsigned BANK_DEPTH = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      q_valid,
  output logic      q_ready,
  input  query_t    q,
  output logic      r_valid,
  input  logic      r_ready,
  output result_t   r,
  input  logic      wr_valid,
  output logic      wr_ready,
  input  entry_wr_t wr
);
  localparam int unsigned NR   = BANK_DEPTH / 2;       // read clocks per lookup
  localparam int unsigned RW   = $clog2(BANK_DEPTH);
  localparam int unsigned BW   = (BANKS > 1) ? $clog2(BANKS) : 1;
  localparam int unsigned PW   = (NR > 1) ? $clog2(NR) : 1;

  typedef struct packed {
    logic             valid;
    logic [KEY_W-1:0] key;
    logic [ACT_W-1:0] action;
  } entry_t;

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_DRAIN, S_RES} state_e;

  state_e           state;
  logic [PW-1:0]    rd_k, rd_pair, cmp_pair;
  logic             rd_issue, cmp_v, accept, free, wr_do;
  logic [KEY_W-1:0] key_r;
  logic [TAG_W-1:0] tag_r;

  entry_t           d0 [BANKS];
  entry_t           d1 [BANKS];
  logic [BANKS-1:0] hit_b, hit_n;
  logic [RW-1:0]    sel_b [BANKS];
  logic [RW-1:0]    sel_n [BANKS];
  logic [ACT_W-1:0] act_b [BANKS];
  logic [ACT_W-1:0] act_n [BANKS];
  result_t          res_n;

  function automatic logic entry_hit(input entry_t e, input logic [KEY_W-1:0] k);
    return e.valid && (e.key == k);
  endfunction

  assign free     = (state == S_IDLE) || (state == S_RES && r_ready);
  assign wr_do    = free && wr_valid;
  assign wr_ready = wr_do;
  assign accept   = free && !wr_valid && q_valid;
  assign q_ready  = accept;
  assign rd_issue = accept || (state == S_SCAN);
  assign rd_pair  = accept ? '0 : rd_k;
  assign r_valid  = (state == S_RES);

  for (genvar b = 0; b < int'(BANKS); b++) begin : g_bank
    entry_t mem [BANK_DEPTH];
    always_ff @(posedge clk) begin
      if (wr_do && (wr.index[RW +: BW] == BW'(b)))
        mem[wr.index[RW-1:0]] <= '{wr.valid, wr.key, wr.action};
      if (rd_issue) begin
        d0[b] <= mem[RW'({rd_pair, 1'b0})];
        d1[b] <= mem[RW'({rd_pair, 1'b1})];
      end
    end

    // First match of this bank so far, including the pair being compared.
    always_comb begin
      hit_n[b] = hit_b[b];
      sel_n[b] = sel_b[b];
      act_n[b] = act_b[b];
      if (cmp_v && !hit_b[b]) begin
        if (entry_hit(d0[b], key_r)) begin
          hit_n[b] = 1'b1; sel_n[b] = RW'({cmp_pair, 1'b0}); act_n[b] = d0[b].action;
        end else if (entry_hit(d1[b], key_r)) begin
          hit_n[b] = 1'b1; sel_n[b] = RW'({cmp_pair, 1'b1}); act_n[b] = d1[b].action;
        end
      end
    end
  end

  // Lowest-numbered bank with a hit wins.
  always_comb begin
    res_n = '0;
    res_n.tag = tag_r;
    for (int b = int'(BANKS) - 1; b >= 0; b--)
      if (hit_n[b]) begin
        res_n.hit    = 1'b1;
        res_n.index  = 16'(b * int'(BANK_DEPTH)) + 16'(sel_n[b]);
        res_n.action = act_n[b];
      end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state    <= S_IDLE;
      rd_k     <= '0;
      cmp_v    <= 1'b0;
      cmp_pair <= '0;
      key_r    <= '0;
      tag_r    <= '0;
      hit_b    <= '0;
      r        <= '0;
      for (int b = 0; b < int'(BANKS); b++) begin
        sel_b[b] <= '0;
        act_b[b] <= '0;
      end
    end else begin
      cmp_v    <= rd_issue;
      cmp_pair <= rd_pair;
      for (int b = 0; b < int'(BANKS); b++) begin
        sel_b[b] <= sel_n[b];
        act_b[b] <= act_n[b];
      end
      hit_b <= hit_n;
      if (accept) begin
        key_r <= q.key;
        tag_r <= q.tag;
        hit_b <= '0;
        rd_k  <= PW'(1);
        state <= (NR > 1) ? S_SCAN : S_DRAIN;
      end else begin
        case (state)
          S_SCAN: begin
            rd_k <= rd_k + 1'b1;
            if (rd_k == PW'(NR - 1)) state <= S_DRAIN;
          end
          S_DRAIN: begin
            r     <= res_n;
            state <= S_RES;
          end
          S_RES:   if (r_ready) state <= S_IDLE;
          default: state <= S_IDLE;
        endcase
      end
    end

  a_r_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (r_valid && !r_ready) |=> (r_valid && $stable(r)))
    else $error("exact_engine: result changed while stalled");
endmodule
