// tcam_engine: block-RAM ternary match engine with a sequential scan.
//
// The table holds BANKS*BANK_DEPTH entries of {valid, key, mask, action}. Entry
// i lives in bank i / BANK_DEPTH at row i % BANK_DEPTH. A lookup does not
// compare all entries at once, which would need every entry in registers;
// instead every bank walks through its rows, two rows per clock through the two
// read ports of a block RAM, and all banks do so in parallel. An entry matches
// when it is valid and the query key equals its key in every bit where its mask
// is 1. The lowest matching index wins, so an LPM table keeps longer prefixes at
// lower indices. The winning entry's index and action data are returned with the
// query's tag.
//
// Interface (valid/ready channels, Avalon-ST style): q carries a query {key, tag};
// r returns {hit, index, action, tag}; wr writes one entry (control plane).
// Timing: a query is accepted in the clock the engine is free and the result is
// valid 5 clocks later with BANK_DEPTH = 8 (BANK_DEPTH/2 read clocks and one
// compare clock); a new query is accepted in the clock the result is taken, so
// the engine does one lookup every BANK_DEPTH/2 + 1 clocks. A pending write goes
// first and delays the next query by one clock. Results come back in query order.
// The scan of block-RAM-held data/mask pairs, eight pairs per block RAM and
// 40-bit keys follow the source text; the two-rows-per-clock schedule, 64 banks
// (512 entries), the lowest-index priority and the handshake are this design's.
module tcam_engine
  import router_pkg::*;
#(
  parameter int unsigned BANKS      = 64,
  parameter int unsigned BANK_DEPTH = 8
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
    logic [KEY_W-1:0] mask;
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
    return e.valid && (((e.key ^ k) & e.mask) == '0);
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
        mem[wr.index[RW-1:0]] <= '{wr.valid, wr.key, wr.mask, wr.action};
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
    else $error("tcam_engine: result changed while stalled");
endmodule
