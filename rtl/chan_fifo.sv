// chan_fifo: a channel between two persistent kernels.
//
// Every kernel of the router loops forever, reading its input channel and
// writing its output channel; a channel is a FIFO. This one can take up to
// PUSH_W items and give up to POP_W items in one clock, which lets the parser
// read two PHVs per clock and write two per clock while the other kernels move
// one. With PUSH_W = POP_W = 1 it is an ordinary valid/ready FIFO.
//
// Write side: in_valid[i] offers in_data[i]; the set bits must form a prefix
// (lane 0 first). in_ready says PUSH_W items fit, and the offered lanes are all
// written in that clock. Read side: out_valid[i] says item i of the head is
// present; lane i is taken when out_valid[i] and out_ready[i] are high and every
// lower lane is taken too. Items leave in the order they arrived.
// Timing: registered storage, data visible the clock after it is written
// (no fall-through). Reset empties the FIFO.
// The FIFO realisation of a channel follows the source text; the multi-lane
// ports and the full/empty rules are this design's choice.
module chan_fifo #(
  parameter type         T      = logic [7:0],
  parameter int unsigned DEPTH  = 8,
  parameter int unsigned PUSH_W = 1,
  parameter int unsigned POP_W  = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [PUSH_W-1:0] in_valid,
  input  T                  in_data  [PUSH_W],
  output logic              in_ready,
  output logic [POP_W-1:0]  out_valid,
  output T                  out_data [POP_W],
  input  logic [POP_W-1:0]  out_ready,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  T                mem [DEPTH];
  logic [AW-1:0]   rd_ptr, wr_ptr;
  logic [CW-1:0]   n_push, n_pop;

  function automatic logic [AW-1:0] wrap(input logic [AW:0] p);
    return (p >= (AW+1)'(DEPTH)) ? AW'(p - (AW+1)'(DEPTH)) : AW'(p);
  endfunction

  assign in_ready = (count <= CW'(DEPTH - PUSH_W));

  always_comb begin
    n_push = '0;
    if (in_ready)
      for (int i = 0; i < int'(PUSH_W); i++)
        if (in_valid[i]) n_push = n_push + 1'b1;
    n_pop = '0;
    for (int i = 0; i < int'(POP_W); i++)
      if (out_valid[i] && out_ready[i] && (n_pop == CW'(i))) n_pop = n_pop + 1'b1;
  end

  always_comb
    for (int i = 0; i < int'(POP_W); i++) begin
      out_valid[i] = (count > CW'(i));
      out_data[i]  = mem[wrap({1'b0, rd_ptr} + (AW+1)'(i))];
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      rd_ptr <= wrap({1'b0, rd_ptr} + (AW+1)'(n_pop));
      wr_ptr <= wrap({1'b0, wr_ptr} + (AW+1)'(n_push));
      count  <= count + n_push - n_pop;
    end

  always_ff @(posedge clk)
    if (in_ready)
      for (int i = 0; i < int'(PUSH_W); i++)
        if (in_valid[i]) mem[wrap({1'b0, wr_ptr} + (AW+1)'(i))] <= in_data[i];

  // Offered write lanes must be contiguous from lane 0.
  a_push_prefix: assert property (@(posedge clk) disable iff (!rst_n)
    ((in_valid + 1'b1) & in_valid) == '0)
    else $error("chan_fifo: in_valid lanes not contiguous");
endmodule
