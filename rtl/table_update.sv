// table_update: control-plane update kernel of one match+action stage.
//
// The host adds, changes and deletes table entries by sending commands on one
// control channel shared by all stages. Each stage has its own update kernel,
// which takes the commands whose table_id names its table, turns them into an
// entry write and hands that to the stage's lookup engine, where it is done
// between lookups. For a ternary (longest-prefix) table the command gives a
// prefix length and the kernel builds the mask: the KEY_W-32 padding bits above
// the 32-bit address and the first prefix_len address bits must match, the rest
// are don't-care. For an exact table the mask is all ones.
//
// Interface: ctl_valid/ctl_ready/ctl from the host (ctl_ready is this kernel's
// readiness; the router routes it by table_id), wr_valid/wr_ready/wr to the
// engine. Timing: one register stage; one command per clock when the engine
// takes writes at once.
// A control kernel per stage that writes the table follows the source text;
// the command format and the prefix-to-mask step are this design's choice.
module table_update
  import router_pkg::*;
#(
  parameter stage_e TABLE   = ST_IPV4_LPM,
  parameter bit     TERNARY = 1'b1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ctl_valid,
  output logic      ctl_ready,
  input  ctl_cmd_t  ctl,
  output logic      wr_valid,
  input  logic      wr_ready,
  output entry_wr_t wr
);
  localparam int unsigned PAD = KEY_W - 32;

  logic             mine;
  logic [KEY_W-1:0] mask;

  assign mine      = ctl_valid && (ctl.table_id == TABLE);
  assign ctl_ready = !wr_valid || wr_ready;

  always_comb begin
    if (!TERNARY)                   mask = '1;
    else if (ctl.prefix_len >= 6'd32) mask = '1;
    else                            mask = ~({KEY_W{1'b1}} >> (PAD + 32'(ctl.prefix_len)));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wr_valid <= 1'b0;
      wr       <= '0;
    end else if (ctl_ready) begin
      wr_valid <= mine;
      if (mine) wr <= '{ctl.index, ctl.valid, ctl.key, mask, ctl.action};
    end
endmodule
