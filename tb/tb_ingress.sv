// tb_ingress: sends packets of many lengths (runts and oversize ones included),
// checks every PHV field and every word stored in the packet server, and checks
// that the ingress stops taking packets when all slots are in use.
module tb_ingress;
  import router_pkg::*;
  import tb_pkt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, in_sop, in_eop, ps_we, phv_valid, phv_ready, free_valid;
  logic [WORD_W-1:0] in_data, ps_data;
  logic [EMPTY_W-1:0] in_empty;
  logic [PORT_W-1:0] in_port;
  logic [SLOT_W-1:0] ps_slot;
  logic [WIDX_W-1:0] ps_widx;
  phv_t phv;
  logic [SLOT_W:0] slots_used;
  logic [WORD_W-1:0] mem [SLOTS][SLOT_WORDS];
  int checks = 0, failures = 0, full_stalls = 0, npkts = 0;
  int exp_slot = 0;
  bytes_t sent[$];
  int     sent_port[$];

  ingress dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(posedge clk) if (rst_n && in_valid && !in_ready && slots_used == SLOTS) full_stalls++;

  // PHV checker
  always @(posedge clk) begin
    if (ps_we) mem[ps_slot][ps_widx] = ps_data;
    if (rst_n && phv_valid && phv_ready) check_phv();
  end

  task automatic check_phv();
    bytes_t b = sent.pop_front();
    int p = sent_port.pop_front();
    int nw = (b.size() + 31) / 32;
    bit bad = (b.size() < 34) || (nw > SLOT_WORDS);
    check(phv.meta.pkt_len == LEN_W'(b.size()), $sformatf("len %0d vs %0d", phv.meta.pkt_len, b.size()));
    check(phv.meta.in_port == PORT_W'(p), "in_port");
    check(phv.meta.slot == SLOT_W'(exp_slot), "slot");
    check(phv.meta.drop == bad, "drop for runt/oversize");
    if (b.size() >= 34) check(phv.hdr == hdr_t'(hdr_bits(b)), "header bytes");
    for (int w = 0; w < nw && w < SLOT_WORDS; w++)
      check(mem[phv.meta.slot][w] == word_of(b, w), $sformatf("stored word %0d", w));
    exp_slot = (exp_slot + 1) % SLOTS;
    npkts++;
  endtask

  task automatic send(bytes_t b, int port);
    int nw = (b.size() + 31) / 32;
    sent.push_back(b); sent_port.push_back(port);
    for (int w = 0; w < nw; w++) begin
      in_valid = 1; in_data = word_of(b, w); in_sop = (w == 0); in_eop = (w == nw - 1);
      in_empty = EMPTY_W'(nw * 32 - b.size()); in_port = PORT_W'(port);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
      if ($urandom_range(0, 3) == 0) begin in_valid = 0; @(posedge clk); #1; end
    end
    in_valid = 0;
  endtask

  // frees: hold off for a while, then release randomly
  bit hold = 1;
  initial begin free_valid = 0; phv_ready = 0; end
  always @(negedge clk) begin
    if (!hold && slots_used > 0 && $urandom_range(0, 2) == 0) free_valid = 1;
    else free_valid = 0;
    phv_ready = ($urandom_range(0, 5) != 0);
  end

  initial begin
    in_valid = 0; in_sop = 0; in_eop = 0; in_data = 0; in_empty = 0; in_port = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    // fill all slots, then one more must wait
    for (int i = 0; i < SLOTS + 2; i++) begin
      if (i == SLOTS) fork begin repeat (40) @(posedge clk); hold = 0; end join_none
      send(make_pkt(64 + 32 * (i % 3), 48'h1, 48'h2, 32'h0a000001, 32'h0a000002, 64), i);
    end
    send(make_pkt(20, 1, 2, 3, 4, 5), 7);                       // runt
    send(make_pkt(SLOT_WORDS * 32 + 40, 1, 2, 3, 4, 5), 8);     // oversize
    for (int i = 0; i < 150; i++)
      send(make_pkt($urandom_range(34, SLOT_WORDS * 32), 48'h1, 48'h2, $urandom, $urandom, 8'($urandom)),
           $urandom_range(0, 255));
    repeat (20) @(posedge clk);
    check(npkts == SLOTS + 4 + 150, $sformatf("all PHVs out (%0d)", npkts));
    check(full_stalls > 0, "stalled with all slots in use");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
