// tb_deparser: preloads packets into a slot memory, hands the deparser PHVs with
// edited headers (some marked drop) and checks every output word: the edited
// header with a freshly computed checksum in the first 34 bytes, the untouched
// body after it, sop/eop/empty/port, one slot release per packet, and full
// word rate while the output is ready.
module tb_deparser;
  import router_pkg::*;
  import tb_pkt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic phv_valid, phv_ready, ps_re, eg_valid, eg_ready, eg_sop, eg_eop, free_valid;
  phv_t phv;
  logic [SLOT_W-1:0] ps_slot;
  logic [WIDX_W-1:0] ps_widx;
  logic [WORD_W-1:0] ps_data, eg_data;
  logic [EMPTY_W-1:0] eg_empty;
  logic [PORT_W-1:0] eg_port;
  logic [31:0] drops;
  logic [WORD_W-1:0] mem [SLOTS][SLOT_WORDS];
  int checks = 0, failures = 0, frees = 0, words = 0, stalls = 0, ndrop = 0, busy_cycles = 0;
  bytes_t exp_pk[$];
  int     exp_port[$];
  bytes_t cur;
  int     cur_w = 0;
  int     run = 0, maxrun = 0;

  deparser dut (.*);

  always @(posedge clk) if (ps_re) ps_data <= mem[ps_slot][ps_widx];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (free_valid) frees++;
    if (eg_valid && !eg_ready) stalls++;
    if (eg_valid && eg_ready) begin
      if (cur_w == 0) cur = exp_pk[0];
      check(eg_data == word_of(cur, cur_w), $sformatf("word %0d of packet", cur_w));
      check(eg_sop == (cur_w == 0), "sop");
      check(eg_eop == ((cur_w + 1) * 32 >= cur.size()), "eop");
      check(eg_port == PORT_W'(exp_port[0]), "port");
      if (eg_eop) begin
        check(eg_empty == EMPTY_W'((cur_w + 1) * 32 - cur.size()), "empty");
        void'(exp_pk.pop_front()); void'(exp_port.pop_front());
        cur_w = 0;
      end else cur_w++;
      words++;
    end
  end

  initial begin
    phv_valid = 0; phv = '0; eg_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      automatic int len = (n < 20) ? 64 + 32 * (n % 4) : $urandom_range(60, SLOT_WORDS * 32);
      automatic int slot = n % SLOTS;
      automatic bytes_t b = make_pkt(len, {16'h0, $urandom}, {16'h0, $urandom}, $urandom, $urandom, 8'($urandom_range(2, 255)));
      automatic bytes_t o = b;
      logic [15:0] c;
      automatic logic [47:0] dm = {16'hbeef, $urandom}, sm = {16'hcafe, $urandom};
      automatic bit dr = (n >= 20) && ($urandom_range(0, 4) == 0);
      for (int w = 0; w * 32 < len; w++) mem[slot][w] = word_of(b, w);
      // the edits a router makes: MACs and TTL; checksum left stale on purpose
      for (int i = 0; i < 6; i++) begin o[i] = dm[47-8*i -: 8]; o[6+i] = sm[47-8*i -: 8]; end
      o[22] = o[22] - 1;
      phv = '0;
      phv.hdr = hdr_t'(hdr_bits(o));
      phv.meta.pkt_len = LEN_W'(len);
      phv.meta.slot = SLOT_W'(slot);
      phv.meta.egress_port = PORT_W'(n);
      phv.meta.drop = dr;
      c = csum_bytes(o, 14, 1); o[24] = c[15:8]; o[25] = c[7:0];
      if (!dr) begin exp_pk.push_back(o); exp_port.push_back(n); end else ndrop++;
      @(negedge clk);
      phv_valid = 1;
      @(posedge clk); while (!phv_ready) @(posedge clk);
      @(negedge clk); phv_valid = 0;
      // wait until the packet is sent before its slot is reused
      while (exp_pk.size() > 0) begin
        eg_ready = (n < 20) ? 1'b1 : ($urandom_range(0, 3) != 0);
        @(negedge clk);
      end
      eg_ready = 1;
    end
    repeat (5) @(posedge clk);
    check(frees == 200, $sformatf("one slot release per packet (%0d)", frees));
    check(drops == 32'(ndrop), "drop counter");
    check(stalls > 0, "output back-pressure seen");
    check(maxrun >= 5, "a 5-word packet sent at one word per clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rate: the first 20 packets run with eg_ready high; their words must leave
  // one per clock once the first word is out
  always @(posedge clk) begin
    if (eg_valid && eg_ready) run++; else run = 0;
    if (run > maxrun) maxrun = run;
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
