// tb_lookup_rate: lookup-rate workload for the two engines at their full
// default sizes: the ternary engine (64 banks x 8 rows) and the exact-match
// engine (128 banks x 4 rows), 512 entries each.
//
// Both tables are filled completely through the write port: the ternary table
// with IPv4-style prefixes (/9 to /32, longer prefixes at lower indices as an
// LPM table needs) and the exact table with random 40-bit keys. Then 1000
// lookups are offered back to back to each engine with the result always taken.
// Every result is compared with a reference search (lowest matching index
// wins), and the accept times must be exactly BANK_DEPTH/2 + 1 clocks apart:
// 5 clocks for the ternary engine and 3 for the exact engine. At clock rates of
// 242 and 241 MHz that is 48.4 and 80.3 million lookups per second; the test
// prints the measured clocks per lookup.
module tb_lookup_rate;
  import router_pkg::*;
  localparam int NT = 64 * 8, NE = 128 * 4, NQ = 1000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tq_valid, tq_ready, tr_valid, tr_ready, twr_valid, twr_ready;
  logic eq_valid, eq_ready, er_valid, er_ready, ewr_valid, ewr_ready;
  query_t tq, eq;
  result_t tr, er;
  entry_wr_t twr, ewr;

  tcam_engine u_tcam (
    .clk, .rst_n, .q_valid(tq_valid), .q_ready(tq_ready), .q(tq),
    .r_valid(tr_valid), .r_ready(tr_ready), .r(tr),
    .wr_valid(twr_valid), .wr_ready(twr_ready), .wr(twr));
  exact_engine u_exact (
    .clk, .rst_n, .q_valid(eq_valid), .q_ready(eq_ready), .q(eq),
    .r_valid(er_valid), .r_ready(er_ready), .r(er),
    .wr_valid(ewr_valid), .wr_ready(ewr_ready), .wr(ewr));

  entry_wr_t ttbl [NT];
  entry_wr_t etbl [NE];
  int checks = 0, failures = 0, cyc = 0;
  int t_first = -1, t_last = -1, t_gap_bad = 0, t_hits = 0, t_done = 0;
  int e_first = -1, e_last = -1, e_gap_bad = 0, e_hits = 0, e_done = 0;
  result_t t_exp[$], e_exp[$];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic result_t ref_t(query_t qq);
    result_t res = '0;
    res.tag = qq.tag;
    for (int i = NT - 1; i >= 0; i--)
      if (ttbl[i].valid && (((ttbl[i].key ^ qq.key) & ttbl[i].mask) == '0)) begin
        res.hit = 1; res.index = 16'(i); res.action = ttbl[i].action;
      end
    return res;
  endfunction

  function automatic result_t ref_e(query_t qq);
    result_t res = '0;
    res.tag = qq.tag;
    for (int i = NE - 1; i >= 0; i--)
      if (etbl[i].valid && etbl[i].key == qq.key) begin
        res.hit = 1; res.index = 16'(i); res.action = etbl[i].action;
      end
    return res;
  endfunction

  // reference bookkeeping and gap measurement, sampled at the clock edge
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (tq_valid && tq_ready) begin
        t_exp.push_back(ref_t(tq));
        if (t_last >= 0 && cyc - t_last != 5) t_gap_bad++;
        if (t_first < 0) t_first = cyc;
        t_last = cyc;
      end
      if (eq_valid && eq_ready) begin
        e_exp.push_back(ref_e(eq));
        if (e_last >= 0 && cyc - e_last != 3) e_gap_bad++;
        if (e_first < 0) e_first = cyc;
        e_last = cyc;
      end
      if (tr_valid && tr_ready) begin
        automatic result_t x = t_exp.pop_front();
        check(tr == x, $sformatf("ternary result idx %0d hit %b, expected idx %0d hit %b",
                                 tr.index, tr.hit, x.index, x.hit));
        t_hits += int'(tr.hit); t_done++;
      end
      if (er_valid && er_ready) begin
        automatic result_t x = e_exp.pop_front();
        check(er == x, $sformatf("exact result idx %0d hit %b, expected idx %0d hit %b",
                                 er.index, er.hit, x.index, x.hit));
        e_hits += int'(er.hit); e_done++;
      end
    end
  end

  task automatic fill_tcam();
    for (int i = 0; i < NT; i++) begin
      automatic entry_wr_t e = '0;
      automatic int pl = 32 - (i * 24) / NT;     // /32 first, /9 last
      automatic logic [31:0] m = (pl == 0) ? 32'h0 : ~(32'hffff_ffff >> pl);
      e.index = 16'(i);
      e.valid = 1'b1;
      e.key = {8'h00, $urandom & m};
      e.mask = {8'hff, m};
      e.action = {$urandom, 16'(i)};
      @(negedge clk);
      twr_valid = 1; twr = e;
      @(posedge clk); while (!twr_ready) @(posedge clk);
      ttbl[i] = e;
    end
    @(negedge clk); twr_valid = 0;
  endtask

  task automatic fill_exact();
    for (int i = 0; i < NE; i++) begin
      automatic entry_wr_t e = '0;
      e.index = 16'(i);
      e.valid = ($urandom_range(0, 15) != 0);
      e.key = {8'($urandom), $urandom};
      e.mask = '1;
      e.action = {$urandom, 16'(i)};
      @(negedge clk);
      ewr_valid = 1; ewr = e;
      @(posedge clk); while (!ewr_ready) @(posedge clk);
      etbl[i] = e;
    end
    @(negedge clk); ewr_valid = 0;
  endtask

  task automatic run_tcam();
    for (int n = 0; n < NQ; n++) begin
      @(negedge clk);
      tq_valid = 1; tq.tag = TAG_W'(n);
      tq.key = {8'h00, $urandom};
      if (n % 2 == 0) tq.key = {8'h00, ttbl[$urandom_range(0, NT - 1)].key[31:0] | 32'($urandom_range(0, 255))};
      @(posedge clk); while (!tq_ready) @(posedge clk);
    end
    @(negedge clk); tq_valid = 0;
  endtask

  task automatic run_exact();
    for (int n = 0; n < NQ; n++) begin
      @(negedge clk);
      eq_valid = 1; eq.tag = TAG_W'(n);
      eq.key = (n % 2 == 0) ? etbl[$urandom_range(0, NE - 1)].key : {8'($urandom), $urandom};
      @(posedge clk); while (!eq_ready) @(posedge clk);
    end
    @(negedge clk); eq_valid = 0;
  endtask

  initial begin
    tq_valid = 0; tr_ready = 1; twr_valid = 0; tq = '0; twr = '0;
    eq_valid = 0; er_ready = 1; ewr_valid = 0; eq = '0; ewr = '0;
    for (int i = 0; i < NT; i++) ttbl[i] = '0;
    for (int i = 0; i < NE; i++) etbl[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork fill_tcam(); fill_exact(); join
    fork run_tcam(); run_exact(); join
    repeat (20) @(posedge clk);
    check(t_done == NQ && t_exp.size() == 0, $sformatf("ternary: %0d of %0d answered", t_done, NQ));
    check(e_done == NQ && e_exp.size() == 0, $sformatf("exact: %0d of %0d answered", e_done, NQ));
    check(t_gap_bad == 0, $sformatf("ternary: %0d accepts not 5 clocks apart", t_gap_bad));
    check(e_gap_bad == 0, $sformatf("exact: %0d accepts not 3 clocks apart", e_gap_bad));
    check(t_last - t_first == 5 * (NQ - 1), $sformatf("ternary: %0d lookups in %0d clocks", NQ, t_last - t_first));
    check(e_last - e_first == 3 * (NQ - 1), $sformatf("exact: %0d lookups in %0d clocks", NQ, e_last - e_first));
    check(t_hits > NQ / 4 && t_hits < NQ, $sformatf("ternary: %0d hits, misses present", t_hits));
    check(e_hits > NQ / 4 && e_hits < NQ, $sformatf("exact: %0d hits, misses present", e_hits));
    $display("ternary engine: %0d lookups, one every %0d clocks (%0d hits)", NQ, (t_last - t_first) / (NQ - 1), t_hits);
    $display("exact engine:   %0d lookups, one every %0d clocks (%0d hits)", NQ, (e_last - e_first) / (NQ - 1), e_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
