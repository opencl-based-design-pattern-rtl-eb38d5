// tb_tcam_engine: fills a small ternary table (4 banks x 8 rows) with random
// prefix entries, runs random lookups against a reference search (lowest
// matching index wins), checks the 5-clock latency, the one-lookup-per-5-clocks
// rate with back-to-back queries, result hold under back-pressure, and writes
// that arrive while lookups are running.
module tb_tcam_engine;
  import router_pkg::*;
  localparam int NB = 4, BD = 8, N = NB * BD;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic q_valid, q_ready, r_valid, r_ready, wr_valid, wr_ready;
  query_t q;
  result_t r;
  entry_wr_t wr;
  entry_wr_t tbl [N];
  int checks = 0, failures = 0;
  int cyc = 0, t_acc[$], gaps_ok = 0, writes_mid = 0, stalls = 0;
  query_t sent[$];
  result_t expq[$];

  tcam_engine #(.BANKS(NB), .BANK_DEPTH(BD)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic result_t ref_lookup(query_t qq);
    result_t res = '0;
    res.tag = qq.tag;
    for (int i = N - 1; i >= 0; i--)
      if (tbl[i].valid && (((tbl[i].key ^ qq.key) & tbl[i].mask) == '0)) begin
        res.hit = 1; res.index = 16'(i); res.action = tbl[i].action;
      end
    return res;
  endfunction

  function automatic entry_wr_t rnd_entry(int idx);
    entry_wr_t e;
    int pl = $urandom_range(0, 8);
    e.index = 16'(idx);
    e.valid = ($urandom_range(0, 7) != 0);
    e.key = {$urandom, 8'($urandom)} & {KEY_W{1'b1}} << (KEY_W - pl);   // few bits => many overlaps
    e.mask = {KEY_W{1'b1}} << (KEY_W - pl);
    e.action = {$urandom, 16'($urandom)};
    return e;
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (q_valid && q_ready) begin
        expq.push_back(ref_lookup(q));
        t_acc.push_back(cyc);
      end
      if (wr_valid && wr_ready) begin
        tbl[wr.index] = wr;
        if (expq.size() > 0 || r_valid) writes_mid++;
      end
      if (r_valid && !r_ready) stalls++;
      if (r_valid && r_ready) begin
        automatic result_t e = expq.pop_front();
        automatic int ta = t_acc.pop_front();
        check(r == e, $sformatf("result: got hit %b idx %0d act %h exp hit %b idx %0d act %h",
                                r.hit, r.index, r.action, e.hit, e.index, e.action));
        check(cyc - ta >= 5, $sformatf("latency %0d", cyc - ta));
        if (cyc - ta == 5) gaps_ok++;
      end
    end
  end

  int last_acc = -1, min_gap = 1000;
  always @(posedge clk) if (rst_n && q_valid && q_ready) begin
    if (last_acc >= 0 && cyc - last_acc < min_gap) min_gap = cyc - last_acc;
    last_acc = cyc;
  end

  initial begin
    q_valid = 0; r_ready = 1; wr_valid = 0; q = '0; wr = '0;
    for (int i = 0; i < N; i++) tbl[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load all entries
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      wr_valid = 1; wr = rnd_entry(i);
      @(posedge clk); while (!wr_ready) @(posedge clk);
    end
    @(negedge clk); wr_valid = 0;
    // back-to-back queries, result always taken
    fork
      for (int n = 0; n < 600; n++) begin
        @(negedge clk);
        q_valid = 1; q.key = {$urandom, 8'($urandom)}; q.tag = TAG_W'(n);
        if (n % 4 == 0) q.key = tbl[$urandom_range(0, N-1)].key | 40'($urandom_range(0, 255));
        @(posedge clk); while (!q_ready) @(posedge clk);
        if (n == 300) begin @(negedge clk); q_valid = 0; end
      end
      for (int n = 0; n < 4000; n++) begin
        @(negedge clk);
        r_ready = (n < 1000) ? 1'b1 : ($urandom_range(0, 2) != 0);
        if (n > 1500 && !wr_valid && $urandom_range(0, 15) == 0) begin
          wr_valid = 1; wr = rnd_entry($urandom_range(0, N-1));
        end else if (wr_valid && wr_ready) wr_valid = 0;
      end
    join_any
    @(negedge clk); q_valid = 0; r_ready = 1;
    repeat (20) @(posedge clk);
    check(expq.size() == 0, "every query answered");
    check(min_gap == 5, $sformatf("back-to-back lookups every 5 clocks (min gap %0d)", min_gap));
    check(gaps_ok > 0, "5-clock latency seen");
    check(writes_mid > 0, "write while lookups in flight");
    check(stalls > 0, "result held under back-pressure");
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
