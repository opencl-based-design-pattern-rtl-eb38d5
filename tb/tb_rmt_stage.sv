// tb_rmt_stage: an IPv4 LPM stage (ternary engine) followed by a send-frame
// stage (exact engine), both 4 banks x 8 rows, programmed through the control
// channel. Random PHVs go through; each output is compared with a reference
// longest-prefix search and port table. Also checks that drop-marked PHVs pass
// without a lookup, that removing the default route takes effect, and the
// steady-state rate of one PHV per 5 clocks.
module tb_rmt_stage;
  import router_pkg::*;
  localparam int NB = 4, BD = 8, N = NB * BD;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, mid_valid, mid_ready, out_valid, out_ready, ctl_valid;
  logic ctl_ready_l, ctl_ready_s, ctl_ready;
  phv_t in_phv, mid_phv, out_phv;
  ctl_cmd_t ctl;
  int checks = 0, failures = 0, nout = 0, nin = 0, bypass = 0;
  phv_t exp_q[$];
  // reference tables
  logic [31:0] pfx [N];
  int          plen [N];
  logic [47:0] lact [N];
  logic [47:0] smac [256];
  bit          smac_v [256];
  bit stall_mode = 0;
  always @(negedge clk) out_ready = stall_mode ? ($urandom_range(0, 2) != 0) : 1'b1;
  int first_out = -1, last_out = -1, cyc = 0;

  assign ctl_ready = (ctl.table_id == ST_IPV4_LPM) ? ctl_ready_l : ctl_ready_s;

  rmt_stage #(.STAGE(ST_IPV4_LPM), .TERNARY(1'b1), .BANKS(NB), .BANK_DEPTH(BD)) u_lpm (
    .clk, .rst_n, .in_valid, .in_ready, .in_phv, .out_valid(mid_valid), .out_ready(mid_ready),
    .out_phv(mid_phv), .ctl_valid, .ctl_ready(ctl_ready_l), .ctl);
  rmt_stage #(.STAGE(ST_SEND_FRAME), .TERNARY(1'b0), .BANKS(NB), .BANK_DEPTH(BD)) u_sf (
    .clk, .rst_n, .in_valid(mid_valid), .in_ready(mid_ready), .in_phv(mid_phv), .out_valid,
    .out_ready, .out_phv, .ctl_valid, .ctl_ready(ctl_ready_s), .ctl);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic send_ctl(stage_e t, int idx, logic [39:0] key, int pl, logic [47:0] act, bit v = 1);
    @(negedge clk);
    ctl_valid = 1; ctl.table_id = t; ctl.index = 16'(idx); ctl.key = key;
    ctl.prefix_len = 6'(pl); ctl.action = act; ctl.valid = v;
    @(posedge clk); while (!ctl_ready) @(posedge clk);
    @(negedge clk); ctl_valid = 0;
  endtask

  function automatic phv_t expect_of(phv_t p);
    phv_t e = p;
    int hit = -1;
    if (p.meta.drop) return e;
    for (int i = N - 1; i >= 0; i--)
      if (plen[i] >= 0 && ((p.hdr.ipv4.dst ^ pfx[i]) >> (32 - plen[i])) == 0) hit = i;
    for (int i = N - 1; i >= 0; i--)
      if (plen[i] == 0) begin end
    if (hit < 0) begin e.meta.drop = 1; return e; end
    e.meta.nhop = lact[hit][47:16];
    e.meta.egress_port = lact[hit][7:0];
    e.hdr.ipv4.ttl = p.hdr.ipv4.ttl - 1;
    if (!smac_v[lact[hit][7:0]]) begin e.meta.drop = 1; return e; end
    e.hdr.eth.src = smac[lact[hit][7:0]];
    return e;
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid && in_ready) begin exp_q.push_back(expect_of(in_phv)); nin++; end
    if (rst_n && out_valid && out_ready) begin
      automatic phv_t e = exp_q.pop_front();
      check(out_phv == e, $sformatf("PHV out %0d: drop %b/%b port %0d/%0d", nout,
            out_phv.meta.drop, e.meta.drop, out_phv.meta.egress_port, e.meta.egress_port));
      nout++;
      if (nout == 10) first_out = cyc;
      if (nout == 60) last_out = cyc;
    end
    if (rst_n && u_lpm.u_query.in_valid && u_lpm.u_query.in_ready && !u_lpm.u_query.q_valid) bypass++;
  end

  task automatic run(int n, bit allow_drop, bit stall);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      in_valid = 1;
      for (int i = 0; i < $bits(phv_t) / 32 + 1; i++) in_phv[i*32 +: 32] = $urandom;
      in_phv.meta.drop = allow_drop && ($urandom_range(0, 5) == 0);
      // aim at programmed prefixes most of the time
      if ($urandom_range(0, 3) != 0) begin
        automatic int j = $urandom_range(0, N - 1);
        if (plen[j] >= 0) in_phv.hdr.ipv4.dst = pfx[j] | ($urandom >> plen[j]);
      end
      stall_mode = stall;
      @(posedge clk); while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_phv = '0; ctl_valid = 0; ctl = '0;
    for (int i = 0; i < 256; i++) smac_v[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // LPM entries, longest prefixes first; a default route at the end
    for (int i = 0; i < N; i++) begin
      plen[i] = (i == N - 1) ? 0 : 32 - i;
      pfx[i] = (i == N - 1) ? 0 : ($urandom & ~(32'hffffffff >> plen[i]));
      lact[i] = {$urandom, 8'h0, 8'($urandom_range(0, 15))};
      if (i == 5) plen[i] = -1;          // one entry left invalid
      send_ctl(ST_IPV4_LPM, i, {8'h0, pfx[i]}, plen[i] < 0 ? 0 : plen[i], lact[i], plen[i] >= 0);
    end
    // send-frame entries for ports 0..11 only (12..15 miss)
    for (int p = 0; p < 12; p++) begin
      smac[p] = {16'h0200, $urandom}; smac_v[p] = 1;
      send_ctl(ST_SEND_FRAME, p, 40'(p), 0, smac[p]);
    end
    // rate: 100 PHVs, no drops, no back-pressure
    run(100, 0, 0);
    repeat (40) @(posedge clk);
    check(last_out - first_out == 50 * 5, $sformatf("50 PHVs in %0d clocks (5 per PHV)", last_out - first_out));
    // traffic with drops and back-pressure, then the default route is removed
    run(150, 1, 1);
    while (exp_q.size() > 0) @(posedge clk);
    plen[N-1] = -1;
    send_ctl(ST_IPV4_LPM, N - 1, 0, 0, 0, 0);
    run(150, 1, 1);
    stall_mode = 0;
    repeat (100) @(posedge clk);
    check(nout == nin && exp_q.size() == 0, "every PHV came out");
    check(bypass > 0, "drop-marked PHV passed without lookup");
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
