// tb_router_top: end-to-end test of the router at its default sizes.
//
// Programs the three tables through the control channel, then sends packets and
// compares every packet that leaves with a reference router: longest-prefix
// match on the destination address (next hop and port, TTL - 1), next hop to
// destination MAC, port to source MAC, checksum recomputed; a miss in any table,
// a bad checksum, a non-IPv4 frame or a runt is dropped. It counts each
// mechanism of the design and fails if one never happened: two PHVs parsed in
// one clock, egress back-pressure, all packet-server slots in use, a lookup
// skipped for a dropped packet, a table write while lookups run, and each drop
// cause. It also checks the rate of one minimum-size packet per 5 clocks.
module tb_router_top;
  import router_pkg::*;
  import tb_pkt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, in_sop, in_eop, eg_valid, eg_ready, eg_sop, eg_eop, ctl_valid, ctl_ready;
  logic [WORD_W-1:0] in_data, eg_data;
  logic [EMPTY_W-1:0] in_empty, eg_empty;
  logic [PORT_W-1:0] in_port, eg_port;
  ctl_cmd_t ctl;
  logic [31:0] drops;
  logic [SLOT_W:0] slots_used;

  router_top dut (.*);

  int checks = 0, failures = 0;
  bytes_t exp_pk[$];
  int     exp_port[$];
  int     exp_drops = 0, nout = 0;
  bytes_t rx;
  int     cyc = 0;
  // mechanism counters
  int m_dual = 0, m_egstall = 0, m_full = 0, m_bypass = 0, m_wr_busy = 0;
  int d_lpm = 0, d_fwd = 0, d_sf = 0, d_csum = 0, d_nonip = 0, d_runt = 0;
  // rate measurement
  int rate_on = 0, rate_first = -1, rate_last = -1, rate_n = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------- reference tables ----------------
  typedef struct { logic [31:0] pfx; int len; logic [31:0] nhop; int port; } lpm_t;
  lpm_t lpm[$];
  logic [47:0] dmac_of [logic [31:0]];
  logic [47:0] smac_of [int];

  function automatic int ref_lpm(logic [31:0] dst);
    for (int i = 0; i < lpm.size(); i++)
      if (lpm[i].len == 0 || (dst >> (32 - lpm[i].len)) == (lpm[i].pfx >> (32 - lpm[i].len))) return i;
    return -1;
  endfunction

  task automatic send_ctl(stage_e t, int idx, logic [39:0] key, int pl, logic [47:0] act);
    @(negedge clk);
    ctl_valid = 1; ctl.table_id = t; ctl.index = 16'(idx); ctl.key = key;
    ctl.prefix_len = 6'(pl); ctl.action = act; ctl.valid = 1;
    @(posedge clk); while (!ctl_ready) @(posedge clk);
    @(negedge clk); ctl_valid = 0;
  endtask

  // ---------------- stimulus ----------------
  // kind: 0 good, 1 LPM miss, 2 forward miss, 3 send-frame miss, 4 bad checksum,
  //       5 non-IPv4, 6 runt
  task automatic send_pkt(int kind, int len);
    logic [31:0] dst;
    bytes_t b, o;
    int li, nw;
    logic [15:0] c;
    case (kind)
      1: dst = {8'd11, 24'($urandom)};
      2: dst = {8'd10, 8'd7, 16'($urandom)};
      3: dst = {8'd10, 8'd6, 16'($urandom)};
      default: begin
        dst = {8'd10, 8'($urandom_range(0, 5)), 16'($urandom)};
        if ($urandom_range(0, 3) == 0) dst = {8'd10, 8'd1, 8'd5, 8'($urandom)};
      end
    endcase
    b = make_pkt(len < 34 ? 34 : len, {16'h0, $urandom}, {16'h0, $urandom}, $urandom, dst, 8'($urandom_range(2, 255)));
    if (kind == 4) b[25] ^= 8'h40;
    if (kind == 5) b[13] = 8'h06;                 // ARP
    if (kind == 6) b = b[0:len-1];
    // reference
    li = ref_lpm(dst);
    if (kind >= 4 || li < 0 || !dmac_of.exists(lpm[li].nhop) || !smac_of.exists(lpm[li].port))
      exp_drops++;
    else begin
      o = b;
      for (int i = 0; i < 6; i++) begin
        o[i]   = dmac_of[lpm[li].nhop][47-8*i -: 8];
        o[6+i] = smac_of[lpm[li].port][47-8*i -: 8];
      end
      o[22] = o[22] - 1;
      c = csum_bytes(o, 14, 1); o[24] = c[15:8]; o[25] = c[7:0];
      exp_pk.push_back(o); exp_port.push_back(lpm[li].port);
    end
    nw = (b.size() + 31) / 32;
    for (int w = 0; w < nw; w++) begin
      @(negedge clk);
      in_valid = 1; in_data = word_of(b, w); in_sop = (w == 0); in_eop = (w == nw - 1);
      in_empty = EMPTY_W'(nw * 32 - b.size()); in_port = PORT_W'($urandom);
      @(posedge clk); while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
  endtask

  // ---------------- checking and counting ----------------
  bit eg_random = 0;
  always @(negedge clk) eg_ready = eg_random ? ($urandom_range(0, 3) != 0) : 1'b1;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (dut.u_parser.in_take == 2'b11) m_dual++;
      if (eg_valid && !eg_ready) m_egstall++;
      if (in_valid && !in_ready && slots_used == (SLOT_W+1)'(SLOTS)) m_full++;
      if (dut.u_lpm.u_query.in_valid && dut.u_lpm.u_query.in_ready && !dut.u_lpm.u_query.q_valid) m_bypass++;
      if (dut.u_lpm.g_tcam.u_engine.wr_ready && dut.u_lpm.g_tcam.u_engine.state != 0) m_wr_busy++;
      if (dut.u_parser.out_valid[0] && dut.u_parser.out_ready) begin
        for (int i = 0; i < 2; i++) if (dut.u_parser.out_valid[i]) begin
          if (!dut.u_parser.out_phv[i].meta.eth_valid || dut.u_parser.out_phv[i].meta.pkt_len < 34) d_runt++;
          else if (!dut.u_parser.out_phv[i].meta.ipv4_valid) d_nonip++;
          else if (!dut.u_parser.out_phv[i].meta.csum_ok) d_csum++;
        end
      end
      if (dut.u_lpm.out_valid && dut.u_lpm.out_ready && dut.u_lpm.u_result.pend.lookup && !dut.u_lpm.u_result.r.hit) d_lpm++;
      if (dut.u_fwd.out_valid && dut.u_fwd.out_ready && dut.u_fwd.u_result.pend.lookup && !dut.u_fwd.u_result.r.hit) d_fwd++;
      if (dut.u_sf.out_valid && dut.u_sf.out_ready && dut.u_sf.u_result.pend.lookup && !dut.u_sf.u_result.r.hit) d_sf++;
      if (eg_valid && eg_ready) begin
        if (eg_sop) rx = {};
        for (int i = 0; i < 32; i++) rx.push_back(eg_data[255-8*i -: 8]);
        if (eg_eop) begin
          rx = rx[0:rx.size() - 1 - int'(eg_empty)];
          if (exp_pk.size() == 0) check(0, "unexpected packet");
          else begin
            automatic bytes_t e = exp_pk.pop_front();
            automatic int p = exp_port.pop_front();
            check(rx == e, $sformatf("packet %0d contents (len %0d/%0d)", nout, rx.size(), e.size()));
            check(eg_port == PORT_W'(p), $sformatf("packet %0d port %0d/%0d", nout, eg_port, p));
          end
          nout++;
          if (rate_on) begin
            rate_n++;
            if (rate_n == 20) rate_first = cyc;
            if (rate_n == 80) rate_last = cyc;
          end
        end
      end
    end
  end

  initial begin
    in_valid = 0; in_sop = 0; in_eop = 0; in_data = 0; in_empty = 0; in_port = 0;
    ctl_valid = 0; ctl = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- control plane: program the tables ----
    lpm.push_back('{32'h0a010500, 24, 32'h0a090909, 9});    // 10.1.5.0/24, most specific first
    for (int x = 0; x < 8; x++) lpm.push_back('{{8'd10, 8'(x), 16'h0}, 16, {8'd10, 8'(x), 16'h0001}, x});
    foreach (lpm[i]) send_ctl(ST_IPV4_LPM, i, {8'h0, lpm[i].pfx}, lpm[i].len, {lpm[i].nhop, 8'h0, 8'(lpm[i].port)});
    foreach (lpm[i]) if (lpm[i].port != 7) begin                  // next hop of 10.7/16 unknown
      dmac_of[lpm[i].nhop] = {16'h0200, $urandom};
      send_ctl(ST_FORWARD, 3 * i + 1, {8'h0, lpm[i].nhop}, 0, dmac_of[lpm[i].nhop]);
    end
    for (int p = 0; p < 10; p++) if (p != 6) begin                // port 6 has no MAC
      smac_of[p] = {16'h0a00, $urandom};
      send_ctl(ST_SEND_FRAME, 100 + p, 40'(p), 0, smac_of[p]);
    end

    // ---- rate: minimum-size good packets, no back-pressure ----
    rate_on = 1;
    for (int n = 0; n < 100; n++) send_pkt(0, 64);
    while (exp_pk.size() > 0) @(posedge clk);
    rate_on = 0;
    check(rate_last - rate_first == 60 * 5,
          $sformatf("60 minimum-size packets in %0d clocks (5 per packet)", rate_last - rate_first));

    // ---- mixed traffic with back-pressure and table writes ----
    eg_random = 1;
    fork
      for (int n = 0; n < 400; n++) begin
        automatic int k = $urandom_range(0, 13);
        send_pkt(k > 6 ? 0 : k, (k == 6) ? $urandom_range(20, 33) : $urandom_range(60, 1518));
      end
      begin
        // hold the output for a while so every slot fills up
        repeat (300) @(posedge clk);
        eg_random = 0;
        force eg_ready = 1'b0;
        repeat (400) @(posedge clk);
        release eg_ready;
        eg_random = 1;
        // writes to unused entries while lookups run
        for (int j = 0; j < 20; j++) begin
          send_ctl(ST_IPV4_LPM, 200 + j, {8'h0, 8'd172, 8'(j), 16'h0}, 16, {32'hac000001, 16'd3});
          repeat ($urandom_range(1, 30)) @(posedge clk);
        end
      end
    join
    eg_random = 0;
    repeat (2000) @(posedge clk);
    while (exp_pk.size() > 0) @(posedge clk);
    repeat (50) @(posedge clk);
    check(drops == 32'(exp_drops), $sformatf("drop count %0d, expected %0d", drops, exp_drops));
    check(slots_used == 0, "all slots released");
    check(m_dual > 0,    $sformatf("two PHVs parsed in one clock: %0d", m_dual));
    check(m_egstall > 0, $sformatf("egress back-pressure: %0d", m_egstall));
    check(m_full > 0,    $sformatf("packet server full: %0d", m_full));
    check(m_bypass > 0,  $sformatf("lookup skipped for a dropped packet: %0d", m_bypass));
    check(m_wr_busy > 0, $sformatf("table write while lookups run: %0d", m_wr_busy));
    check(d_lpm > 0 && d_fwd > 0 && d_sf > 0, $sformatf("table misses lpm %0d fwd %0d sf %0d", d_lpm, d_fwd, d_sf));
    check(d_csum > 0 && d_nonip > 0 && d_runt > 0, $sformatf("parse drops csum %0d non-ip %0d runt %0d", d_csum, d_nonip, d_runt));
    $display("mechanisms: dual %0d egstall %0d full %0d bypass %0d wr_busy %0d miss %0d/%0d/%0d csum %0d nonip %0d runt %0d, packets out %0d",
             m_dual, m_egstall, m_full, m_bypass, m_wr_busy, d_lpm, d_fwd, d_sf, d_csum, d_nonip, d_runt, nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
