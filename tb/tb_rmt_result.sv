// tb_rmt_result: applies hits and misses to PHVs in each stage and checks the
// edited PHV (next hop, egress port and TTL for the LPM stage, destination MAC
// for forward, source MAC for send-frame, drop on a miss) and the handshakes.
module tb_rmt_result;
  import router_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic pend_valid, r_valid, out_ready;
  logic pend_ready [3], r_ready [3], out_valid [3];
  pend_t pend;
  result_t r [3];
  phv_t out_phv [3];
  int checks = 0, failures = 0;

  rmt_result #(.STAGE(ST_IPV4_LPM)) d0 (.clk, .rst_n, .pend_valid, .pend_ready(pend_ready[0]), .pend,
    .r_valid, .r_ready(r_ready[0]), .r(r[0]), .out_valid(out_valid[0]), .out_ready, .out_phv(out_phv[0]));
  rmt_result #(.STAGE(ST_FORWARD)) d1 (.clk, .rst_n, .pend_valid, .pend_ready(pend_ready[1]), .pend,
    .r_valid, .r_ready(r_ready[1]), .r(r[1]), .out_valid(out_valid[1]), .out_ready, .out_phv(out_phv[1]));
  rmt_result #(.STAGE(ST_SEND_FRAME)) d2 (.clk, .rst_n, .pend_valid, .pend_ready(pend_ready[2]), .pend,
    .r_valid, .r_ready(r_ready[2]), .r(r[2]), .out_valid(out_valid[2]), .out_ready, .out_phv(out_phv[2]));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      phv_t e [3];
      bit go;
      @(negedge clk);
      for (int i = 0; i < $bits(pend_t) / 32 + 1; i++) pend[i*32 +: 32] = $urandom;
      pend_valid = $urandom_range(0, 3) != 0;
      r_valid = $urandom_range(0, 3) != 0;
      out_ready = $urandom_range(0, 3) != 0;
      for (int s = 0; s < 3; s++) begin
        r[s].hit = $urandom_range(0, 3) != 0;
        r[s].index = 16'($urandom);
        r[s].action = {$urandom, 16'($urandom)};
        r[s].tag = TAG_W'(s);
      end
      #1;
      go = pend_valid && out_ready && (!pend.lookup || r_valid);
      for (int s = 0; s < 3; s++) begin
        e[s] = pend.phv;
        if (pend.lookup && !r[s].hit) e[s].meta.drop = 1;
      end
      if (pend.lookup && r[0].hit) begin
        e[0].meta.nhop = r[0].action[47:16];
        e[0].meta.egress_port = r[0].action[7:0];
        e[0].hdr.ipv4.ttl = pend.phv.hdr.ipv4.ttl - 1;
      end
      if (pend.lookup && r[1].hit) e[1].hdr.eth.dst = r[1].action;
      if (pend.lookup && r[2].hit) e[2].hdr.eth.src = r[2].action;
      for (int s = 0; s < 3; s++) begin
        check(out_valid[s] == go && pend_ready[s] == go, "out_valid / pend_ready");
        check(r_ready[s] == (go && pend.lookup), "r_ready");
        if (go) check(out_phv[s] == e[s], $sformatf("stage %0d edited PHV", s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
