// tb_rmt_query: checks the key each stage builds, that a PHV marked drop goes
// on without a query, and the ready rules of the query and pending channels.
module tb_rmt_query;
  import router_pkg::*;
  logic in_valid, q_ready, pend_ready;
  logic in_ready [3], q_valid [3], pend_valid [3];
  query_t q [3];
  pend_t pend [3];
  phv_t in_phv;
  int checks = 0, failures = 0;

  rmt_query #(.STAGE(ST_IPV4_LPM)) d0 (.in_valid, .in_ready(in_ready[0]), .in_phv,
    .q_valid(q_valid[0]), .q_ready, .q(q[0]), .pend_valid(pend_valid[0]), .pend_ready, .pend(pend[0]));
  rmt_query #(.STAGE(ST_FORWARD)) d1 (.in_valid, .in_ready(in_ready[1]), .in_phv,
    .q_valid(q_valid[1]), .q_ready, .q(q[1]), .pend_valid(pend_valid[1]), .pend_ready, .pend(pend[1]));
  rmt_query #(.STAGE(ST_SEND_FRAME)) d2 (.in_valid, .in_ready(in_ready[2]), .in_phv,
    .q_valid(q_valid[2]), .q_ready, .q(q[2]), .pend_valid(pend_valid[2]), .pend_ready, .pend(pend[2]));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    for (int n = 0; n < 400; n++) begin
      logic [KEY_W-1:0] k [3];
      bit rdy;
      for (int i = 0; i < $bits(phv_t) / 32 + 1; i++) in_phv[i*32 +: 32] = $urandom;
      in_phv.meta.drop = ($urandom_range(0, 3) == 0);
      in_valid = $urandom_range(0, 3) != 0;
      q_ready = $urandom_range(0, 1);
      pend_ready = $urandom_range(0, 3) != 0;
      #1;
      k[0] = {8'h0, in_phv.hdr.ipv4.dst};
      k[1] = {8'h0, in_phv.meta.nhop};
      k[2] = {32'h0, in_phv.meta.egress_port};
      rdy = pend_ready && (in_phv.meta.drop || q_ready);
      for (int s = 0; s < 3; s++) begin
        check(in_ready[s] == rdy, "in_ready");
        check(pend_valid[s] == (in_valid && rdy), "pend_valid");
        check(q_valid[s] == (in_valid && rdy && !in_phv.meta.drop), "q_valid");
        check(q[s].key == k[s], $sformatf("stage %0d key", s));
        check(q[s].tag == TAG_W'(s), "tag");
        check(pend[s].phv == in_phv && pend[s].lookup == !in_phv.meta.drop, "pending entry");
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
