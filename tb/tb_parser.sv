// tb_parser: two-lane parser fed with good IPv4 packets, corrupted checksums,
// non-IPv4 frames, IPv4 with options and runts. Checks the parse flags and the
// drop decision against a reference, the one-clock latency and that two PHVs
// pass in one clock.
module tb_parser;
  import router_pkg::*;
  import tb_pkt_pkg::*;
  localparam int L = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [L-1:0] in_valid, in_take, out_valid;
  phv_t in_phv [L];
  phv_t out_phv [L];
  logic out_ready;
  int checks = 0, failures = 0, dual = 0, held = 0;
  phv_t exp_q[$];
  logic [L-1:0] last_take;
  bit consumed = 1;

  parser #(.LANES(L)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic phv_t make_phv(output phv_t exp);
    phv_t p = '0;
    int kind = $urandom_range(0, 5);
    int len = (kind == 5) ? $urandom_range(14, 33) : $urandom_range(60, 1500);
    bytes_t b = make_pkt(len < 34 ? 34 : len, {16'h0, $urandom}, {16'h0, $urandom}, $urandom, $urandom, 8'($urandom));
    if (kind == 1) b[24] ^= 8'h01;           // bad checksum
    if (kind == 2) b[12] = 8'h86;            // EtherType 0x86dd
    if (kind == 3) begin                     // IHL 6 (options), checksum fixed up
      logic [15:0] c;
      b[14] = 8'h46; b[24] = 0; b[25] = 0;
      c = csum_bytes(b, 14, 1); b[24] = c[15:8]; b[25] = c[7:0];
    end
    if (kind == 4) p.meta.drop = 1'b1;       // already dropped upstream
    p.hdr = hdr_t'(hdr_bits(b));
    p.meta.pkt_len = LEN_W'(len);
    p.meta.slot = SLOT_W'($urandom);
    exp = p;
    exp.meta.eth_valid  = 1'b1;
    exp.meta.ipv4_valid = (kind != 2) && (kind != 3) && (kind != 5);
    exp.meta.csum_ok    = exp.meta.ipv4_valid && (kind != 1);
    exp.meta.drop       = p.meta.drop || !exp.meta.csum_ok;
    return p;
  endfunction

  always @(posedge clk) if (rst_n) begin
    // outputs leaving now
    if (out_ready)
      for (int i = 0; i < L; i++) if (out_valid[i]) begin
        automatic phv_t e = exp_q.pop_front();
        check(out_phv[i] == e, $sformatf("lane %0d PHV (drop %b/%b ipv4 %b/%b csum %b/%b)", i,
              out_phv[i].meta.drop, e.meta.drop, out_phv[i].meta.ipv4_valid, e.meta.ipv4_valid,
              out_phv[i].meta.csum_ok, e.meta.csum_ok));
      end
    if (out_valid != 0 && !out_ready) held++;
    if (last_take != 0) check(out_valid == last_take, "output one clock after input");
    last_take = in_take;
    consumed = (in_take == in_valid);
    if (in_take == 2'b11) dual++;
  end

  initial begin
    phv_t e;
    in_valid = 0; out_ready = 0; last_take = 0;
    for (int i = 0; i < L; i++) in_phv[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // keep offered lanes until taken
      if (consumed) begin
        case ($urandom_range(0, 2)) 0: in_valid = 2'b00; 1: in_valid = 2'b01; default: in_valid = 2'b11; endcase
        for (int i = 0; i < L; i++) if (in_valid[i]) begin
          in_phv[i] = make_phv(e);
          exp_q.push_back(e);
        end
      end
      out_ready = ($urandom_range(0, 3) != 0);
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (4) @(posedge clk);
    check(exp_q.size() == 0, "every PHV came out");
    check(dual > 0, "two PHVs parsed in one clock");
    check(held > 0, "output held under back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
