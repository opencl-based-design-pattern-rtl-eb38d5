// tb_ipv4_checksum: checks the IPv4 checksum unit against a published header
// and against a byte-wise reference on random headers.
module tb_ipv4_checksum;
  import router_pkg::*;
  import tb_pkt_pkg::*;
  ipv4_h_t     hdr;
  logic [15:0] csum;
  logic        ok;
  int checks = 0, failures = 0;

  ipv4_checksum dut (.hdr, .csum, .ok);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bytes_t b;
    // 4500 0073 0000 4000 4011 b861 c0a8 0001 c0a8 00c7: checksum b861.
    hdr = 160'h4500_0073_0000_4000_4011_b861_c0a8_0001_c0a8_00c7;
    #1;
    check(csum == 16'hb861, $sformatf("known header csum %h", csum));
    check(ok, "known header verifies");
    hdr.ttl = 8'h3f;
    #1;
    check(!ok, "changed TTL fails verify");
    for (int n = 0; n < 500; n++) begin
      b = {};
      for (int i = 0; i < 20; i++) b.push_back(8'($urandom));
      for (int i = 0; i < 20; i++) hdr[159-8*i -: 8] = b[i];
      #1;
      check(csum == csum_bytes(b, 0, 1), "random header csum");
      check(ok == (csum_bytes(b, 0, 0) == 16'h0000), "random header verify");
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
