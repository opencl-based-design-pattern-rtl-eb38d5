// ipv4_checksum: IPv4 header checksum, for verify at ingress and update at egress.
//
// The header checksum is the ones'-complement of the ones'-complement sum of
// the ten 16-bit words of a 20-byte header, taken with the checksum field as
// zero (RFC 791). csum is that value for the given header; ok is high when the
// checksum field already holds it, which is the verify test. The parser uses
// ok, the deparser uses csum to refresh the field after the TTL changed.
// Purely combinational: a ten-input adder tree and two end-around carry folds.
// The source text places a verify stage at ingress and an update stage at
// egress; the arithmetic is the standard one.
module ipv4_checksum
  import router_pkg::*;
(
  input  ipv4_h_t     hdr,
  output logic [15:0] csum,
  output logic        ok
);
  logic [159:0] bits;
  logic [19:0]  sum;
  logic [16:0]  fold1;
  logic [15:0]  fold2;

  always_comb begin
    bits      = hdr;
    bits[79:64] = 16'h0;                  // checksum field counted as zero
    sum = '0;
    for (int i = 0; i < 10; i++) sum = sum + 20'(bits[i*16 +: 16]);
    fold1 = 17'(sum[15:0]) + 17'(sum[19:16]);
    fold2 = fold1[15:0] + 16'(fold1[16]);
    csum  = ~fold2;
    ok    = (csum == hdr.csum);
  end
endmodule
