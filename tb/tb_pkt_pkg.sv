// tb_pkt_pkg: packet helpers for the router testbenches.
//
// Builds Ethernet/IPv4 packets as byte queues and computes the IPv4 header
// checksum byte by byte, independently of the RTL's word-wide adder, so that
// expected values do not come from the design under test.
package tb_pkt_pkg;
  typedef byte unsigned bytes_t[$];

  // RFC 791 checksum over bytes [off, off+20), with the checksum field included
  // as given. Returns the ones'-complement of the ones'-complement sum.
  function automatic logic [15:0] csum_bytes(bytes_t b, int off, bit zero_field);
    int unsigned s = 0;
    for (int i = 0; i < 20; i += 2) begin
      int unsigned w = {b[off+i], b[off+i+1]};
      if (zero_field && i == 10) w = 0;
      s += w;
    end
    while (s > 16'hffff) s = (s & 16'hffff) + (s >> 16);
    return ~s[15:0];
  endfunction

  // Ethernet + IPv4 packet of len bytes with a correct header checksum.
  function automatic bytes_t make_pkt(int len, logic [47:0] dmac, logic [47:0] smac,
                                      logic [31:0] src, logic [31:0] dst, byte unsigned ttl);
    bytes_t b;
    logic [15:0] c;
    for (int i = 0; i < 6; i++) b.push_back(dmac[47-8*i -: 8]);
    for (int i = 0; i < 6; i++) b.push_back(smac[47-8*i -: 8]);
    b.push_back(8'h08); b.push_back(8'h00);
    b.push_back(8'h45); b.push_back(8'h00);
    b.push_back(8'((len - 14) >> 8)); b.push_back(8'(len - 14));
    b.push_back(8'($urandom)); b.push_back(8'($urandom));
    b.push_back(8'h40); b.push_back(8'h00);
    b.push_back(ttl); b.push_back(8'd17);
    b.push_back(8'h00); b.push_back(8'h00);
    for (int i = 0; i < 4; i++) b.push_back(src[31-8*i -: 8]);
    for (int i = 0; i < 4; i++) b.push_back(dst[31-8*i -: 8]);
    while (b.size() < len) b.push_back(8'($urandom));
    c = csum_bytes(b, 14, 1);
    b[24] = c[15:8]; b[25] = c[7:0];
    return b;
  endfunction

  // First 34 bytes as a 272-bit vector, byte 0 in the top bits.
  function automatic logic [271:0] hdr_bits(bytes_t b);
    logic [271:0] h = '0;
    for (int i = 0; i < 34 && i < b.size(); i++) h[271-8*i -: 8] = b[i];
    return h;
  endfunction

  // Word w (32 bytes) of a packet, byte 0 in the top bits, zero past the end.
  function automatic logic [255:0] word_of(bytes_t b, int w);
    logic [255:0] d = '0;
    for (int i = 0; i < 32; i++)
      if (w*32 + i < b.size()) d[255-8*i -: 8] = b[w*32+i];
    return d;
  endfunction
endpackage
