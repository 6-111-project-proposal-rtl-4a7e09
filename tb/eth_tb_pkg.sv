// eth_tb_pkg: reference models for the testbenches.
//
// Frame builders and checksums written straight from the standards, in the
// byte-reflected form (CRC-32 with polynomial 0xEDB88320, FCS sent low byte
// first), independent of the MSB-first formulation used by the RTL.
package eth_tb_pkg;

  typedef logic [7:0] bq_t [$];

  function automatic logic [31:0] crc32_ref(bq_t b);
    logic [31:0] c;
    c = '1;
    foreach (b[i]) begin
      c ^= {24'd0, b[i]};
      for (int k = 0; k < 8; k++) c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    end
    return ~c;
  endfunction

  // payload -> payload + FCS
  function automatic bq_t add_fcs(bq_t b);
    bq_t r;
    logic [31:0] f;
    r = b;
    f = crc32_ref(b);
    for (int k = 0; k < 4; k++) r.push_back(f[8*k +: 8]);
    return r;
  endfunction

  function automatic void push_be(ref bq_t q, input logic [63:0] v, input int nbytes);
    for (int k = nbytes - 1; k >= 0; k--) q.push_back(v[8*k +: 8]);
  endfunction

  function automatic logic [15:0] inet_csum(bq_t b);
    logic [31:0] s;
    s = 0;
    for (int i = 0; i < b.size(); i += 2)
      s += {16'd0, b[i], (i + 1 < b.size()) ? b[i+1] : 8'h00};
    while (s[31:16] != 0) s = {16'd0, s[15:0]} + {16'd0, s[31:16]};
    return ~s[15:0];
  endfunction

  function automatic bq_t eth_hdr(logic [47:0] dst, logic [47:0] src, logic [15:0] typ);
    bq_t q;
    push_be(q, 64'(dst), 6);
    push_be(q, 64'(src), 6);
    push_be(q, 64'(typ), 2);
    return q;
  endfunction

  // IPv4 header (no options) + payload
  function automatic bq_t ipv4_pkt(logic [31:0] src, logic [31:0] dst, logic [7:0] proto, bq_t pay);
    bq_t h;
    logic [15:0] c;
    push_be(h, 64'h4500, 2);
    push_be(h, 64'(20 + pay.size()), 2);
    push_be(h, 64'h1234, 2);
    push_be(h, 64'h4000, 2);
    push_be(h, 64'h40, 1);
    h.push_back(proto);
    push_be(h, 0, 2);
    push_be(h, 64'(src), 4);
    push_be(h, 64'(dst), 4);
    c = inet_csum(h);
    h[10] = c[15:8];
    h[11] = c[7:0];
    foreach (pay[i]) h.push_back(pay[i]);
    return h;
  endfunction

  function automatic bq_t icmp_echo_req(logic [15:0] id, logic [15:0] seq, int n);
    bq_t q;
    logic [15:0] c;
    push_be(q, 64'h0800_0000, 4);
    push_be(q, 64'(id), 2);
    push_be(q, 64'(seq), 2);
    for (int i = 0; i < n; i++) q.push_back(8'(i * 7 + 3));
    c = inet_csum(q);
    q[2] = c[15:8];
    q[3] = c[7:0];
    return q;
  endfunction

  // Time Exceeded (type 11, code 0): unused word, then the start of the
  // datagram that was dropped (its IP header and first 8 data bytes)
  function automatic bq_t icmp_time_exceeded(bq_t dropped);
    bq_t q;
    logic [15:0] c;
    push_be(q, 64'h0B00_0000_0000_0000, 8);
    foreach (dropped[i]) if (i < 28) q.push_back(dropped[i]);
    c = inet_csum(q);
    q[2] = c[15:8];
    q[3] = c[7:0];
    return q;
  endfunction

  function automatic bq_t arp_pkt(logic [15:0] oper, logic [47:0] sha, logic [31:0] spa,
                                  logic [47:0] tha, logic [31:0] tpa);
    bq_t q;
    push_be(q, 64'h0001_0800_0604, 6);
    push_be(q, 64'(oper), 2);
    push_be(q, 64'(sha), 6);
    push_be(q, 64'(spa), 4);
    push_be(q, 64'(tha), 6);
    push_be(q, 64'(tpa), 4);
    return q;
  endfunction

  function automatic bq_t udp_dgram(logic [15:0] sport, logic [15:0] dport, bq_t pay);
    bq_t q;
    push_be(q, 64'(sport), 2);
    push_be(q, 64'(dport), 2);
    push_be(q, 64'(8 + pay.size()), 2);
    push_be(q, 0, 2);
    foreach (pay[i]) q.push_back(pay[i]);
    return q;
  endfunction

endpackage
