// tb_icmp_echo: echo requests of random size (odd and even) go in; checks
// the complete reply frame against one built independently from RFC 791/792
// (fresh IPv4 header checksum, ICMP type 0 with recomputed checksum, data
// echoed), that a corrupted request, a non-echo message, a bad frame status
// and a next-hop miss produce no reply, and no_route on the miss; and that a
// good Time Exceeded message (and not a corrupted one) pulses time_exceeded
// with its sender on te_src.
module tb_icmp_echo;
  import itp_pkg::*;
  import eth_tb_pkg::*;

  localparam mac_t ME = 48'h02_00_00_00_00_01;
  localparam ip4_t MYIP = 32'hC0A8_0132;
  logic clk = 0, rst = 1, m_pause = 1, lk_hit, replied, no_route, time_exceeded;
  itp_rx_t s;
  itp_tx_t m;
  ip4_t src_ip = 0, lk_ip, te_src, te_last = 0;
  mac_t lk_mac;
  int checks = 0, failures = 0;

  icmp_echo #(.MAX_LEN(200), .MY_MAC(ME), .MY_IP(MYIP)) dut (.*);
  always #5 clk = ~clk;

  // next hop model: even addresses resolve
  assign lk_hit = !lk_ip[0];
  assign lk_mac = {16'hAABB, lk_ip};

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bq_t cur, replies [$];
  int nnr = 0, nte = 0;
  initial begin
    forever begin @(posedge clk); #2; m_pause = ($urandom_range(0, 3) != 0); end
  end
  always @(posedge clk) begin
    if (m.valid && !m_pause) cur.push_back(m.data);
    if (!m.valid && cur.size() != 0) begin replies.push_back(cur); cur = {}; end
    if (no_route) nnr++;
    if (time_exceeded) begin nte++; te_last = te_src; end
  end

  task automatic drive(bq_t b, bit ok);
    @(negedge clk);
    s = '0; s.valid = 1; s.pause = 1;
    foreach (b[i]) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      s.data = b[i]; s.pause = 0;
      @(negedge clk);
      s.pause = 1;
    end
    s.valid = 0; s.done = 1; s.ok = ok;
    @(negedge clk);
    s = '0;
  endtask

  function automatic bq_t expected(bq_t req, ip4_t peer);
    bq_t h, r;
    logic [15:0] c;
    r = req;
    r[0] = 8'd0; r[2] = 0; r[3] = 0;
    c = inet_csum(r); r[2] = c[15:8]; r[3] = c[7:0];
    push_be(h, 64'h4500, 2);
    push_be(h, 64'(20 + r.size()), 2);
    push_be(h, 64'h0000_0000_4001_0000, 8);
    push_be(h, 64'(MYIP), 4);
    push_be(h, 64'(peer), 4);
    c = inet_csum(h); h[10] = c[15:8]; h[11] = c[7:0];
    return {eth_hdr({16'hAABB, peer}, ME, ETH_IPV4), h, r};
  endfunction

  initial begin
    s = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 32; t++) begin
      bq_t q;
      ip4_t peer;
      int kind, nr, n0, te0;
      bit want;
      kind = t % 8;
      peer = {$urandom} & ~32'd1;
      if (kind == 4) peer[0] = 1'b1;                // no next hop
      q = icmp_echo_req(16'(t), 16'(t * 3), $urandom_range(0, 120));
      if (kind == 1) q[q.size() - 1] ^= 8'h40;       // corrupt
      if (kind == 2) begin q[0] = 8'd13; q[2] = q[2] - 8'd5; end   // timestamp, not echo
      if (kind >= 6)                                  // a router's Time Exceeded
        q = icmp_time_exceeded(ipv4_pkt(MYIP, 32'h0A00_0001, IP_ICMP, q));
      if (kind == 7) q[9] ^= 8'h01;                   // ... corrupted
      want = (kind == 0 || kind == 5);
      src_ip = peer;
      nr = replies.size(); n0 = nnr; te0 = nte;
      drive(q, kind != 3);
      repeat (20 + 4 * q.size() + 200) @(negedge clk);
      checks++;
      if (replies.size() - nr != int'(want)) begin
        failures++; $display("t=%0d kind %0d replies %0d", t, kind, replies.size() - nr);
      end else if (want) begin
        checks++;
        if (replies[$] != expected(q, peer)) begin failures++; $display("t=%0d reply differs", t); end
      end
      checks++;
      if ((nnr - n0) != int'(kind == 4)) begin failures++; $display("t=%0d no_route", t); end
      checks++;
      if ((nte - te0) != int'(kind == 6) || (kind == 6 && te_last != peer)) begin
        failures++; $display("t=%0d time_exceeded %0d from %h", t, nte - te0, te_last);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
