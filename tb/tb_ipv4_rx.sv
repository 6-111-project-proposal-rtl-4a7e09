// tb_ipv4_rx: IPv4 packets (ICMP, UDP, other protocols, other
// destinations, bad header checksum, fragments, header options, Ethernet
// padding) go in; checks which output carries the payload, that the payload
// is exact (padding trimmed), the status, src_ip and l4_len.
module tb_ipv4_rx;
  import itp_pkg::*;
  import eth_tb_pkg::*;

  localparam ip4_t MYIP = 32'hC0A8_0132;
  logic clk = 0, rst = 1;
  itp_rx_t s, icmp, udp;
  ip4_t src_ip;
  logic [15:0] l4_len;
  int checks = 0, failures = 0;

  ipv4_rx #(.MY_IP(MYIP)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bq_t gi, gu;
  int di = 0, du = 0, oki = 0, oku = 0;
  always @(posedge clk) begin
    if (icmp.valid && !icmp.pause) gi.push_back(icmp.data);
    if (udp.valid && !udp.pause)   gu.push_back(udp.data);
    if (icmp.done) begin di++; oki += icmp.ok; end
    if (udp.done)  begin du++; oku += udp.ok;  end
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
    repeat (3) @(negedge clk);
  endtask

  initial begin
    s = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 60; t++) begin
      bq_t pay, p;
      ip4_t src, dst;
      logic [7:0] proto;
      bit want, ok;
      int kind, n0i, n0u, d0i, d0u, o0i, o0u;
      kind  = t % 10;
      src   = {$urandom};
      dst   = (kind == 1) ? 32'hC0A8_0133 : (kind == 2) ? '1 : MYIP;
      proto = (kind == 3) ? 8'd6 : (t % 2) ? IP_UDP : IP_ICMP;
      ok    = (kind != 4);
      pay = {};
      for (int i = 0; i < 1 + $urandom_range(0, 60); i++) pay.push_back(8'($urandom));
      p = ipv4_pkt(src, dst, proto, pay);
      want = (kind != 1) && (kind != 3) && (kind != 5) && (kind != 6);
      if (kind == 5) p[11] ^= 8'h01;                          // checksum broken
      if (kind == 6) begin                                    // fragment (MF)
        logic [15:0] c;
        p[6] = 8'h20; p[10] = 0; p[11] = 0;
        c = inet_csum(p[0:19]); p[10] = c[15:8]; p[11] = c[7:0];
      end
      if (kind == 7) begin                                    // one option word
        bq_t h;
        logic [15:0] c;
        h = p[0:19];
        h[0] = 8'h46;
        h[3] = h[3] + 8'd4;
        h.push_back(8'h01); h.push_back(8'h01); h.push_back(8'h01); h.push_back(8'h00);
        h[10] = 0; h[11] = 0;
        c = inet_csum(h); h[10] = c[15:8]; h[11] = c[7:0];
        p = {h, pay};
      end
      while (p.size() < 46) p.push_back(8'hAA);               // Ethernet padding
      gi = {}; gu = {};
      d0i = di; d0u = du; o0i = oki; o0u = oku;
      drive(p, ok);
      checks++;
      if (want) begin
        bq_t g;
        g = (proto == IP_UDP) ? gu : gi;
        if (g != pay || ((proto == IP_UDP) ? gi.size() : gu.size()) != 0) begin
          failures++; $display("t=%0d payload wrong (%0d vs %0d bytes)", t, g.size(), pay.size());
        end
        checks++;
        if (src_ip !== src || l4_len != 16'(pay.size())) begin failures++; $display("t=%0d src/len", t); end
        checks++;
        if ((proto == IP_UDP) ? (du - d0u != 1 || oku - o0u != int'(ok))
                              : (di - d0i != 1 || oki - o0i != int'(ok))) begin
          failures++; $display("t=%0d status", t);
        end
      end else if (gi.size() != 0 || gu.size() != 0 || di != d0i || du != d0u) begin
        failures++; $display("t=%0d kind %0d should be dropped", t, kind);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
