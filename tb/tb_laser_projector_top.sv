// tb_laser_projector_top: end-to-end test of the projector at its default
// parameters. A host on the local subnet and a gateway talk to the design
// over RMII; five SPI slave models read the DACs.
//   1. blank output before any frame
//   2. host ARP request -> ARP reply; host learned
//   3. host ping -> echo reply to the host's MAC
//   4. ping from beyond the gateway before the gateway is known -> dropped
//      (no route) and an ARP request for the gateway goes out; gateway ARPs
//      us; same ping -> reply via the gateway MAC
//   5. frame with a corrupted FCS -> ignored
//   6. ARP request and ping back to back -> both replies, the second sender
//      paused by the transmit arbiter meanwhile
//   7. laser frame A (UDP, last flag) -> bank swap, points drawn in a loop
//   8. half of frame B -> display keeps showing A; a corrupted datagram
//      with B's last points -> discarded, A still shown; rest of B -> B drawn
//   9. routing table rewritten at run time -> ping from a new on-link subnet
//      triggers an ARP request for that host, then is answered
//  10. a router beyond the gateway reports Time Exceeded for one of our
//      replies -> ttl_exceeded with the router's address, nothing sent
// Each mechanism is counted and a failure is counted for any that never
// happened.
module tb_laser_projector_top;
  import itp_pkg::*;
  import laser_pkg::*;
  import eth_tb_pkg::*;

  localparam mac_t ME    = DEF_MAC;
  localparam ip4_t MYIP  = DEF_IP;
  localparam mac_t HOST  = 48'h00_11_22_33_44_55;
  localparam ip4_t HIP   = 32'hC0A8_010A;
  localparam mac_t GWMAC = 48'h00_AA_BB_CC_DD_EE;
  localparam ip4_t GWIP  = 32'hC0A8_0101;
  localparam ip4_t FAR   = 32'h0808_0808;
  localparam int   PCLK  = 1667;          // default POINT_CLKS

  logic clk = 0, rst = 1;
  logic rmii_crs_dv = 0, rmii_tx_en;
  logic [1:0] rmii_rxd = 0, rmii_txd;
  logic rt_wr_en = 0, rt_wr_valid = 0;
  logic [1:0] rt_wr_idx = 0;
  ip4_t rt_wr_net = 0, rt_wr_mask = 0, rt_wr_gw = 0;
  logic [4:0] dac_sclk, dac_cs_n, dac_mosi;
  logic arp_learned, ping_replied, ping_no_route, laser_datagram, frame_swapped, point_sent, blanked;
  logic ttl_exceeded;
  ip4_t ttl_exceeded_from;
  int checks = 0, failures = 0;

  laser_projector_top dut (.*);
  always #10 clk = ~clk;     // 50 MHz

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- event counters ----------------
  int n_learn = 0, n_reply = 0, n_noroute = 0, n_dgram = 0, n_swap = 0, n_blank = 0;
  int n_arb_pause = 0, n_fcs_bad = 0, n_dg_abort = 0, n_ttl = 0;
  ip4_t ttl_from = 0;
  always @(posedge clk) if (!rst) begin
    if (ttl_exceeded) begin n_ttl++; ttl_from = ttl_exceeded_from; end
    n_learn   += arp_learned;
    n_reply   += ping_replied;
    n_noroute += ping_no_route;
    n_dgram   += laser_datagram;
    n_swap    += frame_swapped;
    n_blank   += (point_sent && blanked);
    n_dg_abort += dut.dg_bad;
    if (dut.u_arb.busy && dut.tx_s[dut.u_arb.grant == 0 ? 1 : 0].valid) n_arb_pause++;
    if (dut.mac_s.done && !dut.mac_s.ok) n_fcs_bad++;
  end

  // ---------------- RMII transmit decoder ----------------
  bq_t txf [$];
  bq_t tcur;
  logic [7:0] tsh;
  int tnd = 0;
  always @(posedge clk) begin
    if (rst) begin
      tcur = {};
      tnd = 0;
    end else if (rmii_tx_en) begin
      tsh = {rmii_txd, tsh[7:2]};
      tnd++;
      if (tnd % 4 == 0) tcur.push_back(tsh);
    end else if (tnd != 0) begin
      bq_t body, pre;
      pre = {8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'hD5};
      checks++;
      if (tcur.size() < 72) begin
        failures++; $display("runt transmitted");
      end else if (tcur[0:7] != pre) begin
        failures++; $display("bad preamble / runt");
      end else begin
        body = tcur[8:$-4];
        if (add_fcs(body) != tcur[8:$]) begin failures++; $display("bad FCS on transmitted frame"); end
        else txf.push_back(body);
      end
      tcur = {};
      tnd = 0;
    end
  end

  // ---------------- SPI DAC models ----------------
  logic [15:0] sh [5];
  int nb [5];
  logic [11:0] word_q [5][$];
  for (genvar c = 0; c < 5; c++) begin : g_dac
    initial nb[c] = 0;
    always @(posedge dac_sclk[c]) if (!dac_cs_n[c]) begin sh[c] = {sh[c][14:0], dac_mosi[c]}; nb[c]++; end
    always @(posedge dac_cs_n[c]) begin
      if (nb[c] == 16) begin
        word_q[c].push_back(sh[c][11:0]);
        if (sh[c][15:12] != 4'b0011) begin failures++; $display("DAC command bits"); end
      end
      nb[c] = 0;
    end
  end

  function automatic void flush_dacs();
    foreach (word_q[c]) word_q[c] = {};
  endfunction

  function automatic point_t pop_point();
    point_t p;
    p.x = word_q[0].pop_front(); p.y = word_q[1].pop_front(); p.r = word_q[2].pop_front();
    p.g = word_q[3].pop_front(); p.b = word_q[4].pop_front();
    return p;
  endfunction

  // ---------------- stimulus helpers ----------------
  task automatic send(bq_t f);
    bq_t w;
    w = {8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'hD5};
    while (f.size() < 60) f.push_back(8'h00);
    w = {w, add_fcs(f)};
    foreach (w[i])
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        rmii_crs_dv = 1;
        rmii_rxd = w[i][2*k +: 2];
      end
    @(negedge clk);
    rmii_crs_dv = 0;
    rmii_rxd = 0;
    repeat (48) @(negedge clk);
  endtask

  task automatic wait_tx(int n);
    int g;
    g = 0;
    while (txf.size() < n && g < 20000) begin @(negedge clk); g++; end
  endtask

  function automatic bq_t icmp_reply_frame(mac_t dmac, ip4_t peer, bq_t req);
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
    h = {eth_hdr(dmac, ME, ETH_IPV4), h, r};
    while (h.size() < 60) h.push_back(8'h00);   // MAC padding
    return h;
  endfunction

  function automatic bq_t arp_reply_frame(mac_t hm, ip4_t hip);
    bq_t f;
    f = {eth_hdr(hm, ME, ETH_ARP), arp_pkt(16'd2, ME, MYIP, hm, hip)};
    while (f.size() < 60) f.push_back(8'h00);
    return f;
  endfunction

  function automatic bq_t arp_request_frame(ip4_t target);
    bq_t f;
    f = {eth_hdr('1, ME, ETH_ARP), arp_pkt(16'd1, ME, MYIP, 48'd0, target)};
    while (f.size() < 60) f.push_back(8'h00);
    return f;
  endfunction

  task automatic expect_frame(bq_t exp, string what);
    checks++;
    if (txf.size() == 0) begin failures++; $display("%s: nothing sent", what); end
    else begin
      bq_t g;
      g = txf.pop_front();
      if (g != exp) begin failures++; $display("%s: frame differs (%0d vs %0d bytes)", what, g.size(), exp.size()); end
    end
  endtask

  // a laser datagram: points k0 .. k0+n-1 of frame f, last flag optional
  function automatic point_t mkpt(int f, int k);
    return '{x: 12'(f * 256 + k * 16), y: 12'(4095 - k * 33), r: 12'(k * 100), g: 12'(f * 500), b: 12'(k + 7)};
  endfunction

  function automatic bq_t laser_frame(int f, int k0, int n, bit last);
    bq_t pay;
    for (int k = k0; k < k0 + n; k++) begin
      point_t p;
      p = mkpt(f, k);
      push_be(pay, 64'({(last && k == k0 + n - 1), 3'b000, p.x}), 2);
      push_be(pay, 64'(p.y), 2);
      push_be(pay, 64'(p.r), 2);
      push_be(pay, 64'(p.g), 2);
      push_be(pay, 64'(p.b), 2);
    end
    return {eth_hdr(ME, HOST, ETH_IPV4), ipv4_pkt(HIP, MYIP, IP_UDP, udp_dgram(16'd40000, 16'd7000, pay))};
  endfunction

  // checks that the next 2*n points drawn are frame f's n points, in a loop
  task automatic expect_drawn(int f, int n, string what);
    int start;
    point_t p;
    flush_dacs();
    repeat (PCLK / 2) @(negedge clk);
    flush_dacs();
    repeat ((2 * n + 1) * PCLK) @(negedge clk);
    checks++;
    if (word_q[0].size() < 2 * n) begin failures++; $display("%s: %0d points", what, word_q[0].size()); return; end
    p = pop_point();
    start = -1;
    for (int k = 0; k < n; k++) if (p === mkpt(f, k)) start = k;
    checks++;
    if (start < 0) begin failures++; $display("%s: point not from frame %0d", what, f); return; end
    for (int i = 1; i < 2 * n; i++) begin
      p = pop_point();
      checks++;
      if (p !== mkpt(f, (start + i) % n)) begin failures++; $display("%s: order broken at %0d", what, i); return; end
    end
  endtask

  initial begin
    bq_t q, f;
    int r0;
    repeat (5) @(negedge clk);
    rst = 0;

    // 1. blank
    repeat (3 * PCLK) @(negedge clk);
    checks++;
    if (n_blank < 2 || word_q[2].size() == 0 || word_q[2][0] != 0 || word_q[0][0] != DAC_MID) begin
      failures++; $display("no blank output");
    end

    // 2. ARP from host
    send({eth_hdr('1, HOST, ETH_ARP), arp_pkt(16'd1, HOST, HIP, 48'd0, MYIP)});
    wait_tx(1);
    expect_frame(arp_reply_frame(HOST, HIP), "arp reply");

    // 3. ping from host
    q = icmp_echo_req(16'h77, 16'd1, 56);
    send({eth_hdr(ME, HOST, ETH_IPV4), ipv4_pkt(HIP, MYIP, IP_ICMP, q)});
    wait_tx(1);
    expect_frame(icmp_reply_frame(HOST, HIP, q), "ping reply");

    // 4. far ping before the gateway is known
    q = icmp_echo_req(16'h78, 16'd2, 32);
    r0 = n_noroute;
    send({eth_hdr(ME, GWMAC, ETH_IPV4), ipv4_pkt(FAR, MYIP, IP_ICMP, q)});
    wait_tx(1);
    checks++;
    if (n_noroute != r0 + 1) begin failures++; $display("far ping without gateway MAC"); end
    expect_frame(arp_request_frame(GWIP), "ARP request for the gateway");
    send({eth_hdr('1, GWMAC, ETH_ARP), arp_pkt(16'd1, GWMAC, GWIP, 48'd0, MYIP)});
    wait_tx(1);
    expect_frame(arp_reply_frame(GWMAC, GWIP), "arp reply to gateway");
    send({eth_hdr(ME, GWMAC, ETH_IPV4), ipv4_pkt(FAR, MYIP, IP_ICMP, q)});
    wait_tx(1);
    expect_frame(icmp_reply_frame(GWMAC, FAR, q), "far ping via gateway");

    // 5. corrupted frame: FCS computed, then a payload bit flipped on the wire
    begin
      bq_t w;
      f = {eth_hdr(ME, HOST, ETH_IPV4), ipv4_pkt(HIP, MYIP, IP_ICMP, icmp_echo_req(16'h79, 16'd3, 20))};
      while (f.size() < 60) f.push_back(8'h00);
      w = {8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'hD5, add_fcs(f)};
      w[30] ^= 8'h10;
      foreach (w[i]) for (int k = 0; k < 4; k++) begin
        @(negedge clk); rmii_crs_dv = 1; rmii_rxd = w[i][2*k +: 2];
      end
      @(negedge clk); rmii_crs_dv = 0;
      repeat (3000) @(negedge clk);
      checks++;
      if (txf.size() != 0) begin failures++; $display("corrupt frame answered"); end
    end

    // 6. ping then ARP request back to back: replies contend for the MAC
    q = icmp_echo_req(16'h7A, 16'd4, 300);
    send({eth_hdr(ME, HOST, ETH_IPV4), ipv4_pkt(HIP, MYIP, IP_ICMP, q)});
    send({eth_hdr('1, HOST, ETH_ARP), arp_pkt(16'd1, HOST, HIP, 48'd0, MYIP)});
    wait_tx(2);
    repeat (100) @(negedge clk);
    checks++;
    if (txf.size() != 2) begin failures++; $display("contention: %0d frames", txf.size()); end
    else begin
      if (txf[0].size() < 100) begin bq_t t0; t0 = txf.pop_front(); txf.push_back(t0); end
      expect_frame(icmp_reply_frame(HOST, HIP, q), "long ping reply");
      expect_frame(arp_reply_frame(HOST, HIP), "arp reply after ping");
    end

    // 7. laser frame A: 6 points in two datagrams
    send(laser_frame(1, 0, 3, 0));
    send(laser_frame(1, 3, 3, 1));
    expect_drawn(1, 6, "frame A");

    // 8. frame B arrives in two halves; A stays on until B is complete
    send(laser_frame(2, 0, 4, 0));
    expect_drawn(1, 6, "A while B incomplete");
    // a corrupted datagram (bad FCS) that would complete frame B is discarded
    begin
      bq_t w;
      f = laser_frame(9, 4, 4, 1);
      w = {8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'hD5, add_fcs(f)};
      w[w.size() - 1] ^= 8'h01;
      foreach (w[i]) for (int k = 0; k < 4; k++) begin
        @(negedge clk); rmii_crs_dv = 1; rmii_rxd = w[i][2*k +: 2];
      end
      @(negedge clk); rmii_crs_dv = 0;
      repeat (100) @(negedge clk);
    end
    expect_drawn(1, 6, "A after corrupt datagram");
    send(laser_frame(2, 4, 4, 1));
    expect_drawn(2, 8, "frame B");

    // 9. new route: 10.0.0.0/8 on-link in entry 1, default route moved to entry 3
    @(negedge clk);
    rt_wr_en = 1; rt_wr_idx = 3; rt_wr_valid = 1; rt_wr_net = 32'h0;
    rt_wr_mask = 32'h0; rt_wr_gw = GWIP;
    @(negedge clk);
    rt_wr_idx = 1; rt_wr_net = 32'h0A00_0000; rt_wr_mask = 32'hFF00_0000; rt_wr_gw = 32'h0;
    @(negedge clk);
    rt_wr_en = 0;
    // 10.1.2.3 is on-link now but not in the ARP cache: dropped; after its ARP it is answered
    q = icmp_echo_req(16'h7B, 16'd5, 10);
    r0 = n_noroute;
    send({eth_hdr(ME, HOST, ETH_IPV4), ipv4_pkt(32'h0A01_0203, MYIP, IP_ICMP, q)});
    wait_tx(1);
    checks++;
    if (n_noroute != r0 + 1) begin failures++; $display("on-link route not used"); end
    expect_frame(arp_request_frame(32'h0A01_0203), "ARP request for on-link host");
    send({eth_hdr('1, 48'h00_01_02_03_04_05, ETH_ARP), arp_pkt(16'd2, 48'h00_01_02_03_04_05, 32'h0A01_0203, ME, MYIP)});
    send({eth_hdr(ME, HOST, ETH_IPV4), ipv4_pkt(32'h0A01_0203, MYIP, IP_ICMP, q)});
    wait_tx(1);
    expect_frame(icmp_reply_frame(48'h00_01_02_03_04_05, 32'h0A01_0203, q), "ping over new route");

    // 10. Time Exceeded from a router beyond the gateway
    q = icmp_time_exceeded(ipv4_pkt(MYIP, FAR, IP_ICMP, icmp_echo_req(16'h7C, 16'd6, 8)));
    send({eth_hdr(ME, GWMAC, ETH_IPV4), ipv4_pkt(32'h0A09_0909, MYIP, IP_ICMP, q)});
    repeat (200) @(negedge clk);
    checks++;
    if (n_ttl != 1 || ttl_from != 32'h0A09_0909) begin
      failures++; $display("time exceeded: %0d from %h", n_ttl, ttl_from);
    end

    // mechanisms seen
    $display("arp learned %0d, pings replied %0d, no-route drops %0d, bad FCS %0d, laser datagrams discarded %0d, arbiter pauses %0d, datagrams %0d, swaps %0d, blank points %0d",
             n_learn, n_reply, n_noroute, n_fcs_bad, n_dg_abort, n_arb_pause, n_dgram, n_swap, n_blank);
    checks++; if (n_learn   < 4) begin failures++; $display("ARP learning not seen"); end
    checks++; if (n_reply   < 4) begin failures++; $display("ping replies not seen"); end
    checks++; if (n_noroute < 2) begin failures++; $display("no-route drop not seen"); end
    checks++; if (n_dg_abort != 1) begin failures++; $display("laser datagram discards %0d", n_dg_abort); end
    checks++; if (n_fcs_bad < 2) begin failures++; $display("FCS error not seen"); end
    checks++; if (n_arb_pause < 1) begin failures++; $display("arbiter pause not seen"); end
    checks++; if (n_dgram  != 4) begin failures++; $display("datagram count %0d", n_dgram); end
    checks++; if (n_swap   != 2) begin failures++; $display("swap count %0d", n_swap); end
    checks++; if (n_blank  < 2) begin failures++; $display("blanking not seen"); end
    checks++; if (txf.size() != 0) begin failures++; $display("unexpected frames sent"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
