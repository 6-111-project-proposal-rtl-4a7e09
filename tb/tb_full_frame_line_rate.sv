// tb_full_frame_line_rate: the projector at its default parameters receives
// one full framebuffer bank (1024 points) as seven back-to-back UDP
// datagrams of up to 147 points, at Ethernet line rate (minimum 12-byte
// inter-packet gap). No point carries the last flag, so the frame closes
// when the bank fills. Checks: every datagram accepted, exactly one bank
// swap with frame_len = 1024, the swap within the wire time of the burst
// (the receive path keeps up with 100 Mbit/s), and then the display drawing
// all 1024 points in order, one every 1667 clocks, on the five DAC buses.
module tb_full_frame_line_rate;
  import itp_pkg::*;
  import laser_pkg::*;
  import eth_tb_pkg::*;

  localparam mac_t HOST = 48'h00_11_22_33_44_55;
  localparam ip4_t HIP  = 32'hC0A8_010A;
  localparam int   NPTS = 1024;
  localparam int   PER  = 147;            // points per datagram: 1470 bytes
  localparam int   PCLK = 1667;

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
  always #10 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_dg = 0, n_swap = 0, swap_cyc = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      n_dg += laser_datagram;
      if (frame_swapped) begin n_swap++; swap_cyc = cyc; end
    end
  end

  logic [15:0] sh [5];
  int nb [5];
  logic [11:0] word_q [5][$];
  for (genvar c = 0; c < 5; c++) begin : g_dac
    initial nb[c] = 0;
    always @(posedge dac_sclk[c]) if (!dac_cs_n[c]) begin sh[c] = {sh[c][14:0], dac_mosi[c]}; nb[c]++; end
    always @(posedge dac_cs_n[c]) begin
      if (nb[c] == 16) word_q[c].push_back(sh[c][11:0]);
      nb[c] = 0;
    end
  end

  function automatic point_t mkpt(int k);
    return '{x: 12'(k), y: 12'(NPTS - 1 - k), r: 12'(k * 3), g: 12'(k * 5), b: 12'(k * 7)};
  endfunction

  initial begin
    bq_t frames [$];
    int nbytes;
    int start_cyc, wire_clks, kfirst, k0;
    point_t p;
    repeat (5) @(negedge clk);
    rst = 0;
    repeat (20) @(negedge clk);
    // build the whole burst: preamble + frame + FCS, 12 idle bytes between
    k0 = 0;
    nbytes = 0;
    while (k0 < NPTS) begin
      bq_t pay, f;
      int n;
      n = (NPTS - k0 < PER) ? NPTS - k0 : PER;
      pay = {};
      for (int k = k0; k < k0 + n; k++) begin
        point_t q;
        q = mkpt(k);
        push_be(pay, 64'(q.x), 2); push_be(pay, 64'(q.y), 2); push_be(pay, 64'(q.r), 2);
        push_be(pay, 64'(q.g), 2); push_be(pay, 64'(q.b), 2);
      end
      f = {eth_hdr(DEF_MAC, HOST, ETH_IPV4), ipv4_pkt(HIP, DEF_IP, IP_UDP, udp_dgram(16'd40000, 16'd7000, pay))};
      frames.push_back({8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'hD5, add_fcs(f)});
      nbytes += frames[$].size() + 12;
      k0 += n;
    end
    // drive it: crs_dv low for the 12-byte (48-clock) gap between frames
    start_cyc = cyc;
    foreach (frames[f]) begin
      foreach (frames[f][b])
        for (int k = 0; k < 4; k++) begin
          @(negedge clk); rmii_crs_dv = 1; rmii_rxd = frames[f][b][2*k +: 2];
        end
      @(negedge clk); rmii_crs_dv = 0; rmii_rxd = 0;
      repeat (47) @(negedge clk);
    end
    wire_clks = cyc - start_cyc;
    repeat (20) @(negedge clk);
    checks++;
    if (n_dg != 7) begin failures++; $display("datagrams accepted %0d", n_dg); end
    checks++;
    if (n_swap != 1 || dut.frame_len != (NPTS)) begin failures++; $display("swaps %0d len %0d", n_swap, dut.frame_len); end
    checks++;
    if (swap_cyc < 0 || swap_cyc - start_cyc > wire_clks + 20) begin
      failures++; $display("swap %0d clocks after start, burst took %0d", swap_cyc - start_cyc, wire_clks);
    end
    $display("burst of %0d bytes on the wire in %0d clocks (%0d bit/clock x 50 MHz)", nbytes, wire_clks, 2);
    // drawing: collect a little over one scan of the frame
    foreach (word_q[c]) word_q[c] = {};
    repeat (PCLK / 2) @(negedge clk);
    foreach (word_q[c]) word_q[c] = {};
    repeat ((NPTS + 4) * PCLK) @(negedge clk);
    checks++;
    if (word_q[0].size() < NPTS + 2) begin failures++; $display("only %0d points drawn", word_q[0].size()); end
    else begin
      int nbad;
      nbad = 0;
      p.x = word_q[0].pop_front(); p.y = word_q[1].pop_front(); p.r = word_q[2].pop_front();
      p.g = word_q[3].pop_front(); p.b = word_q[4].pop_front();
      kfirst = int'(p.x);
      if (p !== mkpt(kfirst)) nbad++;
      for (int i = 1; i <= NPTS; i++) begin
        p.x = word_q[0].pop_front(); p.y = word_q[1].pop_front(); p.r = word_q[2].pop_front();
        p.g = word_q[3].pop_front(); p.b = word_q[4].pop_front();
        if (p !== mkpt((kfirst + i) % NPTS)) nbad++;
      end
      checks++;
      if (nbad != 0) begin failures++; $display("%0d points out of order or wrong", nbad); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
