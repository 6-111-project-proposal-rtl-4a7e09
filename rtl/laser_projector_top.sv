// laser_projector_top: network-attached laser projector.
//
// Frames of laser points arrive over 100 Mbps Ethernet and are drawn by an
// RGB laser steered by two galvanometer mirrors. Everything runs on the
// 50 MHz RMII reference clock.
//
// Network offload engine (receive):
//   mac_rx -> ethertype_demux -+-> arp_engine ------------------+
//                              +-> ipv4_rx -+-> icmp_echo ------+-> itp_tx_arbiter -> mac_tx
//                                           +-> udp_laser_rx
// arp_engine learns neighbours into arp_cache; icmp_echo resolves the
// requester's next hop through route_table and arp_cache. When the next hop
// is not in the cache the reply is dropped and arp_engine broadcasts an ARP
// request for it, so a retried ping is answered once the neighbour replies. All links are ITP
// byte streams (see itp_pkg).
// Laser display:
//   udp_laser_rx -> framebuffer (two banks, swap on complete frame)
//                (points kept only when their datagram's FCS is good)
//                -> display_ctrl -> five SPI buses to the x, y, r, g, b DACs.
// The PHY, the DACs and the analog drive stages are outside the FPGA; their
// signals are the ports below. The routing table write port lets software
// or a configuration block replace the reset routes. Status pulses
// (arp_learned, ping_replied, ping_no_route, ttl_exceeded, frame_swapped,
// point_sent)
// are for counters or LEDs.
module laser_projector_top
  import itp_pkg::*;
  import laser_pkg::*;
#(
  parameter mac_t        MY_MAC        = DEF_MAC,
  parameter ip4_t        MY_IP         = DEF_IP,
  parameter ip4_t        LOCAL_NET     = 32'hC0A8_0100,
  parameter ip4_t        LOCAL_MASK    = 32'hFFFF_FF00,
  parameter ip4_t        GATEWAY       = 32'hC0A8_0101,
  parameter logic [15:0] LASER_PORT    = 16'd7000,
  parameter int          ARP_ENTRIES   = 8,
  parameter int          ROUTE_ENTRIES = 4,
  parameter int          ICMP_MAX_LEN  = 1480,
  parameter int          FB_DEPTH      = 1024,
  parameter int          POINT_CLKS    = 1667,
  parameter int          SPI_CLK_DIV   = 2
) (
  input  logic       clk,            // 50 MHz RMII reference clock
  input  logic       rst,
  // RMII PHY
  input  logic       rmii_crs_dv,
  input  logic [1:0] rmii_rxd,
  output logic       rmii_tx_en,
  output logic [1:0] rmii_txd,
  // routing table write port
  input  logic                              rt_wr_en,
  input  logic [$clog2(ROUTE_ENTRIES)-1:0]  rt_wr_idx,
  input  logic                              rt_wr_valid,
  input  ip4_t                              rt_wr_net,
  input  ip4_t                              rt_wr_mask,
  input  ip4_t                              rt_wr_gw,
  // DAC SPI buses, index 0..4 = x, y, r, g, b
  output logic [4:0] dac_sclk,
  output logic [4:0] dac_cs_n,
  output logic [4:0] dac_mosi,
  // status
  output logic       arp_learned,
  output logic       ping_replied,
  output logic       ping_no_route,
  output logic       ttl_exceeded,      // a router dropped one of our packets
  output ip4_t       ttl_exceeded_from, // ... and this is its address
  output logic       laser_datagram,
  output logic       frame_swapped,
  output logic       point_sent,
  output logic       blanked
);

  itp_rx_t mac_s, arp_s, ip_s, icmp_s, udp_s;
  mac_t    src_mac;
  ip4_t    ip_src;
  logic [15:0] l4_len;

  itp_tx_t [1:0] tx_s;
  logic    [1:0] tx_pause;
  itp_tx_t       mac_in;
  logic          mac_pause;

  ip4_t lk_ip, next_hop;
  logic rt_hit, arp_hit;
  mac_t arp_mac;
  ip4_t learn_ip;
  mac_t learn_mac;

  mac_rx u_mac_rx (.clk, .rst, .crs_dv(rmii_crs_dv), .rxd(rmii_rxd), .m(mac_s));

  ethertype_demux #(.MY_MAC(MY_MAC)) u_demux (
    .clk, .rst, .s(mac_s), .arp(arp_s), .ip(ip_s), .src_mac);

  arp_engine #(.MY_MAC(MY_MAC), .MY_IP(MY_IP)) u_arp (
    .clk, .rst, .s(arp_s), .m(tx_s[0]), .m_pause(tx_pause[0]),
    .req_en(ping_no_route && rt_hit), .req_ip(next_hop),
    .learn_en(arp_learned), .learn_ip, .learn_mac);

  arp_cache #(.ENTRIES(ARP_ENTRIES)) u_arp_cache (
    .clk, .rst, .wr_en(arp_learned), .wr_ip(learn_ip), .wr_mac(learn_mac),
    .lk_ip(next_hop), .lk_hit(arp_hit), .lk_mac(arp_mac));

  route_table #(.ENTRIES(ROUTE_ENTRIES), .LOCAL_NET(LOCAL_NET),
                .LOCAL_MASK(LOCAL_MASK), .GATEWAY(GATEWAY)) u_routes (
    .clk, .rst, .wr_en(rt_wr_en), .wr_idx(rt_wr_idx), .wr_valid(rt_wr_valid),
    .wr_net(rt_wr_net), .wr_mask(rt_wr_mask), .wr_gw(rt_wr_gw),
    .lk_ip, .lk_hit(rt_hit), .lk_next_hop(next_hop));

  ipv4_rx #(.MY_IP(MY_IP)) u_ipv4 (
    .clk, .rst, .s(ip_s), .icmp(icmp_s), .udp(udp_s), .src_ip(ip_src), .l4_len);

  icmp_echo #(.MAX_LEN(ICMP_MAX_LEN), .MY_MAC(MY_MAC), .MY_IP(MY_IP)) u_icmp (
    .clk, .rst, .s(icmp_s), .src_ip(ip_src), .lk_ip, .lk_hit(rt_hit && arp_hit),
    .lk_mac(arp_mac), .m(tx_s[1]), .m_pause(tx_pause[1]),
    .replied(ping_replied), .no_route(ping_no_route),
    .time_exceeded(ttl_exceeded), .te_src(ttl_exceeded_from));

  itp_tx_arbiter #(.N(2)) u_arb (
    .clk, .rst, .s(tx_s), .s_pause(tx_pause), .m(mac_in), .m_pause(mac_pause));

  mac_tx u_mac_tx (.clk, .rst, .s(mac_in), .s_pause(mac_pause),
                   .tx_en(rmii_tx_en), .txd(rmii_txd));

  // laser display side
  logic                        pt_valid, pt_last, dg_bad;
  point_t                      pt, rd_pt;
  logic [$clog2(FB_DEPTH)-1:0] rd_addr;
  logic [$clog2(FB_DEPTH):0]   frame_len;

  udp_laser_rx #(.PORT(LASER_PORT)) u_udp (
    .clk, .rst, .s(udp_s), .pt_valid, .pt, .pt_last, .datagram_ok(laser_datagram),
    .datagram_bad(dg_bad));

  framebuffer #(.DEPTH(FB_DEPTH)) u_fb (
    .clk, .rst, .wr_valid(pt_valid), .wr_pt(pt), .wr_last(pt_last),
    .wr_commit(laser_datagram), .wr_abort(dg_bad),
    .rd_addr, .rd_pt, .frame_len, .swap(frame_swapped));

  display_ctrl #(.DEPTH(FB_DEPTH), .POINT_CLKS(POINT_CLKS), .CLK_DIV(SPI_CLK_DIV)) u_disp (
    .clk, .rst, .rd_addr, .rd_pt, .frame_len,
    .sclk(dac_sclk), .cs_n(dac_cs_n), .mosi(dac_mosi), .point_sent, .blanked);

endmodule
