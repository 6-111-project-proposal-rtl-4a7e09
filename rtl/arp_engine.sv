// arp_engine: the ARP subset of the stack (RFC 826, Ethernet/IPv4 only).
//
// Receives the 28-byte ARP body on the ITP receive stream s. When the frame
// ends with good status and the body is a well-formed Ethernet/IPv4 ARP
// packet whose target address is MY_IP, the sender's (IP, MAC) pair is
// written to the ARP cache through learn_*, and if it was a request a
// 42-byte reply frame (Ethernet header + ARP reply) is sent on the ITP
// transmit stream m; the MAC pads it to the minimum length.
// A request that arrives while a reply is still being sent is learned but
// not answered.
// req_en asks the engine to resolve req_ip: it broadcasts an ARP request
// (target MAC zero) unless a frame is already being sent or a reply starts
// in the same clock, in which case the request is dropped; the answer is
// learned like any ARP packet addressed to MY_IP.
// Timing: learn_en pulses, and m.valid rises, one clock after s.done or
// req_en.
module arp_engine
  import itp_pkg::*;
#(
  parameter mac_t MY_MAC = DEF_MAC,
  parameter ip4_t MY_IP  = DEF_IP
) (
  input  logic    clk,
  input  logic    rst,
  input  itp_rx_t s,
  output itp_tx_t m,
  input  logic    m_pause,
  input  logic    req_en,
  input  ip4_t    req_ip,
  output logic    learn_en,
  output ip4_t    learn_ip,
  output mac_t    learn_mac
);

  localparam int BODY  = 28;
  localparam int REPLY = 42;

  logic [BODY*8-1:0]  body;     // first byte ends up in the top bits
  logic [5:0]         rx_cnt;
  logic [REPLY*8-1:0] rep;
  logic [5:0]         tx_cnt;
  logic               sending;

  // fields of the received body
  logic [15:0] htype, ptype, oper;
  logic [7:0]  hlen, plen;
  mac_t        sha;
  ip4_t        spa, tpa;
  assign htype = body[223:208];
  assign ptype = body[207:192];
  assign hlen  = body[191:184];
  assign plen  = body[183:176];
  assign oper  = body[175:160];
  assign sha   = body[159:112];
  assign spa   = body[111:80];
  assign tpa   = body[31:0];

  logic well_formed;
  assign well_formed = (rx_cnt >= 6'(BODY)) && htype == 16'd1 && ptype == ETH_IPV4 &&
                       hlen == 8'd6 && plen == 8'd4 && (oper == 16'd1 || oper == 16'd2);

  assign m.valid = sending;
  assign m.data  = rep[REPLY*8-1 -: 8];

  always_ff @(posedge clk) begin
    if (rst) begin
      body      <= '0;
      rx_cnt    <= '0;
      rep       <= '0;
      tx_cnt    <= '0;
      sending   <= 1'b0;
      learn_en  <= 1'b0;
      learn_ip  <= '0;
      learn_mac <= '0;
    end else begin
      learn_en <= 1'b0;
      if (s.valid && !s.pause && rx_cnt < 6'(BODY)) begin
        body   <= {body[BODY*8-9:0], s.data};
        rx_cnt <= rx_cnt + 6'd1;
      end
      if (req_en && !sending) begin
        sending <= 1'b1;
        tx_cnt  <= '0;
        rep     <= {48'hFFFF_FFFF_FFFF, MY_MAC, ETH_ARP, 16'd1, ETH_IPV4, 8'd6, 8'd4, 16'd1,
                    MY_MAC, MY_IP, 48'd0, req_ip};
      end
      if (s.done) begin
        rx_cnt <= '0;
        if (s.ok && well_formed && tpa == MY_IP) begin
          learn_en  <= 1'b1;
          learn_ip  <= spa;
          learn_mac <= sha;
          if (oper == 16'd1 && !sending) begin
            sending <= 1'b1;
            tx_cnt  <= '0;
            rep     <= {sha, MY_MAC, ETH_ARP, 16'd1, ETH_IPV4, 8'd6, 8'd4, 16'd2,
                        MY_MAC, MY_IP, sha, spa};
          end
        end
      end
      if (sending && !m_pause) begin
        rep    <= {rep[REPLY*8-9:0], 8'h00};
        tx_cnt <= tx_cnt + 6'd1;
        if (tx_cnt == 6'(REPLY - 1)) sending <= 1'b0;
      end
    end
  end

endmodule
