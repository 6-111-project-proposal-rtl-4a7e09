// icmp_echo: answers ICMP echo requests (ping, RFC 792).
//
// The ICMP message from ipv4_rx is written into a MAX_LEN-byte buffer while
// two one's-complement sums run over it: one over the whole message (to
// verify the request checksum) and one over bytes 4 on (the reply's
// checksum, since the reply's type/code word is zero). When the packet ends
// with good status, type 8 / code 0 and a correct checksum, the module looks
// up the next hop for the requester (lk_ip out; lk_hit/lk_mac back from the
// routing table and ARP cache, combinationally) and, on a hit, sends a
// complete reply frame on the ITP transmit stream m:
//   Ethernet header (next-hop MAC, MY_MAC, 0x0800)
//   IPv4 header (no options, TTL 64, protocol 1, fresh header checksum)
//   ICMP type 0, code 0, new checksum, then the request's bytes 4 on.
// A miss drops the reply and pulses no_route. Requests that arrive while a
// reply is pending are ignored (busy).
// A good Time Exceeded message (type 11, RFC 792) pulses time_exceeded with
// its sender, the router that dropped one of our packets, on te_src.
// Pings and TTL violations are the ICMP messages the design is meant to
// handle. The rest is this design's own choice: building the whole reply
// frame here, dropping replies with no known next hop, and only receiving
// Time Exceeded, because an endpoint that never forwards has no TTL to expire.
// Timing: lookup one clock after done; m.valid rises the clock after that.
module icmp_echo
  import itp_pkg::*;
#(
  parameter int   MAX_LEN = 1480,
  parameter mac_t MY_MAC  = DEF_MAC,
  parameter ip4_t MY_IP   = DEF_IP
) (
  input  logic    clk,
  input  logic    rst,
  input  itp_rx_t s,
  input  ip4_t    src_ip,
  output ip4_t    lk_ip,
  input  logic    lk_hit,
  input  mac_t    lk_mac,
  output itp_tx_t m,
  input  logic    m_pause,
  output logic    replied,
  output logic    no_route,
  output logic    time_exceeded,
  output ip4_t    te_src
);

  localparam int LW  = $clog2(MAX_LEN + 1);
  localparam int HDR = 38;                 // Ethernet + IPv4 + ICMP first word

  typedef enum logic [1:0] {S_RX, S_LOOKUP, S_TX} state_t;
  state_t state;

  logic [7:0]     buffer [MAX_LEN];
  logic [LW-1:0]  len;                     // ICMP message length
  logic [15:0]    sum_all, sum_rep;
  logic [7:0]     hi;
  logic [7:0]     typ, code;
  logic           overflow;
  ip4_t           peer;
  logic [HDR*8-1:0] hdr;
  logic [15:0]    idx;                     // byte index within the reply frame
  logic [LW-1:0]  rd_idx;
  logic           in_pkt;

  // final sums, folding in a lone last byte of an odd-length message
  logic [15:0] fin_all, fin_rep;
  assign fin_all = len[0] ? csum_add(sum_all, {hi, 8'h00}) : sum_all;
  assign fin_rep = len[0] ? csum_add(sum_rep, {hi, 8'h00}) : sum_rep;

  function automatic logic [15:0] ip_csum(input logic [15:0] tot, input ip4_t sa, input ip4_t da);
    logic [15:0] c;
    c = csum_add(16'h4500, tot);
    c = csum_add(c, {8'd64, IP_ICMP});
    c = csum_add(c, sa[31:16]);
    c = csum_add(c, sa[15:0]);
    c = csum_add(c, da[31:16]);
    c = csum_add(c, da[15:0]);
    return ~c;
  endfunction

  assign lk_ip   = peer;
  assign rd_idx  = LW'(idx - 16'(HDR - 4));
  assign m.valid = (state == S_TX);
  assign m.data  = (idx < 16'(HDR)) ? hdr[HDR*8-1 -: 8] : buffer[rd_idx];

  always_ff @(posedge clk) begin
    if (s.valid && !s.pause && state == S_RX && !overflow && len < LW'(MAX_LEN))
      buffer[len] <= s.data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_RX;
      len <= '0; sum_all <= '0; sum_rep <= '0; hi <= '0; typ <= '0; code <= '0;
      overflow <= 1'b0; peer <= '0; hdr <= '0; idx <= '0; in_pkt <= 1'b0;
      replied <= 1'b0; no_route <= 1'b0; time_exceeded <= 1'b0; te_src <= '0;
    end else begin
      replied  <= 1'b0;
      no_route <= 1'b0;
      time_exceeded <= 1'b0;
      in_pkt   <= s.valid;
      unique case (state)
        S_RX: begin
          if (s.valid && !in_pkt) begin
            len <= '0; sum_all <= '0; sum_rep <= '0; overflow <= 1'b0;
          end
          if (s.valid && !s.pause) begin
            logic [LW-1:0] l;
            l = in_pkt ? len : '0;
            if (l == LW'(MAX_LEN)) overflow <= 1'b1;
            else begin
              len <= l + 1'b1;
              if (l == '0) typ  <= s.data;
              if (l == LW'(1)) code <= s.data;
              if (!l[0]) hi <= s.data;
              else begin
                sum_all <= csum_add(in_pkt ? sum_all : 16'd0, {hi, s.data});
                if (l >= LW'(4)) sum_rep <= csum_add(sum_rep, {hi, s.data});
              end
            end
          end
          if (s.done && s.ok && !overflow && typ == 8'd8 && code == 8'd0 &&
              len >= LW'(8) && fin_all == 16'hFFFF) begin
            peer  <= src_ip;
            state <= S_LOOKUP;
          end
          if (s.done && s.ok && !overflow && typ == 8'd11 &&
              len >= LW'(8) && fin_all == 16'hFFFF) begin
            time_exceeded <= 1'b1;
            te_src        <= src_ip;
          end
        end
        S_LOOKUP: begin
          if (lk_hit) begin
            logic [15:0] tot;
            tot   = 16'(len) + 16'd20;
            hdr   <= {lk_mac, MY_MAC, ETH_IPV4,
                      16'h4500, tot, 16'h0000, 16'h0000, 8'd64, IP_ICMP,
                      ip_csum(tot, MY_IP, peer), MY_IP, peer,
                      16'h0000, ~fin_rep};
            idx   <= '0;
            state <= S_TX;
          end else begin
            no_route <= 1'b1;
            state    <= S_RX;
          end
        end
        S_TX: begin
          if (!m_pause) begin
            hdr <= {hdr[HDR*8-9:0], 8'h00};
            idx <= idx + 16'd1;
            if (idx == 16'(len) + 16'd33) begin
              state   <= S_RX;
              replied <= 1'b1;
            end
          end
        end
        default: state <= S_RX;
      endcase
    end
  end

endmodule
