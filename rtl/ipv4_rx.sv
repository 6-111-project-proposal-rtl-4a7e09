// ipv4_rx: IPv4 receive path (RFC 791 subset).
//
// Takes the IPv4 packet from the ethertype demux. While the header streams
// by it keeps a running one's-complement sum of its 16-bit words and latches
// version/IHL, total length, flags/offset, protocol and both addresses;
// options (IHL > 5) are summed and skipped. At the last header byte the
// packet is accepted if the sum is 0xFFFF, the version is 4, it is not a
// fragment and it is addressed to MY_IP or 255.255.255.255. The payload,
// trimmed to total length (dropping Ethernet padding), is then forwarded to
// the icmp stream (protocol 1) or the udp stream (protocol 17).
// src_ip and l4_len are held from the end of the header until the next
// packet's header ends, so consumers may sample them at done.
// Outputs are ITP receive streams, registered one clock behind s.
module ipv4_rx
  import itp_pkg::*;
#(
  parameter ip4_t MY_IP = DEF_IP
) (
  input  logic    clk,
  input  logic    rst,
  input  itp_rx_t s,
  output itp_rx_t icmp,
  output itp_rx_t udp,
  output ip4_t    src_ip,
  output logic [15:0] l4_len
);

  logic        in_pkt;
  logic [15:0] idx;         // byte index in the packet
  logic [15:0] sum;
  logic [7:0]  hi;
  logic [3:0]  ihl;
  logic [3:0]  ver;
  logic [15:0] tot_len;
  logic [15:0] frag;         // flags and fragment offset; only MF and offset are checked
  logic [7:0]  proto;
  ip4_t        src, dst;
  logic        sel_icmp, sel_udp;
  logic        xfer;

  assign xfer = s.valid && !s.pause;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_pkt <= 1'b0;
      idx <= '0; sum <= '0; hi <= '0; ihl <= '0; ver <= '0;
      tot_len <= '0; frag <= '0; proto <= '0; src <= '0; dst <= '0;
      sel_icmp <= 1'b0; sel_udp <= 1'b0;
      src_ip <= '0; l4_len <= '0;
      icmp <= '0; udp <= '0;
    end else begin
      icmp.done <= 1'b0; icmp.ok <= 1'b0; icmp.pause <= 1'b1;
      udp.done  <= 1'b0; udp.ok  <= 1'b0; udp.pause  <= 1'b1;
      in_pkt <= s.valid;
      if (s.valid && !in_pkt) begin   // new packet
        idx <= '0;
        sum <= '0;
      end
      if (xfer) begin
        logic [15:0] i;
        logic [15:0] hlen;
        logic [15:0] nsum;
        i    = in_pkt ? idx : 16'd0;
        nsum = in_pkt ? sum : 16'd0;
        hlen = (i == 16'd0) ? {10'd0, s.data[3:0], 2'b00} : {10'd0, ihl, 2'b00};
        idx  <= i + 16'd1;
        if (i[0]) nsum = csum_add(nsum, {hi, s.data});
        else      hi <= s.data;
        sum <= nsum;
        unique case (i)
          16'd0:  begin ver <= s.data[7:4]; ihl <= s.data[3:0]; end
          16'd2:  tot_len[15:8] <= s.data;
          16'd3:  tot_len[7:0]  <= s.data;
          16'd6:  frag[15:8] <= s.data;
          16'd7:  frag[7:0]  <= s.data;
          16'd9:  proto <= s.data;
          16'd12, 16'd13, 16'd14, 16'd15: src <= {src[23:0], s.data};
          16'd16, 16'd17, 16'd18, 16'd19: dst <= {dst[23:0], s.data};
          default: ;
        endcase
        if (i >= 16'd19 && i == hlen - 16'd1) begin
          logic good;
          ip4_t d;
          d = (i == 16'd19) ? {dst[23:0], s.data} : dst;
          good = (nsum == 16'hFFFF) && (ver == 4'd4) && (ihl >= 4'd5) &&
                 (frag[13:0] == 14'd0) && (tot_len >= hlen) &&
                 (d == MY_IP || d == '1);
          sel_icmp   <= good && proto == IP_ICMP;
          sel_udp    <= good && proto == IP_UDP;
          icmp.valid <= good && proto == IP_ICMP;
          udp.valid  <= good && proto == IP_UDP;
          src_ip     <= src;
          l4_len     <= tot_len - hlen;
        end else if (i >= 16'd20 && i >= hlen && i < tot_len) begin
          icmp.pause <= !sel_icmp; icmp.data <= s.data;
          udp.pause  <= !sel_udp;  udp.data  <= s.data;
        end
      end
      if (!s.valid) begin
        icmp.valid <= 1'b0;
        udp.valid  <= 1'b0;
        sel_icmp   <= 1'b0;
        sel_udp    <= 1'b0;
        if (s.done) begin
          icmp.done <= sel_icmp; icmp.ok <= sel_icmp && s.ok;
          udp.done  <= sel_udp;  udp.ok  <= sel_udp && s.ok;
        end
      end
    end
  end

  a_one_output: assert property (@(posedge clk) disable iff (rst) !(icmp.valid && udp.valid));

endmodule
