// ethertype_demux: the indirection layer between layer 2 and layer 3.
//
// Reads the 14-byte Ethernet II header from the receive stream s, keeps
// frames addressed to MY_MAC or to broadcast, and forwards the payload
// (byte 14 on) to the ARP stream for EtherType 0x0806 or the IPv4 stream for
// 0x0800. Other frames are dropped. The source MAC is held on src_mac from
// the end of the header until the next frame starts.
//
// Both outputs are ITP receive streams, registered one clock behind s. The
// selected output raises valid (with pause high) once the EtherType is known
// and forwards each payload byte; when s ends, valid falls and the frame's
// done/ok status is passed through.
module ethertype_demux
  import itp_pkg::*;
#(
  parameter mac_t MY_MAC = DEF_MAC
) (
  input  logic    clk,
  input  logic    rst,
  input  itp_rx_t s,
  output itp_rx_t arp,
  output itp_rx_t ip,
  output mac_t    src_mac
);

  logic [3:0]  idx;         // header byte index, saturates at 14
  logic [47:0] dst;
  logic [47:0] src;
  logic [7:0]  type_hi;
  logic        sel_arp, sel_ip;   // payload steering for the current frame
  logic        in_frame;
  logic        xfer;

  assign xfer = s.valid && !s.pause;

  always_ff @(posedge clk) begin
    if (rst) begin
      idx      <= '0;
      dst      <= '0;
      src      <= '0;
      type_hi  <= '0;
      sel_arp  <= 1'b0;
      sel_ip   <= 1'b0;
      in_frame <= 1'b0;
      src_mac  <= '0;
      arp      <= '0;
      ip       <= '0;
    end else begin
      arp.done <= 1'b0;  arp.ok <= 1'b0;  arp.pause <= 1'b1;
      ip.done  <= 1'b0;  ip.ok  <= 1'b0;  ip.pause  <= 1'b1;
      in_frame <= s.valid;
      if (s.valid && !in_frame) begin   // new frame
        idx     <= '0;
        sel_arp <= 1'b0;
        sel_ip  <= 1'b0;
      end
      if (xfer) begin
        logic [3:0] i;
        i = (s.valid && !in_frame) ? 4'd0 : idx;
        if (i < 4'd14) idx <= i + 4'd1;
        if (i < 4'd6)       dst <= {dst[39:0], s.data};
        else if (i < 4'd12) src <= {src[39:0], s.data};
        else if (i == 4'd12) type_hi <= s.data;
        else if (i == 4'd13) begin
          logic hit;
          hit = (dst == MY_MAC) || (dst == '1);
          sel_arp <= hit && ({type_hi, s.data} == ETH_ARP);
          sel_ip  <= hit && ({type_hi, s.data} == ETH_IPV4);
          arp.valid <= hit && ({type_hi, s.data} == ETH_ARP);
          ip.valid  <= hit && ({type_hi, s.data} == ETH_IPV4);
          src_mac <= src;
        end else begin
          arp.pause <= !sel_arp;  arp.data <= s.data;
          ip.pause  <= !sel_ip;   ip.data  <= s.data;
        end
      end
      if (!s.valid) begin
        arp.valid <= 1'b0;
        ip.valid  <= 1'b0;
        sel_arp   <= 1'b0;
        sel_ip    <= 1'b0;
        if (s.done) begin
          arp.done <= sel_arp;  arp.ok <= sel_arp && s.ok;
          ip.done  <= sel_ip;   ip.ok  <= sel_ip && s.ok;
        end
      end
    end
  end

  a_one_output: assert property (@(posedge clk) disable iff (rst) !(arp.valid && ip.valid));

endmodule
