// udp_laser_rx: the layer-4 receiver that feeds the laser framebuffer.
//
// Takes the UDP datagram (8-byte header + data) from ipv4_rx. Datagrams to
// port PORT carry laser points, each ten bytes: five 16-bit big-endian words
// x, y, r, g, b. The low DAC_BITS of each word go to the DAC; bit 15 of x
// marks the last point of a frame. Each complete point is presented for one
// clock on pt_valid/pt/pt_last. Data past the UDP length and a trailing
// partial point are ignored. The UDP checksum is not verified.
// At the end of each laser datagram exactly one of datagram_ok (the frame
// passed every check) or datagram_bad pulses, so the framebuffer can keep
// or discard the points just written.
// Timing: pt_valid pulses one clock after the point's tenth byte;
// datagram_ok/bad one clock after the stream's done.
module udp_laser_rx
  import itp_pkg::*;
  import laser_pkg::*;
#(
  parameter logic [15:0] PORT = 16'd7000
) (
  input  logic    clk,
  input  logic    rst,
  input  itp_rx_t s,
  output logic    pt_valid,
  output point_t  pt,
  output logic    pt_last,
  output logic    datagram_ok,  // end of a laser datagram, good status
  output logic    datagram_bad  // end of a laser datagram, bad status
);

  logic        in_pkt;
  logic [15:0] idx;
  logic [15:0] dport, ulen;
  logic [3:0]  pos;             // byte within the current point
  logic [71:0] acc;             // first nine bytes of the point
  logic        mine;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_pkt <= 1'b0; idx <= '0; dport <= '0; ulen <= '0; pos <= '0; acc <= '0;
      mine <= 1'b0; pt_valid <= 1'b0; pt <= '0; pt_last <= 1'b0; datagram_ok <= 1'b0;
      datagram_bad <= 1'b0;
    end else begin
      pt_valid    <= 1'b0;
      datagram_ok  <= s.done && s.ok && mine;
      datagram_bad <= s.done && !s.ok && mine;
      in_pkt      <= s.valid;
      if (s.valid && !in_pkt) begin
        idx  <= '0;
        pos  <= '0;
        mine <= 1'b0;
      end
      if (s.valid && !s.pause) begin
        logic [15:0] i;
        i = in_pkt ? idx : 16'd0;
        idx <= i + 16'd1;
        unique case (i)
          16'd2: dport[15:8] <= s.data;
          16'd3: dport[7:0]  <= s.data;
          16'd4: ulen[15:8]  <= s.data;
          16'd5: begin
            ulen[7:0] <= s.data;
            mine      <= (dport == PORT) && ({ulen[15:8], s.data} >= 16'd8);
          end
          default: ;
        endcase
        if (i >= 16'd8 && mine && i < ulen) begin
          if (pos == 4'd9) begin
            logic [79:0] w;
            w        = {acc, s.data};
            pos      <= '0;
            pt_valid <= 1'b1;
            pt_last  <= w[79];
            pt       <= '{x: w[64 +: DAC_BITS], y: w[48 +: DAC_BITS], r: w[32 +: DAC_BITS],
                          g: w[16 +: DAC_BITS], b: w[0 +: DAC_BITS]};
          end else begin
            pos <= pos + 4'd1;
            acc <= {acc[63:0], s.data};
          end
        end
      end
    end
  end

endmodule
