// mac_rx: receive half of the 100 Mbps Ethernet II MAC on an RMII PHY.
//
// The PHY hands over one dibit (rxd, first bit in rxd[0]) per 50 MHz clock
// while crs_dv is high. The MAC waits for the preamble, recognises the
// start-of-frame delimiter by its final dibit 2'b11, then packs four dibits
// per byte, LSB first. Every dibit after the SFD also goes through
// crc32_dibit. The last four bytes are the FCS, so bytes are delayed by a
// four-byte shift register and only a byte with four successors is passed
// on: the stream on m starts with the destination MAC and ends with the last
// payload byte (including any padding).
//
// Output m is an ITP receive stream. valid rises with the first byte and
// stays up until crs_dv falls; pause is high in the three cycles between
// bytes. In the cycle after valid falls, done pulses and ok says whether the
// FCS residue matched and the frame held a whole number of bytes. Runts of
// four bytes or fewer produce nothing.
// Timing: a byte appears on m one clock after its last dibit was sampled.
module mac_rx
  import itp_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    crs_dv,
  input  logic [1:0] rxd,
  output itp_rx_t m
);

  typedef enum logic [1:0] {S_IDLE, S_PRE, S_DATA, S_WAIT} state_t;
  state_t state;

  logic [1:0]  phase;       // dibit index inside the current byte
  logic [7:0]  shreg;
  logic [31:0] dly;         // last four complete bytes, newest in [31:24]
  logic [2:0]  nbytes;      // complete bytes seen, saturating at 4
  logic [31:0] crc;
  logic        crc_en, crc_init;

  assign crc_init = (state == S_PRE) && crs_dv && (rxd == 2'b11);
  assign crc_en   = (state == S_DATA) && crs_dv;

  crc32_dibit u_crc (.clk, .rst, .init(crc_init), .en(crc_en), .d(rxd), .crc);

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      m      <= '{pause: 1'b1, default: '0};
      phase  <= '0;
      nbytes <= '0;
      shreg  <= '0;
      dly    <= '0;
    end else begin
      m.done  <= 1'b0;
      m.ok    <= 1'b0;
      m.pause <= 1'b1;
      unique case (state)
        S_IDLE: if (crs_dv && rxd == 2'b01) state <= S_PRE;
        S_PRE: begin
          if (!crs_dv)            state <= S_IDLE;
          else if (rxd == 2'b11)  begin
            state  <= S_DATA;
            phase  <= '0;
            nbytes <= '0;
          end else if (rxd != 2'b01) state <= S_WAIT;
        end
        S_DATA: begin
          if (crs_dv) begin
            phase <= phase + 2'd1;
            shreg <= {rxd, shreg[7:2]};
            if (phase == 2'd3) begin
              dly <= {rxd, shreg[7:2], dly[31:8]};
              if (nbytes == 3'd4) begin
                m.valid <= 1'b1;
                m.pause <= 1'b0;
                m.data  <= dly[7:0];
              end else begin
                nbytes <= nbytes + 3'd1;
              end
            end
          end else begin
            state <= S_IDLE;
            if (m.valid) begin
              m.valid <= 1'b0;
              m.done  <= 1'b1;
              m.ok    <= (crc == CRC_RESIDUE) && (phase == 2'd0);
            end
          end
        end
        S_WAIT: if (!crs_dv) state <= S_IDLE;   // malformed preamble
        default: state <= S_IDLE;
      endcase
    end
  end

  // ITP rules: status only after the envelope closes; a byte only inside it
  a_done_outside: assert property (@(posedge clk) disable iff (rst) m.done |-> !m.valid);
  a_byte_inside:  assert property (@(posedge clk) disable iff (rst) !m.pause |-> m.valid);

endmodule
