// mac_tx: transmit half of the 100 Mbps Ethernet II MAC on an RMII PHY.
//
// Input s is an ITP transmit stream holding a frame from the destination
// MAC on, without FCS. When s.valid rises the MAC sends the preamble (seven
// 0x55) and SFD (0xD5), then the frame, one dibit per clock, LSB first.
// Frames shorter than 60 bytes are padded with zeros, then the 32-bit FCS
// from crc32_dibit is appended (complemented register, bit 31 first) and
// tx_en falls for the 96-bit inter-packet gap (48 clocks).
//
// Handshake: s_pause is low only in the clock the MAC takes a byte: the
// first at the end of the SFD and then one every four clocks. The wire
// cannot stall, so the sender must present its next byte within those four
// clocks. The frame ends when s.valid is seen low at any clock of the data
// phase. txd and tx_en are registered.
module mac_tx
  import itp_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  itp_tx_t s,
  output logic    s_pause,
  output logic    tx_en,
  output logic [1:0] txd
);

  localparam int MIN_BYTES = 60;   // minimum frame less FCS
  localparam int IPG_CLKS  = 48;

  typedef enum logic [2:0] {S_IDLE, S_PRE, S_DATA, S_PAD, S_FCS, S_IPG} state_t;
  state_t state;

  logic [5:0]  cnt;        // dibit / clock counter within a phase
  logic [7:0]  byte_q;     // byte being shifted out
  logic [10:0] nbytes;     // bytes sent (data and pad)
  logic        ended;      // s.valid was seen low during the data phase
  logic [31:0] fcs_sr;
  logic [31:0] crc;
  logic        take;
  logic [1:0]  dib;        // dibit going out this clock (data/pad)
  logic        crc_en;

  // The MAC takes a byte on the last preamble dibit and on the last dibit of
  // each data byte, unless the frame has ended.
  always_comb begin
    take = 1'b0;
    if (state == S_PRE  && cnt == 6'd31)         take = s.valid;
    if (state == S_DATA && cnt[1:0] == 2'd3)     take = s.valid && !ended;
  end
  assign s_pause = !take;

  assign dib    = byte_q[2*cnt[1:0] +: 2];
  assign crc_en = (state == S_DATA) || (state == S_PAD);

  crc32_dibit u_crc (.clk, .rst, .init(state == S_PRE), .en(crc_en), .d(dib), .crc);

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      cnt    <= '0;
      tx_en  <= 1'b0;
      txd    <= '0;
      byte_q <= '0;
      nbytes <= '0;
      ended  <= 1'b0;
      fcs_sr <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          tx_en <= 1'b0;
          txd   <= '0;
          cnt   <= '0;
          if (s.valid) state <= S_PRE;
        end
        S_PRE: begin
          tx_en <= 1'b1;
          txd   <= (cnt == 6'd31) ? 2'b11 : 2'b01;
          cnt   <= cnt + 6'd1;
          if (cnt == 6'd31) begin
            cnt    <= '0;
            nbytes <= '0;
            ended  <= 1'b0;
            byte_q <= s.data;
            // a sender that withdrew valid sends an empty (padded) frame
            state  <= s.valid ? S_DATA : S_PAD;
          end
        end
        S_DATA, S_PAD: begin
          tx_en <= 1'b1;
          txd   <= dib;
          cnt   <= cnt + 6'd1;
          if (state == S_DATA && !s.valid) ended <= 1'b1;
          if (cnt[1:0] == 2'd3) begin
            nbytes <= nbytes + 11'd1;
            cnt    <= '0;
            if (take) begin
              byte_q <= s.data;
            end else if (nbytes + 11'd1 < 11'(MIN_BYTES)) begin
              byte_q <= 8'h00;
              state  <= S_PAD;
            end else begin
              state  <= S_FCS;
            end
          end
        end
        S_FCS: begin
          // crc already holds the last data dibit at this point
          logic [31:0] f;
          f = (cnt == 6'd0) ? ~crc : fcs_sr;
          tx_en  <= 1'b1;
          txd    <= {f[30], f[31]};
          fcs_sr <= {f[29:0], 2'b00};
          cnt    <= cnt + 6'd1;
          if (cnt == 6'd15) begin
            cnt   <= '0;
            state <= S_IPG;
          end
        end
        S_IPG: begin
          tx_en <= 1'b0;
          txd   <= '0;
          cnt   <= cnt + 6'd1;
          if (cnt == 6'(IPG_CLKS - 1)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
