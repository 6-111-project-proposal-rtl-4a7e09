// itp_tx_arbiter: serializes N ITP transmit streams onto one MAC.
//
// When idle, the arbiter grants the first sender with valid high, searching
// round robin from the one after the last grant. The granted stream passes
// straight through (data, valid forward, pause back); every other sender
// sees pause held high. The grant ends when the granted valid falls, and the
// output valid then stays low for at least one clock so the MAC sees the
// end of the packet. Whole packets are never interleaved.
module itp_tx_arbiter
  import itp_pkg::*;
#(
  parameter int N = 2
) (
  input  logic            clk,
  input  logic            rst,
  input  itp_tx_t [N-1:0] s,
  output logic    [N-1:0] s_pause,
  output itp_tx_t         m,
  input  logic            m_pause
);

  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic          busy;
  logic [IW-1:0] grant;
  logic [IW-1:0] last;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      grant <= '0;
      last  <= IW'(N - 1);
    end else if (busy) begin
      if (!s[grant].valid) begin
        busy <= 1'b0;
        last <= grant;
      end
    end else begin
      for (int k = N; k >= 1; k--) begin
        int unsigned c;
        c = (int'(last) + k) % N;
        if (s[c].valid) begin
          busy  <= 1'b1;
          grant <= IW'(c);
        end
      end
    end
  end

  always_comb begin
    s_pause = '1;
    m       = '0;
    if (busy) begin
      m              = s[grant];
      s_pause[grant] = m_pause;
    end
  end

  // ITP rules: only the granted sender may be unpaused, and only while it
  // is the one driving the output
  a_one_unpaused: assert property (@(posedge clk) disable iff (rst) $onehot0(~s_pause));
  a_idle_quiet:   assert property (@(posedge clk) disable iff (rst) !busy |-> !m.valid);

endmodule
