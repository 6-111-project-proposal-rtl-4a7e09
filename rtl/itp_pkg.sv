// itp_pkg: types and constants shared by the network stack.
//
// The Intermodule Transport Protocol (ITP) links every layer of the stack.
// It is an AXI-like stream, n = 8 bits wide here, with a pause signal
// instead of a ready:
//   * valid frames a whole packet: it rises with (or before) the first byte
//     and falls after the last one; a packet ends when valid falls.
//   * a byte moves in a cycle with valid=1 and pause=0.
//   * on a receive stream (itp_rx_t) every signal flows downstream and the
//     sender uses pause to say "packet still running, no byte this cycle".
//   * on a transmit stream (itp_tx_t) pause flows upstream: the receiver
//     holds the sender, which keeps data and valid until pause is low.
// Receive streams also carry an end-of-packet status (done, ok) in the first
// cycle after valid falls, because the frame check sequence is known only
// after the last byte; this field is this design's addition to ITP.
package itp_pkg;

  typedef logic [47:0] mac_t;
  typedef logic [31:0] ip4_t;

  typedef struct packed {
    logic       valid;  // packet envelope
    logic       pause;  // no byte this cycle (driven by the sender)
    logic [7:0] data;
    logic       done;   // one-cycle pulse after valid falls
    logic       ok;     // packet passed every check (qualifies done)
  } itp_rx_t;

  typedef struct packed {
    logic       valid;  // packet envelope
    logic [7:0] data;
  } itp_tx_t;

  localparam logic [15:0] ETH_IPV4 = 16'h0800;
  localparam logic [15:0] ETH_ARP  = 16'h0806;
  localparam logic [7:0]  IP_ICMP  = 8'd1;
  localparam logic [7:0]  IP_UDP   = 8'd17;

  localparam mac_t DEF_MAC = 48'h02_00_00_00_00_01;
  localparam ip4_t DEF_IP  = 32'hC0A8_0132;   // 192.168.1.50

  localparam logic [31:0] CRC_POLY    = 32'h04C1_1DB7;
  localparam logic [31:0] CRC_RESIDUE = 32'hC704_DD7B;

  // One's-complement 16-bit add with end-around carry (IP checksums).
  function automatic logic [15:0] csum_add(input logic [15:0] a, input logic [15:0] b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[15:0] + {15'd0, s[16]};
  endfunction

endpackage
