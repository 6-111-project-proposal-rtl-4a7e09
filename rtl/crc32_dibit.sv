// crc32_dibit: Ethernet frame check sequence, two bits per clock.
//
// The FCS is the CRC-32 of polynomial 0x04C11DB7 with the register preset to
// all ones and the result complemented ("CRC32-BZIP2" form: the register
// shifts MSB first). Fed with the bits in the order they cross the wire
// (each byte LSB first), this is exactly the IEEE 802.3 FCS. One RMII dibit
// is absorbed per enabled clock, d[0] first, matching the 100 Mbps / 50 MHz
// RMII rate.
//   init : synchronous preset to all ones (takes priority over en)
//   en   : absorb d this clock; crc is updated on the next edge
//   crc  : the raw register. A transmitter sends ~crc, bit 31 first. A
//          receiver that has absorbed data and FCS finds CRC_RESIDUE
//          (0xC704DD7B) in it when the frame is intact.
module crc32_dibit
  import itp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        init,
  input  logic        en,
  input  logic [1:0]  d,
  output logic [31:0] crc
);

  function automatic logic [31:0] step(input logic [31:0] c, input logic b);
    return {c[30:0], 1'b0} ^ ((c[31] ^ b) ? CRC_POLY : 32'd0);
  endfunction

  always_ff @(posedge clk) begin
    if (rst || init) crc <= '1;
    else if (en)     crc <= step(step(crc, d[0]), d[1]);
  end

endmodule
