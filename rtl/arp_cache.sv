// arp_cache: small fully associative IPv4 -> MAC table.
//
// A write (wr_en) with an address already present updates its MAC; a new
// address takes the next slot in round-robin order, replacing what was
// there. Lookup is combinational over all valid entries. Entries do not age.
// Timing: a write is visible to lookups from the next clock.
module arp_cache
  import itp_pkg::*;
#(
  parameter int ENTRIES = 8
) (
  input  logic clk,
  input  logic rst,
  input  logic wr_en,
  input  ip4_t wr_ip,
  input  mac_t wr_mac,
  input  ip4_t lk_ip,
  output logic lk_hit,
  output mac_t lk_mac
);

  localparam int AW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [ENTRIES-1:0] vld;
  ip4_t               ips  [ENTRIES];
  mac_t               macs [ENTRIES];
  logic [AW-1:0]      next;

  always_ff @(posedge clk) begin
    if (rst) begin
      vld  <= '0;
      next <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        ips[i]  <= '0;
        macs[i] <= '0;
      end
    end else if (wr_en) begin
      logic found;
      found = 1'b0;
      for (int i = 0; i < ENTRIES; i++)
        if (vld[i] && ips[i] == wr_ip) begin
          macs[i] <= wr_mac;
          found   = 1'b1;
        end
      if (!found) begin
        vld[next]  <= 1'b1;
        ips[next]  <= wr_ip;
        macs[next] <= wr_mac;
        next       <= (next == AW'(ENTRIES - 1)) ? '0 : next + 1'b1;
      end
    end
  end

  always_comb begin
    lk_hit = 1'b0;
    lk_mac = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (vld[i] && ips[i] == lk_ip) begin
        lk_hit = 1'b1;
        lk_mac = macs[i];
      end
  end

endmodule
