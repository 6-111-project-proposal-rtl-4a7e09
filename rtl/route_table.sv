// route_table: small static IPv4 routing table held in RAM.
//
// Each entry is (network, mask, gateway, valid). A lookup returns the next
// hop for an address: the address itself when the matching entry's gateway
// is 0.0.0.0 (on-link), otherwise the gateway. Entries are searched in index
// order and the first match wins, so more specific routes belong at lower
// indices. At reset entry 0 is the local subnet (LOCAL_NET/LOCAL_MASK,
// on-link) and entry 1 the default route through GATEWAY; the table can be
// rewritten one entry per clock through the write port.
// Timing: lookup is combinational; writes take effect on the next clock.
module route_table
  import itp_pkg::*;
#(
  parameter int   ENTRIES    = 4,
  parameter ip4_t LOCAL_NET  = 32'hC0A8_0100,
  parameter ip4_t LOCAL_MASK = 32'hFFFF_FF00,
  parameter ip4_t GATEWAY    = 32'hC0A8_0101
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        wr_en,
  input  logic [$clog2(ENTRIES)-1:0]  wr_idx,
  input  logic                        wr_valid,
  input  ip4_t                        wr_net,
  input  ip4_t                        wr_mask,
  input  ip4_t                        wr_gw,
  input  ip4_t                        lk_ip,
  output logic                        lk_hit,
  output ip4_t                        lk_next_hop
);

  typedef struct packed {
    logic valid;
    ip4_t net;
    ip4_t mask;
    ip4_t gw;
  } route_t;

  route_t tbl [ENTRIES];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < ENTRIES; i++) tbl[i] <= '0;
      tbl[0] <= '{valid: 1'b1, net: LOCAL_NET, mask: LOCAL_MASK, gw: '0};
      tbl[1] <= '{valid: 1'b1, net: '0, mask: '0, gw: GATEWAY};
    end else if (wr_en) begin
      tbl[wr_idx] <= '{valid: wr_valid, net: wr_net, mask: wr_mask, gw: wr_gw};
    end
  end

  always_comb begin
    lk_hit      = 1'b0;
    lk_next_hop = '0;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (tbl[i].valid && ((lk_ip & tbl[i].mask) == (tbl[i].net & tbl[i].mask))) begin
        lk_hit      = 1'b1;
        lk_next_hop = (tbl[i].gw == '0) ? lk_ip : tbl[i].gw;
      end
  end

endmodule
