// tb_route_table: checks the reset routes (local subnet on-link, default
// route via the gateway), then rewrites entries and checks first-match
// order, an on-link route, invalidation and a table with no match.
module tb_route_table;
  import itp_pkg::*;

  logic clk = 0, rst = 1, wr_en = 0, wr_valid = 0, lk_hit;
  logic [1:0] wr_idx = 0;
  ip4_t wr_net = 0, wr_mask = 0, wr_gw = 0, lk_ip = 0, lk_next_hop;
  int checks = 0, failures = 0;

  route_table #(.ENTRIES(4), .LOCAL_NET(32'hC0A8_0100), .LOCAL_MASK(32'hFFFF_FF00),
                .GATEWAY(32'hC0A8_0101)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_route(ip4_t a, bit h, ip4_t nh);
    lk_ip = a;
    #1;
    checks++;
    if (lk_hit !== h || (h && lk_next_hop !== nh)) begin
      failures++; $display("route %h -> %0d %h, want %0d %h", a, lk_hit, lk_next_hop, h, nh);
    end
  endtask

  task automatic write(int i, bit v, ip4_t n, ip4_t m, ip4_t g);
    @(negedge clk);
    wr_en = 1; wr_idx = 2'(i); wr_valid = v; wr_net = n; wr_mask = m; wr_gw = g;
    @(negedge clk);
    wr_en = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    expect_route(32'hC0A8_0107, 1, 32'hC0A8_0107);
    expect_route(32'hC0A8_01FE, 1, 32'hC0A8_01FE);
    expect_route(32'h0808_0808, 1, 32'hC0A8_0101);
    expect_route(32'hC0A8_0207, 1, 32'hC0A8_0101);
    // 10.0.0.0/8 via 192.168.1.254 at index 1 pushes the default to index 3
    write(3, 1, 0, 0, 32'hC0A8_0101);
    write(1, 1, 32'h0A00_0000, 32'hFF00_0000, 32'hC0A8_01FE);
    expect_route(32'h0A01_0203, 1, 32'hC0A8_01FE);
    expect_route(32'h0808_0808, 1, 32'hC0A8_0101);
    // a second, less specific entry later in the table must not win
    write(2, 1, 32'h0A01_0000, 32'hFFFF_0000, 32'hC0A8_0199);
    expect_route(32'h0A01_0203, 1, 32'hC0A8_01FE);
    // remove the default route: unknown destinations now miss
    write(3, 0, 0, 0, 0);
    expect_route(32'h0808_0808, 0, 0);
    expect_route(32'hC0A8_0133, 1, 32'hC0A8_0133);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
