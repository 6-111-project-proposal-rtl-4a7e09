// tb_arp_cache: random learn/lookup traffic against a reference model of a
// fully associative table with update-in-place and round-robin replacement.
module tb_arp_cache;
  import itp_pkg::*;

  localparam int E = 4;
  logic clk = 0, rst = 1, wr_en = 0, lk_hit;
  ip4_t wr_ip = 0, lk_ip = 0;
  mac_t wr_mac = 0, lk_mac;
  int checks = 0, failures = 0;

  arp_cache #(.ENTRIES(E)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ip4_t rip [E];
  mac_t rmac [E];
  bit   rv [E];
  int   nxt = 0;

  initial begin
    foreach (rv[i]) rv[i] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 2000; t++) begin
      ip4_t a;
      a = 32'h0A00_0000 + $urandom_range(0, 9);
      if ($urandom_range(0, 2) == 0) begin
        bit found;
        wr_en = 1; wr_ip = a; wr_mac = {$urandom, 16'($urandom)};
        found = 0;
        foreach (rv[i]) if (rv[i] && rip[i] == a) begin rmac[i] = wr_mac; found = 1; end
        if (!found) begin rv[nxt] = 1; rip[nxt] = a; rmac[nxt] = wr_mac; nxt = (nxt + 1) % E; end
        @(negedge clk);
        wr_en = 0;
      end else begin
        bit h;
        mac_t mm;
        lk_ip = a;
        #1;
        h = 0; mm = 0;
        foreach (rv[i]) if (rv[i] && rip[i] == a) begin h = 1; mm = rmac[i]; end
        checks++;
        if (lk_hit !== h || (h && lk_mac !== mm)) begin
          failures++; $display("lookup %h: hit %0d/%0d", a, lk_hit, h);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
