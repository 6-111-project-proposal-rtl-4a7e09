// tb_mac_rx: drives RMII frames (preamble, SFD, data, FCS from the reference
// CRC) into mac_rx and checks the ITP stream it produces: same bytes without
// the FCS, one byte every four clocks (100 Mbps), done with ok=1 for good
// frames and ok=0 when one bit of the frame is flipped.
module tb_mac_rx;
  import itp_pkg::*;
  import eth_tb_pkg::*;

  logic clk = 0, rst = 1, crs_dv = 0;
  logic [1:0] rxd = 0;
  itp_rx_t m;
  int checks = 0, failures = 0;
  bq_t got;
  int ndone = 0, last_ok = 0, last_t = -1, bad_gap = 0, cyc = 0;

  mac_rx dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor
  always @(posedge clk) begin
    if (m.valid && !m.pause) begin
      got.push_back(m.data);
      if (last_t >= 0 && cyc - last_t != 4) bad_gap++;
      last_t = cyc;
    end
    if (m.done) begin
      ndone++;
      last_ok = m.ok;
    end
  end

  task automatic send(bq_t f, int flip_bit);
    bq_t w;
    w = {8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'hD5};
    foreach (f[i]) w.push_back(f[i]);
    if (flip_bit >= 0) w[8 + flip_bit / 8][flip_bit % 8] ^= 1'b1;
    foreach (w[i])
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        crs_dv = 1;
        rxd = w[i][2*k +: 2];
      end
    @(negedge clk);
    crs_dv = 0;
    rxd = 0;
    repeat (30) @(negedge clk);
  endtask

  initial begin
    bq_t p;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 30; t++) begin
      int n, flip, d0;
      n = 60 + $urandom_range(0, 100);
      p = {};
      for (int i = 0; i < n; i++) p.push_back(8'($urandom));
      flip = (t % 3 == 2) ? $urandom_range(0, 8 * n - 1) : -1;
      got = {};
      last_t = -1;
      d0 = ndone;
      send(add_fcs(p), flip);
      checks++;
      if (ndone != d0 + 1) begin failures++; $display("no done t=%0d", t); end
      checks++;
      if (last_ok != (flip < 0)) begin failures++; $display("ok=%0d flip=%0d", last_ok, flip); end
      if (flip < 0) begin
        checks++;
        if (got.size() != n) begin failures++; $display("len %0d vs %0d", got.size(), n); end
        else foreach (p[i]) if (got[i] !== p[i]) begin
          failures++; $display("byte %0d: %h vs %h", i, got[i], p[i]); break;
        end
      end
    end
    checks++;
    if (bad_gap != 0) begin failures++; $display("byte spacing not 4 clocks: %0d", bad_gap); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
