// tb_udp_laser_rx: UDP datagrams carrying points (and ones for another
// port) go in; checks every point unpacked (12 low bits of each 16-bit
// big-endian word, last flag from bit 15 of x), that a trailing partial
// point and bytes past the UDP length are ignored, and datagram_ok.
module tb_udp_laser_rx;
  import itp_pkg::*;
  import laser_pkg::*;
  import eth_tb_pkg::*;

  logic clk = 0, rst = 1, pt_valid, pt_last, datagram_ok, datagram_bad;
  itp_rx_t s;
  point_t pt;
  int checks = 0, failures = 0;

  udp_laser_rx #(.PORT(16'd7000)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  point_t gp [$];
  bit gl [$];
  int ndg = 0, nbad = 0;
  always @(posedge clk) begin
    if (datagram_bad) nbad++;
    if (pt_valid) begin gp.push_back(pt); gl.push_back(pt_last); end
    if (datagram_ok) ndg++;
  end

  task automatic drive(bq_t b, bit ok);
    @(negedge clk);
    s = '0; s.valid = 1; s.pause = 1;
    foreach (b[i]) begin
      repeat ($urandom_range(0, 2)) @(negedge clk);
      s.data = b[i]; s.pause = 0;
      @(negedge clk);
      s.pause = 1;
    end
    s.valid = 0; s.done = 1; s.ok = ok;
    @(negedge clk);
    s = '0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    s = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 20; t++) begin
      bq_t pay, d;
      point_t ep [$];
      bit el [$];
      int np, n0, b0;
      bit ok;
      logic [15:0] port;
      port = (t % 5 == 4) ? 16'd7001 : 16'd7000;
      pay = {}; ep = {}; el = {};
      np = $urandom_range(1, 12);
      for (int k = 0; k < np; k++) begin
        logic [15:0] w [5];
        foreach (w[j]) w[j] = 16'($urandom) & 16'h7FFF;
        if (k == np - 1 && t % 2 == 0) w[0][15] = 1'b1;
        foreach (w[j]) push_be(pay, 64'(w[j]), 2);
        ep.push_back('{x: w[0][11:0], y: w[1][11:0], r: w[2][11:0], g: w[3][11:0], b: w[4][11:0]});
        el.push_back(w[0][15]);
      end
      if (t % 3 == 0) begin pay.push_back(8'h01); pay.push_back(8'h02); end   // partial point
      d = udp_dgram(16'd1234, port, pay);
      if (t % 4 == 1) begin d.push_back(8'hEE); d.push_back(8'hEE); end     // beyond UDP length
      gp = {}; gl = {};
      n0 = ndg; b0 = nbad;
      ok = (t % 7 != 6);
      drive(d, ok);
      checks++;
      if (port != 16'd7000) begin
        if (gp.size() != 0 || ndg != n0) begin failures++; $display("t=%0d other port accepted", t); end
      end else begin
        if (gp.size() != np) begin failures++; $display("t=%0d points %0d vs %0d", t, gp.size(), np); end
        else foreach (ep[k]) if (gp[k] !== ep[k] || gl[k] !== el[k]) begin
          failures++; $display("t=%0d point %0d differs", t, k); break;
        end
        checks++;
        if (ndg != n0 + int'(ok) || nbad != b0 + int'(!ok)) begin failures++; $display("t=%0d datagram status", t); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
