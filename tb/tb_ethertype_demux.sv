// tb_ethertype_demux: sends frames with different destination MACs and
// EtherTypes through the demux and checks that only frames for this station
// (or broadcast) with EtherType ARP/IPv4 appear, on the right output, with
// the header removed, the status passed through and src_mac captured.
module tb_ethertype_demux;
  import itp_pkg::*;
  import eth_tb_pkg::*;

  localparam mac_t ME = 48'h0A_1B_2C_3D_4E_5F;
  logic clk = 0, rst = 1;
  itp_rx_t s, arp, ip;
  mac_t src_mac;
  int checks = 0, failures = 0;

  ethertype_demux #(.MY_MAC(ME)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bq_t got_arp, got_ip;
  int done_arp = 0, done_ip = 0, ok_arp = 0, ok_ip = 0;
  always @(posedge clk) begin
    if (arp.valid && !arp.pause) got_arp.push_back(arp.data);
    if (ip.valid && !ip.pause)   got_ip.push_back(ip.data);
    if (arp.done) begin done_arp++; ok_arp += arp.ok; end
    if (ip.done)  begin done_ip++;  ok_ip  += ip.ok;  end
  end

  task automatic drive(bq_t b, bit ok);
    @(negedge clk);
    s = '0;
    s.valid = 1; s.pause = 1;
    foreach (b[i]) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
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
    for (int t = 0; t < 40; t++) begin
      bq_t pay, f;
      mac_t dst, src;
      logic [15:0] typ;
      bit ok, want_arp, want_ip;
      int da, di, oa, oi;
      dst = (t % 4 == 0) ? '1 : (t % 4 == 1) ? 48'h0A_1B_2C_3D_4E_50 : ME;
      typ = (t % 5 == 0) ? 16'h86DD : (t % 2) ? ETH_ARP : ETH_IPV4;
      src = {$urandom, 16'($urandom)};
      ok  = (t % 7 != 3);
      pay = {};
      for (int i = 0; i < 30 + $urandom_range(0, 40); i++) pay.push_back(8'($urandom));
      f = {eth_hdr(dst, src, typ), pay};
      want_arp = (dst == ME || dst == '1) && typ == ETH_ARP;
      want_ip  = (dst == ME || dst == '1) && typ == ETH_IPV4;
      got_arp = {}; got_ip = {};
      da = done_arp; di = done_ip; oa = ok_arp; oi = ok_ip;
      drive(f, ok);
      checks++;
      if ((got_arp.size() != 0) != want_arp || (got_ip.size() != 0) != want_ip) begin
        failures++; $display("t=%0d steering wrong: arp %0d ip %0d", t, got_arp.size(), got_ip.size());
      end
      if (want_arp || want_ip) begin
        bq_t g;
        g = want_arp ? got_arp : got_ip;
        checks++;
        if (g != pay) begin failures++; $display("t=%0d payload differs", t); end
        checks++;
        if (src_mac !== src) begin failures++; $display("src_mac"); end
      end
      checks++;
      if (done_arp - da != int'(want_arp) || done_ip - di != int'(want_ip) ||
          ok_arp - oa != int'(want_arp && ok) || ok_ip - oi != int'(want_ip && ok)) begin
        failures++; $display("t=%0d status wrong", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
