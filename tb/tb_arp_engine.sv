// tb_arp_engine: feeds ARP bodies and checks the learned pairs and the reply
// frames, byte for byte, against frames built from RFC 826. Requests for
// another address, frames with bad status and malformed bodies must be
// ignored; replies addressed to this station are learned but not answered.
// Finally req_en must produce a broadcast ARP request for req_ip.
module tb_arp_engine;
  import itp_pkg::*;
  import eth_tb_pkg::*;

  localparam mac_t ME = 48'h02_00_00_00_00_01;
  localparam ip4_t MYIP = 32'hC0A8_0132;
  logic clk = 0, rst = 1, m_pause = 1, req_en = 0;
  ip4_t req_ip = 0;
  itp_rx_t s;
  itp_tx_t m;
  logic learn_en;
  ip4_t learn_ip;
  mac_t learn_mac;
  int checks = 0, failures = 0;

  arp_engine #(.MY_MAC(ME), .MY_IP(MYIP)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bq_t cur, replies [$];
  ip4_t lips [$];
  mac_t lmacs [$];
  initial begin
    m_pause = 1;
    forever begin @(posedge clk); #2; m_pause = ($urandom_range(0, 3) != 0); end
  end
  always @(posedge clk) begin
    if (m.valid && !m_pause) cur.push_back(m.data);
    if (!m.valid && cur.size() != 0) begin replies.push_back(cur); cur = {}; end
    if (learn_en) begin lips.push_back(learn_ip); lmacs.push_back(learn_mac); end
  end

  task automatic drive(bq_t b, bit ok);
    @(negedge clk);
    s = '0; s.valid = 1; s.pause = 1;
    foreach (b[i]) begin
      repeat (3) @(negedge clk);
      s.data = b[i]; s.pause = 0;
      @(negedge clk);
      s.pause = 1;
    end
    repeat (2) @(negedge clk);   // Ethernet padding would arrive here
    s.valid = 0; s.done = 1; s.ok = ok;
    @(negedge clk);
    s = '0;
    repeat (400) @(negedge clk);
  endtask

  initial begin
    mac_t hm;
    ip4_t hip;
    s = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 12; t++) begin
      bq_t b, exp;
      int nr, nl;
      bit for_me, ok, bad, is_req;
      hm  = {$urandom, 16'($urandom)};
      hip = 32'hC0A8_0100 + $urandom_range(1, 250);
      for_me = (t % 4 != 1);
      ok     = (t % 6 != 5);
      is_req = (t % 3 != 2);
      bad    = (t == 8);
      b = arp_pkt(is_req ? 16'd1 : 16'd2, hm, hip, is_req ? 48'd0 : ME, for_me ? MYIP : 32'hC0A8_0199);
      if (bad) b[4] = 8'd8;       // hardware length 8
      nr = replies.size(); nl = lips.size();
      drive(b, ok);
      checks++;
      if (lips.size() - nl != int'(for_me && ok && !bad)) begin
        failures++; $display("t=%0d learn count", t);
      end else if (for_me && ok && !bad) begin
        checks++;
        if (lips[$] !== hip || lmacs[$] !== hm) begin failures++; $display("t=%0d learned wrong", t); end
      end
      checks++;
      if (replies.size() - nr != int'(for_me && ok && !bad && is_req)) begin
        failures++; $display("t=%0d reply count %0d", t, replies.size() - nr);
      end else if (for_me && ok && !bad && is_req) begin
        exp = {eth_hdr(hm, ME, ETH_ARP), arp_pkt(16'd2, ME, MYIP, hm, hip)};
        checks++;
        if (replies[$] != exp) begin failures++; $display("t=%0d reply bytes differ", t); end
      end
    end
    // resolving a next hop: broadcast request
    for (int t = 0; t < 3; t++) begin
      bq_t exp;
      int nr;
      nr = replies.size();
      @(negedge clk);
      req_en = 1; req_ip = 32'h0A00_0001 + t;
      @(negedge clk);
      req_en = 0;
      repeat (300) @(negedge clk);
      exp = {eth_hdr('1, ME, ETH_ARP), arp_pkt(16'd1, ME, MYIP, 48'd0, 32'h0A00_0001 + t)};
      checks++;
      if (replies.size() != nr + 1 || replies[$] != exp) begin failures++; $display("request %0d wrong", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
