// tb_itp_tx_arbiter: three senders offer packets at random times into the
// arbiter; a sink with random pause collects the output. Checks that every
// packet arrives whole and unmixed (packets are delimited by valid falling),
// that each sender's packets keep their order, that a paused sender is held,
// and that contending senders are served round robin.
module tb_itp_tx_arbiter;
  import itp_pkg::*;
  import eth_tb_pkg::*;

  localparam int N = 3;
  logic clk = 0, rst = 1;
  itp_tx_t [N-1:0] s;
  logic [N-1:0] s_pause;
  itp_tx_t m;
  logic m_pause;
  int checks = 0, failures = 0;

  itp_tx_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sink
  bq_t cur, pk [$];
  initial begin
    m_pause = 0;
    forever begin @(posedge clk); #2; m_pause = ($urandom_range(0, 2) == 0); end
  end
  always @(posedge clk) begin
    if (m.valid && !m_pause) cur.push_back(m.data);
    if (!m.valid && cur.size() != 0) begin pk.push_back(cur); cur = {}; end
  end

  // packet k of sender j: first byte = {j, k}, length 3 + k, then sequence
  function automatic bq_t mkpkt(int j, int k);
    bq_t q;
    q.push_back(8'((j << 5) | k));
    for (int i = 0; i < 3 + k; i++) q.push_back(8'(i + 1));
    return q;
  endfunction

  for (genvar j = 0; j < N; j++) begin : g_src
    initial begin
      s[j] = '0;
      wait (!rst);
      for (int k = 0; k < 8; k++) begin
        bq_t q;
        q = mkpkt(j, k);
        @(negedge clk);
        s[j].valid = 1;
        foreach (q[i]) begin
          s[j].data = q[i];
          @(negedge clk);
          while (s_pause[j]) @(negedge clk);
          @(posedge clk); #1;
        end
        s[j].valid = 0;
        @(posedge clk); #1;
        if (j == 2) repeat ($urandom_range(0, 30)) @(negedge clk);
      end
    end
  end

  initial begin
    int nxt [N];
    int rr_ok;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3000) @(negedge clk);
    checks++;
    if (pk.size() != N * 8) begin failures++; $display("packets %0d", pk.size()); end
    foreach (nxt[j]) nxt[j] = 0;
    foreach (pk[p]) begin
      int j, k;
      j = pk[p][0] >> 5;
      k = pk[p][0] & 31;
      checks++;
      if (j >= N || k != nxt[j] || pk[p] != mkpkt(j, k)) begin
        failures++; $display("packet %0d wrong (j=%0d k=%0d)", p, j, k);
      end else nxt[j]++;
    end
    // senders 0 and 1 always have a packet waiting: the first 6 grants
    // must alternate and include all contenders in turn
    rr_ok = 1;
    for (int p = 1; p < 6 && p < pk.size(); p++)
      if ((pk[p][0] >> 5) == (pk[p-1][0] >> 5)) rr_ok = 0;
    checks++;
    if (!rr_ok) begin failures++; $display("not round robin"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
