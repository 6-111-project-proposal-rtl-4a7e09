// tb_mac_tx: offers frames of random length on the ITP transmit side and
// decodes the RMII output: 7x 0x55 + 0xD5, the frame bytes, zero padding up
// to 60 bytes, the FCS (checked against the reference CRC) and at least 48
// idle clocks between frames. Also checks the byte rate (one byte taken
// every 4 clocks while the frame runs) and that two frames offered
// back-to-back stay separate.
module tb_mac_tx;
  import itp_pkg::*;
  import eth_tb_pkg::*;

  logic clk = 0, rst = 1;
  itp_tx_t s;
  logic s_pause, tx_en;
  logic [1:0] txd;
  int checks = 0, failures = 0;

  mac_tx dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // wire decoder
  bq_t frames [$];
  int gaps [$];
  bq_t cur;
  logic [7:0] sh;
  int nd = 0, idle = 1000;
  always @(posedge clk) begin
    if (tx_en) begin
      if (nd == 0 && cur.size() == 0) gaps.push_back(idle);
      idle = 0;
      sh = {txd, sh[7:2]};
      nd++;
      if (nd % 4 == 0) cur.push_back(sh);
    end else begin
      if (nd != 0) begin
        frames.push_back(cur);
        cur = {};
        nd = 0;
      end
      idle++;
    end
  end

  bq_t offered [$];
  int takes = 0, bad_rate = 0, last_take = -1, cyc = 0;
  always @(posedge clk) cyc++;

  task automatic offer(bq_t f);
    s.valid = 1;
    foreach (f[i]) begin
      s.data = f[i];
      @(negedge clk);
      while (s_pause) @(negedge clk);
      @(posedge clk);
      if (last_take >= 0 && i > 0 && cyc - last_take != 4) bad_rate++;
      last_take = cyc;
      takes++;
      #1;
    end
    s.valid = 0;       // valid stays low across at least one clock edge
    s.data = 'x;
    @(posedge clk);
    #1;
  endtask

  initial begin
    s = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 12; t++) begin
      bq_t p;
      int n;
      n = (t < 4) ? 1 + $urandom_range(0, 58) : 14 + $urandom_range(0, 150);
      p = {};
      for (int i = 0; i < n; i++) p.push_back(8'($urandom));
      offered.push_back(p);
      @(negedge clk);
      offer(p);
      if (t % 2 == 1) repeat ($urandom_range(0, 200)) @(negedge clk);  // even t: back-to-back
    end
    repeat (400) @(negedge clk);
    checks++;
    if (frames.size() != offered.size()) begin
      failures++; $display("frames %0d vs %0d", frames.size(), offered.size());
    end
    foreach (frames[k]) if (k < offered.size()) begin
      bq_t exp, pl;
      pl = offered[k];
      while (pl.size() < 60) pl.push_back(8'h00);
      exp = {8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'hD5};
      exp = {exp, add_fcs(pl)};
      checks++;
      if (frames[k].size() != exp.size()) begin
        failures++; $display("frame %0d len %0d vs %0d", k, frames[k].size(), exp.size());
      end else foreach (exp[i]) if (frames[k][i] !== exp[i]) begin
        failures++; $display("frame %0d byte %0d %h vs %h", k, i, frames[k][i], exp[i]); break;
      end
      if (k > 0) begin
        checks++;
        if (gaps[k] < 48) begin failures++; $display("ipg %0d", gaps[k]); end
      end
    end
    checks++;
    if (bad_rate != 0) begin failures++; $display("rate errors %0d", bad_rate); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
