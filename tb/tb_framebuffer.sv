// tb_framebuffer: writes frames of random length in datagrams of 1-5
// points, each closed by a commit or (sometimes) an abort, the frame ended
// by the last flag or by filling the bank. A reference model keeps only
// committed points. After each swap it checks frame_len and reads back the
// display bank; halfway through the next frame it checks that the display
// still shows the previous one (no tearing); it checks that a swap happens
// only on the commit that closes a filled bank, that aborted points never
// show, and that nothing is displayed before the first swap.
module tb_framebuffer;
  import laser_pkg::*;

  localparam int D = 16;
  logic clk = 0, rst = 1, wr_valid = 0, wr_last = 0, wr_commit = 0, wr_abort = 0, swap;
  point_t wr_pt = '0, rd_pt;
  logic [3:0] rd_addr = 0;
  logic [4:0] frame_len;
  int checks = 0, failures = 0;

  framebuffer #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  point_t shown [$];
  int nswap = 0;
  always @(posedge clk) nswap += swap;

  task automatic check_display(string when);
    checks++;
    if (frame_len != 5'(shown.size())) begin
      failures++; $display("%s: frame_len %0d vs %0d", when, frame_len, shown.size());
      return;
    end
    foreach (shown[i]) begin
      rd_addr = 4'(i);
      @(negedge clk);
      checks++;
      if (rd_pt !== shown[i]) begin failures++; $display("%s: point %0d differs", when, i); end
    end
  endtask

  task automatic close(bit bad);
    wr_commit = !bad; wr_abort = bad;
    @(negedge clk);
    wr_commit = 0; wr_abort = 0;
  endtask

  initial begin
    int n_abort;
    n_abort = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    checks++;
    if (frame_len != 0) failures++;
    for (int t = 0; t < 12; t++) begin
      point_t kept [$];
      int n, s0, dg;
      bit done_fr, checked_mid;
      kept = {};
      done_fr = 0;
      checked_mid = 0;
      n = (t % 4 == 3) ? D : $urandom_range(1, D - 1);   // target frame size
      dg = 0;
      while (!done_fr) begin
        point_t pend [$];
        bit bad, closes;
        int k;
        pend = {};
        k = $urandom_range(1, 5);
        bad = (dg % 3 == 1);
        closes = 0;
        for (int i = 0; i < k; i++) begin
          point_t p;
          p = point_t'({$urandom, $urandom});
          wr_valid = 1; wr_pt = p;
          wr_last = !bad && (kept.size() + pend.size() == n - 1) && (t % 4 != 3);
          @(negedge clk);
          wr_valid = 0; wr_last = 0;
          if (kept.size() + pend.size() < D) pend.push_back(p);
          if (!bad && (kept.size() + pend.size() == n)) begin closes = 1; break; end
        end
        s0 = nswap;
        close(bad);
        @(negedge clk);
        if (bad) n_abort++;
        else foreach (pend[i]) kept.push_back(pend[i]);
        checks++;
        if (nswap - s0 != int'(closes)) begin failures++; $display("t=%0d swap count wrong", t); end
        done_fr = closes;
        dg++;
        if (!done_fr && !checked_mid && kept.size() >= n / 2 && t > 0) begin
          check_display("mid-frame");
          checked_mid = 1;
        end
      end
      shown = kept;
      check_display("after swap");
    end
    checks++;
    if (n_abort == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
