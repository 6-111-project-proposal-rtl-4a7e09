// tb_display_ctrl: a model framebuffer (registered read) feeds the
// controller; five SPI slave models decode the DAC words. Checks the blank
// point while no frame is present, then that the points of the frame come
// out in order and repeat, one point every POINT_CLKS clocks, with all five
// buses carrying the same point, and that a shorter frame swapped in wraps
// the scan.
module tb_display_ctrl;
  import laser_pkg::*;

  localparam int D = 16, PC = 80;
  logic clk = 0, rst = 1;
  logic [3:0] rd_addr;
  point_t rd_pt;
  logic [4:0] frame_len = 0;
  logic [4:0] sclk, cs_n, mosi;
  logic point_sent, blanked;
  int checks = 0, failures = 0;

  display_ctrl #(.DEPTH(D), .POINT_CLKS(PC), .CLK_DIV(1)) dut (.*);
  always #5 clk = ~clk;

  point_t mem [D];
  always @(posedge clk) rd_pt <= mem[rd_addr];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] sh [5];
  int nb [5];
  logic [11:0] word_q [5][$];
  for (genvar c = 0; c < 5; c++) begin : g_slave
    initial nb[c] = 0;
    always @(posedge sclk[c]) if (!cs_n[c]) begin sh[c] = {sh[c][14:0], mosi[c]}; nb[c]++; end
    always @(posedge cs_n[c]) begin
      if (nb[c] == 16) word_q[c].push_back(sh[c][11:0]);
      nb[c] = 0;
    end
  end

  int cyc = 0, last_start = -1, bad_period = 0;
  always @(posedge clk) begin
    cyc++;
    if (point_sent) begin
      if (last_start >= 0 && cyc - last_start != PC) bad_period++;
      last_start = cyc;
    end
  end

  function automatic point_t pop_point();
    point_t p;
    p.x = word_q[0].pop_front(); p.y = word_q[1].pop_front(); p.r = word_q[2].pop_front();
    p.g = word_q[3].pop_front(); p.b = word_q[4].pop_front();
    return p;
  endfunction

  initial begin
    point_t p;
    foreach (mem[i]) mem[i] = point_t'({$urandom, $urandom});
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3 * PC) @(negedge clk);
    checks++;
    if (word_q[0].size() < 2) begin failures++; $display("no blank points"); end
    while (word_q[0].size() > 0) begin
      p = pop_point();
      checks++;
      if (p !== '{x: DAC_MID, y: DAC_MID, r: 0, g: 0, b: 0}) begin failures++; $display("not blank"); end
    end
    // frame of 5 points
    @(posedge point_sent);
    @(negedge clk);
    frame_len = 5;
    repeat (PC / 2) @(negedge clk);        // let the blank word in flight finish
    foreach (word_q[c]) word_q[c] = {};
    repeat (13 * PC) @(negedge clk);
    checks++;
    if (word_q[0].size() < 12) begin failures++; $display("too few points %0d", word_q[0].size()); end
    for (int k = 0; k < 12; k++) begin
      p = pop_point();
      checks++;
      if (p !== mem[k % 5]) begin failures++; $display("point %0d differs", k); end
    end
    // shorter frame while the scan is at a high address: wraps to 0
    frame_len = 2;
    foreach (word_q[c]) word_q[c] = {};
    repeat (PC / 2) @(negedge clk);
    foreach (word_q[c]) word_q[c] = {};
    repeat (4 * PC) @(negedge clk);
    while (word_q[0].size() > 0) begin
      p = pop_point();
      checks++;
      if (p !== mem[0] && p !== mem[1]) begin failures++; $display("point outside short frame"); end
    end
    checks++;
    if (bad_period != 0) begin failures++; $display("point period wrong %0d times", bad_period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
