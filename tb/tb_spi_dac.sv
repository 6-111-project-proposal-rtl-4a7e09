// tb_spi_dac: sends random values and decodes the bus as a mode-0 SPI slave
// would (sample mosi on rising sclk while cs_n is low). Checks the 16-bit
// word {CMD, value}, MSB first, that sclk idles low, and the busy time of
// 32*CLK_DIV + 2 clocks for two dividers.
module tb_spi_dac;
  import laser_pkg::*;

  logic clk = 0, rst = 1;
  logic start [2];
  dac_t value [2];
  logic busy [2], sclk [2], cs_n [2], mosi [2];
  int checks = 0, failures = 0;

  spi_dac #(.CLK_DIV(2), .CMD(4'b0011)) dut2 (.clk, .rst, .start(start[0]), .value(value[0]),
    .busy(busy[0]), .sclk(sclk[0]), .cs_n(cs_n[0]), .mosi(mosi[0]));
  spi_dac #(.CLK_DIV(3), .CMD(4'b0111)) dut3 (.clk, .rst, .start(start[1]), .value(value[1]),
    .busy(busy[1]), .sclk(sclk[1]), .cs_n(cs_n[1]), .mosi(mosi[1]));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // slave models
  logic [15:0] rx [2];
  int nb [2];
  int words [2];
  logic [15:0] last_word [2];
  for (genvar c = 0; c < 2; c++) begin : g_slave
    initial begin nb[c] = 0; words[c] = 0; end
    always @(posedge sclk[c]) if (!cs_n[c]) begin rx[c] = {rx[c][14:0], mosi[c]}; nb[c]++; end
    always @(posedge cs_n[c]) begin
      if (nb[c] == 16) begin words[c]++; last_word[c] = rx[c]; end
      else if (nb[c] != 0) begin failures++; $display("bus %0d: %0d bits in frame", c, nb[c]); end
      nb[c] = 0;
    end
    always @(posedge clk) if (cs_n[c] && sclk[c]) begin failures++; $display("sclk not idle low"); end
  end

  initial begin
    start[0] = 0; start[1] = 0; value[0] = 0; value[1] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 30; t++) begin
      int c, cyc, w0;
      c = t % 2;
      value[c] = dac_t'($urandom);
      start[c] = 1;
      w0 = words[c];
      @(negedge clk);
      start[c] = 0;
      cyc = 0;
      while (busy[c]) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 32 * (c + 2) + 2) begin failures++; $display("busy %0d clocks", cyc); end
      repeat (2) @(negedge clk);
      checks++;
      if (words[c] != w0 + 1 || last_word[c] !== {(c == 0) ? 4'b0011 : 4'b0111, value[c]}) begin
        failures++; $display("bus %0d word %h", c, last_word[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
