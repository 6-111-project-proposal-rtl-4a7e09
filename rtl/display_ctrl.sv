// display_ctrl: scans the display bank and drives the five DAC buses.
//
// Every POINT_CLKS clocks the controller reads the next point of the frame
// in the display bank (addresses 0 .. frame_len-1, wrapping) and starts one
// SPI transfer on each of the five concurrent buses (x, y, r, g, b), so all
// five DACs update together. While no frame has arrived (frame_len = 0) it
// sends a blank point: beam at mid-scale, all three lasers off. If a swap
// shortens the frame, the scan wraps back to 0.
// Ports: rd_addr/rd_pt go to the framebuffer read port (1-clock latency);
// sclk/cs_n/mosi index 0..4 = x, y, r, g, b. points pulses per point sent.
// Timing: POINT_CLKS must exceed one SPI word (32*CLK_DIV + 2 clocks).
module display_ctrl
  import laser_pkg::*;
#(
  parameter int DEPTH      = 1024,
  parameter int POINT_CLKS = 1667,
  parameter int CLK_DIV    = 2
) (
  input  logic                      clk,
  input  logic                      rst,
  output logic [$clog2(DEPTH)-1:0]  rd_addr,
  input  point_t                    rd_pt,
  input  logic [$clog2(DEPTH):0]    frame_len,
  output logic [4:0]                sclk,
  output logic [4:0]                cs_n,
  output logic [4:0]                mosi,
  output logic                      point_sent,
  output logic                      blanked
);

  localparam int AW = $clog2(DEPTH);
  localparam int TW = $clog2(POINT_CLKS + 1);

  logic [TW-1:0] timer;
  logic          pre;          // rd_addr is final; rd_pt follows next clock
  logic          fetch;        // rd_pt holds the point at rd_addr this clock
  logic          start;
  point_t        cur;
  logic [4:0]    busy;         // SPI status; POINT_CLKS guarantees idle buses

  always_ff @(posedge clk) begin
    if (rst) begin
      timer <= '0; rd_addr <= '0; pre <= 1'b0; fetch <= 1'b0; start <= 1'b0;
      cur <= '0; point_sent <= 1'b0; blanked <= 1'b0;
    end else begin
      start      <= 1'b0;
      pre        <= 1'b0;
      fetch      <= pre;
      point_sent <= 1'b0;
      if (timer == TW'(POINT_CLKS - 1)) begin
        timer <= '0;
        pre   <= 1'b1;
        if ({1'b0, rd_addr} >= frame_len) rd_addr <= '0;
      end else begin
        timer <= timer + 1'b1;
      end
      if (fetch) begin
        start      <= 1'b1;
        point_sent <= 1'b1;
        if (frame_len == '0) begin
          cur     <= '{x: DAC_MID, y: DAC_MID, r: '0, g: '0, b: '0};
          blanked <= 1'b1;
        end else begin
          cur     <= rd_pt;
          blanked <= 1'b0;
          rd_addr <= ({1'b0, rd_addr} + 1'b1 >= frame_len) ? '0 : rd_addr + 1'b1;
        end
      end
    end
  end

  dac_t val [5];
  assign val[0] = cur.x;
  assign val[1] = cur.y;
  assign val[2] = cur.r;
  assign val[3] = cur.g;
  assign val[4] = cur.b;

  for (genvar c = 0; c < 5; c++) begin : g_dac
    spi_dac #(.CLK_DIV(CLK_DIV)) u_dac (
      .clk, .rst, .start, .value(val[c]), .busy(busy[c]),
      .sclk(sclk[c]), .cs_n(cs_n[c]), .mosi(mosi[c])
    );
  end

endmodule
