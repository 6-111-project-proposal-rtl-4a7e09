// spi_dac: SPI master for one DAC channel.
//
// On start (while not busy) it latches {CMD, value} as a 16-bit word and
// shifts it out MSB first in SPI mode 0: cs_n falls, mosi changes while
// sclk is low and the DAC samples on the rising edge; each sclk half period
// is CLK_DIV clocks. After the 16th bit cs_n rises, which latches the DAC.
// There is no address byte, so each word is one sample.
// Timing: busy for 32*CLK_DIV + 2 clocks from the clock after start.
module spi_dac
  import laser_pkg::*;
#(
  parameter int         CLK_DIV = 2,
  parameter logic [3:0] CMD     = 4'b0011
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  dac_t value,
  output logic busy,
  output logic sclk,
  output logic cs_n,
  output logic mosi
);

  localparam int DW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;

  logic [15:0]   sr;
  logic [4:0]    nbit;      // bits left to send
  logic [DW-1:0] div;
  logic          lead, tail;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; sclk <= 1'b0; cs_n <= 1'b1; mosi <= 1'b0;
      sr <= '0; nbit <= '0; div <= '0; lead <= 1'b0; tail <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        cs_n <= 1'b0;
        sr   <= {CMD, value};
        mosi <= CMD[3];
        nbit <= 5'd16;
        div  <= '0;
        lead <= 1'b1;
      end
    end else if (lead) begin         // one clock of cs_n setup before sclk
      lead <= 1'b0;
    end else if (tail) begin         // one clock of hold after the last edge
      tail <= 1'b0;
      busy <= 1'b0;
      cs_n <= 1'b1;
    end else begin
      div <= div + 1'b1;
      if (div == DW'(CLK_DIV - 1)) begin
        div  <= '0;
        sclk <= !sclk;
        if (sclk) begin              // falling edge: next bit
          sr   <= {sr[14:0], 1'b0};
          mosi <= sr[14];
          nbit <= nbit - 5'd1;
          if (nbit == 5'd1) tail <= 1'b1;
        end
      end
    end
  end

endmodule
