// laser_pkg: the point format of the laser display side.
// A point is (x, y, r, g, b), one value per DAC. DAC_BITS = 12 is this
// design's choice of converter resolution.
package laser_pkg;

  localparam int DAC_BITS = 12;
  typedef logic [DAC_BITS-1:0] dac_t;

  typedef struct packed {
    dac_t x;
    dac_t y;
    dac_t r;
    dac_t g;
    dac_t b;
  } point_t;

  localparam dac_t DAC_MID = dac_t'(1 << (DAC_BITS-1));

endpackage
