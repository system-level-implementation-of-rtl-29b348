// ppma_pkg: constants and bus types shared by the PPMA (partial point
// matching) array.
//
// The array compares a binary image being recognised (N) with a template
// (M), both IMG x IMG pixels, on a grid of (IMG/TILE)^2 computation units
// that each hold a TILE x TILE tile. A controller reaches the units over one
// shared bus that moves one TILE-bit tile line per clock. The defaults
// (64x64 images, 16x16 tiles, 16 units, noise tolerance 2) are the sizes of
// the design this RTL follows. The bus operation codes and the field layout of
// the address are this design's own encoding; only "the most significant
// address bit tells template from image" is taken from the original design.
package ppma_pkg;

  localparam int unsigned IMG_DEFAULT   = 64;  // image side in pixels
  localparam int unsigned TILE_DEFAULT  = 16;  // tile side held by one unit
  localparam int unsigned SIGMA_DEFAULT = 2;   // noise tolerance, rows

  // Bus operation. One operation per clock.
  typedef enum logic [1:0] {
    BUS_IDLE    = 2'd0,  // nothing on the bus
    BUS_LINE    = 2'd1,  // data = one tile line, addr = {sel, unit, line}
    BUS_COLUMN  = 2'd2,  // data = lacking column, addr = {0, unit, 0}: shift right
    BUS_COMPUTE = 2'd3   // broadcast: every unit counts AND(M, N) of its tile
  } bus_op_e;

  // Value of the address MSB during BUS_LINE.
  localparam logic SEL_IMAGE    = 1'b0;  // line of N, the image being recognised
  localparam logic SEL_TEMPLATE = 1'b1;  // line of the expanded template M

endpackage
