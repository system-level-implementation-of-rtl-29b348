// ppma_top: PPMA binary image matcher.
//
// Compares an IMG x IMG binary image N (the image being recognised) with a
// template M and returns the similarity degree: the largest, over all IMG
// cyclic right shifts of N, of the number of pixels that are 1 both in N and in
// M expanded vertically by SIGMA rows (noise tolerance). The work is split over
// a G x G grid (G = IMG/TILE) of computation units, each holding one TILE x
// TILE tile of both images, so that each shift position is counted by all
// units at once. A controller feeds the units over one shared line bus and an
// adder combines their counts and keeps the maximum.
//
// Host interface (all synchronous to clk):
//   host_we/host_sel/host_row/host_data  write one row of N or M while !busy
//   start                                begin one comparison while !busy
//   done                                 one-cycle pulse; similarity and
//                                        best_shift are then valid and held
//   step_sum/step_valid                  similarity of each shift position
// A comparison takes L + 1074 cycles from the start edge until busy falls,
// L = 512 after N was written, 272 when only the template changed (defaults).
// LPC < TILE selects the partially unrolled count: each of the 64 steps then
// takes TILE/LPC - 1 more cycles (L + 2034 at LPC = 1).
//
// The structure (one controller, 16 units of 16x16, one adder) follows the
// original design; the host interface is this design's own.
module ppma_top
  import ppma_pkg::*;
#(
  parameter int unsigned IMG   = IMG_DEFAULT,
  parameter int unsigned TILE  = TILE_DEFAULT,
  parameter int unsigned SIGMA = SIGMA_DEFAULT,
  parameter int unsigned LPC   = TILE,          // count lines per cycle (TILE = fully unrolled)
  localparam int unsigned G    = IMG / TILE,
  localparam int unsigned UNITS = G * G,
  localparam int unsigned RW   = $clog2(IMG),
  localparam int unsigned LW   = $clog2(TILE),
  localparam int unsigned UW   = (UNITS > 1) ? $clog2(UNITS) : 1,
  localparam int unsigned AW   = 1 + UW + LW,
  localparam int unsigned CW   = $clog2(TILE * TILE + 1),
  localparam int unsigned SW   = $clog2(UNITS * TILE * TILE + 1),
  localparam int unsigned KW   = $clog2(IMG)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           host_we,
  input  logic           host_sel,
  input  logic [RW-1:0]  host_row,
  input  logic [IMG-1:0] host_data,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic [SW-1:0]  similarity,
  output logic [KW-1:0]  best_shift,
  output logic [SW-1:0]  step_sum,
  output logic           step_valid
);

  bus_op_e         bus_op;
  logic [AW-1:0]   bus_addr;
  logic [TILE-1:0] bus_data;
  logic            adder_clear;
  logic [CW-1:0]   cnt   [UNITS];
  logic [UNITS-1:0] cnt_valid;

  ppma_ctrl #(.IMG(IMG), .TILE(TILE), .SIGMA(SIGMA), .LPC(LPC)) u_ctrl (
    .clk, .rst, .host_we, .host_sel, .host_row, .host_data, .start, .busy,
    .bus_op, .bus_addr, .bus_data, .adder_clear, .adder_done(done)
  );

  for (genvar u = 0; u < int'(UNITS); u++) begin : g_cu
    ppma_cu #(.TILE(TILE), .UNITS(UNITS), .UNIT_ID(u), .LPC(LPC)) u_cu (
      .clk, .rst, .bus_op, .bus_addr, .bus_data,
      .count(cnt[u]), .count_valid(cnt_valid[u])
    );
  end

  ppma_adder #(.UNITS(UNITS), .TILE(TILE), .STEPS(IMG)) u_adder (
    .clk, .rst, .clear(adder_clear), .cnt, .cnt_valid(cnt_valid[0]),
    .step_sum, .step_valid, .similarity, .best_shift, .done
  );

  // All units are driven by the same broadcast and report together.
  a_units_together: assert property (@(posedge clk) disable iff (rst)
    cnt_valid == '0 || cnt_valid == '1)
    else $error("ppma_top: units reported out of step");

endmodule
