// ppma_cu: one PPMA computation unit.
//
// The unit owns one TILE x TILE tile of the image grid: a tile of the image
// being recognised (N) and the same tile of the already expanded template
// (M). It listens to the shared bus:
//   BUS_LINE    addressed to it: stores data as line addr[LW-1:0] of N or of
//               M, chosen by the address MSB (ppma_pkg::SEL_*).
//   BUS_COLUMN  addressed to it: shifts every N line one pixel to the right
//               (towards higher column numbers); bit l of data becomes the new
//               leftmost pixel of line l. The pixel pushed out on the right is
//               dropped; the controller supplies it to the right neighbour.
//   BUS_COMPUTE broadcast: counts the ones of AND(M, N) over the whole tile.
// The unit address is addr[LW+UW-1:LW].
//
// The count takes PASSES = TILE/LPC cycles, LPC tile lines per cycle. With the
// default LPC = TILE the loop over the tile is fully unrolled: all TILE*TILE
// pixels are counted at once and count appears one clock after BUS_COMPUTE.
// A smaller LPC is the partially unrolled variant: a running sum over PASSES
// cycles, count appearing PASSES clocks after BUS_COMPUTE (LPC = 1 is 16 times
// slower at the default size). count_valid is high for that one cycle. The bus
// must not shift the unit's tile while it counts (the controller waits).
//
// Following the original design: the tile size, line-per-cycle loading, the
// address MSB as template/image select, the right shift with the lacking
// column sent by the controller, the AND-and-count step, full and partial
// unrolling of the count. The bus encoding, the latencies, the way the
// partial variant splits the loop (by lines) and synchronous reset are this
// design's choices.
module ppma_cu
  import ppma_pkg::*;
#(
  parameter int unsigned TILE  = TILE_DEFAULT,
  parameter int unsigned UNITS = (IMG_DEFAULT / TILE_DEFAULT) ** 2,
  parameter int unsigned UNIT_ID = 0,
  parameter int unsigned LPC   = TILE,            // lines counted per cycle
  localparam int unsigned PASSES = TILE / LPC,
  localparam int unsigned PW   = (PASSES > 1) ? $clog2(PASSES) : 1,
  localparam int unsigned LW   = $clog2(TILE),
  localparam int unsigned UW   = (UNITS > 1) ? $clog2(UNITS) : 1,
  localparam int unsigned AW   = 1 + UW + LW,
  localparam int unsigned CW   = $clog2(TILE * TILE + 1)
) (
  input  logic            clk,
  input  logic            rst,          // synchronous, active high
  input  bus_op_e         bus_op,
  input  logic [AW-1:0]   bus_addr,
  input  logic [TILE-1:0] bus_data,
  output logic [CW-1:0]   count,        // ones in AND(M, N) of this tile
  output logic            count_valid
);

  logic [TILE-1:0] n_tile [TILE];
  logic [TILE-1:0] m_tile [TILE];

  logic            hit;
  logic [LW-1:0]   line;
  logic            sel;
  assign hit  = (bus_addr[LW +: UW] == UW'(UNIT_ID));
  assign line = bus_addr[LW-1:0];
  assign sel  = bus_addr[AW-1];

  // Counting state: pass is the group of LPC lines counted this cycle.
  logic            counting;
  logic [PW-1:0]   pass;
  logic [CW-1:0]   acc;
  logic [PW-1:0]   cur_pass;
  assign cur_pass = counting ? pass : '0;

  // Ones in the AND of both tiles, over the LPC lines of the current pass.
  logic [CW-1:0] part_ones;
  always_comb begin
    part_ones = '0;
    for (int l = 0; l < int'(LPC); l++)
      for (int c = 0; c < int'(TILE); c++)
        part_ones += CW'(m_tile[int'(cur_pass) * LPC + l][c] &
                         n_tile[int'(cur_pass) * LPC + l][c]);
  end

  logic [CW-1:0] total;
  assign total = (counting ? acc : '0) + part_ones;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int l = 0; l < int'(TILE); l++) begin
        n_tile[l] <= '0;
        m_tile[l] <= '0;
      end
      count       <= '0;
      count_valid <= 1'b0;
      counting    <= 1'b0;
      pass        <= '0;
      acc         <= '0;
    end else begin
      count_valid <= 1'b0;
      if (counting) begin
        acc  <= total;
        pass <= pass + 1'b1;
        if (pass == PW'(PASSES - 1)) begin
          counting    <= 1'b0;
          count       <= total;
          count_valid <= 1'b1;
        end
      end
      unique case (bus_op)
        BUS_LINE: if (hit) begin
          if (sel == SEL_TEMPLATE) m_tile[line] <= bus_data;
          else                     n_tile[line] <= bus_data;
        end
        BUS_COLUMN: if (hit) begin
          for (int l = 0; l < int'(TILE); l++)
            n_tile[l] <= {n_tile[l][TILE-2:0], bus_data[l]};
        end
        BUS_COMPUTE: begin
          if (PASSES == 1) begin
            count       <= total;
            count_valid <= 1'b1;
          end else begin
            counting <= 1'b1;
            pass     <= PW'(1);
            acc      <= total;
          end
        end
        default: ;
      endcase
    end
  end

  a_no_shift_while_counting: assert property (@(posedge clk) disable iff (rst)
    counting |-> !(bus_op == BUS_COLUMN && hit) && bus_op != BUS_COMPUTE)
    else $error("ppma_cu: tile changed or new count while counting");

endmodule
