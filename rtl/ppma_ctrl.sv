// ppma_ctrl: controller of the PPMA array (the "Ctrl" block).
//
// The host writes the image being recognised (N) and the template (M) row by
// row into two IMG x IMG stores while the controller is idle, then pulses
// start. One comparison then runs as follows, one bus operation per clock:
//   load      If N was written since it was last sent (or was never sent),
//             all UNITS*TILE lines of N, then all lines of the expanded
//             template: 2*256 = 512 cycles at the defaults. Otherwise N is
//             still in the units, shifted IMG-1 times by the previous
//             comparison: one more shift of UNITS column cycles returns it to
//             its original position, then the template lines follow:
//             16 + 256 = 272 cycles.
//   steps     IMG times: one BUS_COMPUTE cycle (the units count, the adder
//             sums), PASSES-1 idle cycles while partially unrolled units
//             finish counting (none at the default), and between two steps a shift of N one pixel to the right,
//             which takes UNITS BUS_COLUMN cycles, one per unit, each carrying
//             the column the unit lacks after the shift (the column that falls
//             off the right edge of its left neighbour, cyclically over the
//             whole image width).
//   finish    wait for the adder's done, then back to idle.
// Lines go out unit by unit (unit u = tile row u / G, tile column u % G, with
// G = IMG/TILE), line 0 first. The template is expanded (ppma_expand) on the
// whole image as it is sent, so tile borders do not cut the expansion.
//
// Timing at the defaults: with start sampled at clock edge 0, the units see
// the first compute at edge L+1 and the last at edge L+1072, where L is 512 or
// 272; the adder's done follows two edges later; busy is high from edge 1 until
// the edge at which done is seen, L+1074 in all. In general a comparison takes
// L + IMG*(PASSES + UNITS) - UNITS + 2 cycles, PASSES = TILE/LPC.
//
// From the original design: the bus carrying one line per cycle with the
// address MSB selecting template or image, the 512/272-cycle load, the
// 16-cycle transfer of the lacking points, the IMG repetitions, the choice of
// full or partial unrolling of the count. This design's
// own choices: the host stores and their write port, doing the expansion here
// on the full template, the restoring shift being the 16 cycles that make up
// the 272, the bus encoding, the order of the lines.
module ppma_ctrl
  import ppma_pkg::*;
#(
  parameter int unsigned IMG   = IMG_DEFAULT,
  parameter int unsigned TILE  = TILE_DEFAULT,
  parameter int unsigned SIGMA = SIGMA_DEFAULT,
  parameter int unsigned LPC   = TILE,          // lines each unit counts per cycle
  localparam int unsigned PASSES = TILE / LPC,  // cycles one count takes
  localparam int unsigned G    = IMG / TILE,
  localparam int unsigned UNITS = G * G,
  localparam int unsigned RW   = $clog2(IMG),
  localparam int unsigned LW   = $clog2(TILE),
  localparam int unsigned UW   = (UNITS > 1) ? $clog2(UNITS) : 1,
  localparam int unsigned AW   = 1 + UW + LW
) (
  input  logic            clk,
  input  logic            rst,          // synchronous, active high
  // host side
  input  logic            host_we,      // write one row, only while !busy
  input  logic            host_sel,     // SEL_IMAGE (N) or SEL_TEMPLATE (M)
  input  logic [RW-1:0]   host_row,
  input  logic [IMG-1:0]  host_data,    // bit c = column c, 1 = object pixel
  input  logic            start,        // begin a comparison, only while !busy
  output logic            busy,
  // unit bus
  output bus_op_e         bus_op,
  output logic [AW-1:0]   bus_addr,
  output logic [TILE-1:0] bus_data,
  // adder
  output logic            adder_clear,
  input  logic            adder_done
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD_N, S_RESTORE, S_LOAD_M, S_COMPUTE, S_COUNT, S_SHIFT, S_FINISH
  } state_e;

  state_e          state;
  logic [IMG-1:0]  n_mem [IMG];
  logic [IMG-1:0]  m_mem [IMG];
  logic            n_fresh;        // units hold the current N (possibly shifted)
  logic [UW+LW-1:0] cnt;           // {unit, line} during loads, unit in shifts
  logic [RW:0]     step;           // compute steps issued so far

  // Unit, tile row/column and line addressed by cnt.
  logic [UW-1:0]   unit;
  logic [LW-1:0]   line;
  int unsigned     t_row, t_col;
  logic [RW-1:0]   img_row;
  assign unit = (state == S_RESTORE || state == S_SHIFT) ? cnt[UW-1:0] : cnt[UW+LW-1:LW];
  assign line = cnt[LW-1:0];
  always_comb begin
    t_row   = int'(unit) / G;
    t_col   = int'(unit) % G;
    img_row = RW'(t_row * TILE + int'(line));
  end

  logic [IMG-1:0] exp_row;
  ppma_expand #(.IMG(IMG), .SIGMA(SIGMA)) u_expand (
    .tmpl(m_mem), .row(img_row), .exp_row(exp_row)
  );

  // Column the unit lacks after shift number shift_no (1..IMG): the pixel
  // now at the unit's leftmost column came from column (t_col*TILE - shift_no)
  // of the original image, cyclically.
  int unsigned    shift_no;
  logic [RW-1:0]  src_col;
  logic [TILE-1:0] column;
  always_comb begin
    shift_no = (state == S_RESTORE) ? IMG : int'(step);
    src_col  = RW'((t_col * TILE + IMG - (shift_no % IMG)) % IMG);
    for (int l = 0; l < int'(TILE); l++)
      column[l] = n_mem[t_row * TILE + l][src_col];
  end

  // Bus driven from the state (Moore outputs).
  always_comb begin
    bus_op   = BUS_IDLE;
    bus_addr = '0;
    bus_data = '0;
    unique case (state)
      S_LOAD_N: begin
        bus_op   = BUS_LINE;
        bus_addr = {SEL_IMAGE, unit, line};
        bus_data = n_mem[img_row][t_col * TILE +: TILE];
      end
      S_LOAD_M: begin
        bus_op   = BUS_LINE;
        bus_addr = {SEL_TEMPLATE, unit, line};
        bus_data = exp_row[t_col * TILE +: TILE];
      end
      S_RESTORE, S_SHIFT: begin
        bus_op   = BUS_COLUMN;
        bus_addr = {1'b0, unit, LW'(0)};
        bus_data = column;
      end
      S_COMPUTE: bus_op = BUS_COMPUTE;
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  localparam int unsigned LOAD_LAST  = UNITS * TILE - 1;
  localparam int unsigned SHIFT_LAST = UNITS - 1;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      n_fresh     <= 1'b0;
      cnt         <= '0;
      step        <= '0;
      adder_clear <= 1'b0;
      for (int r = 0; r < int'(IMG); r++) begin
        n_mem[r] <= '0;
        m_mem[r] <= '0;
      end
    end else begin
      adder_clear <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (host_we) begin
            if (host_sel == SEL_TEMPLATE) m_mem[host_row] <= host_data;
            else begin
              n_mem[host_row] <= host_data;
              n_fresh         <= 1'b0;
            end
          end else if (start) begin
            adder_clear <= 1'b1;
            cnt         <= '0;
            step        <= '0;
            state       <= n_fresh ? S_RESTORE : S_LOAD_N;
          end
        end
        S_LOAD_N: begin
          cnt <= cnt + 1'b1;
          if (cnt == (UW+LW)'(LOAD_LAST)) begin
            cnt     <= '0;
            n_fresh <= 1'b1;
            state   <= S_LOAD_M;
          end
        end
        S_RESTORE: begin
          cnt <= cnt + 1'b1;
          if (cnt == (UW+LW)'(SHIFT_LAST)) begin
            cnt   <= '0;
            state <= S_LOAD_M;
          end
        end
        S_LOAD_M: begin
          cnt <= cnt + 1'b1;
          if (cnt == (UW+LW)'(LOAD_LAST)) begin
            cnt   <= '0;
            state <= S_COMPUTE;
          end
        end
        S_COMPUTE: begin
          step <= step + 1'b1;
          cnt  <= '0;
          if (PASSES > 1)                      state <= S_COUNT;
          else if (step == (RW+1)'(IMG - 1))   state <= S_FINISH;
          else                                 state <= S_SHIFT;
        end
        S_COUNT: begin
          // partial unrolling: the units still count, the tiles must stay
          cnt <= cnt + 1'b1;
          if (cnt == (UW+LW)'(PASSES - 2)) begin
            cnt   <= '0;
            state <= (step == (RW+1)'(IMG)) ? S_FINISH : S_SHIFT;
          end
        end
        S_SHIFT: begin
          cnt <= cnt + 1'b1;
          if (cnt == (UW+LW)'(SHIFT_LAST)) state <= S_COMPUTE;
        end
        S_FINISH: if (adder_done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Host handshake rules.
  a_no_write_busy: assert property (@(posedge clk) disable iff (rst) busy |-> !host_we)
    else $error("ppma_ctrl: host write while busy");
  a_no_start_busy: assert property (@(posedge clk) disable iff (rst) busy |-> !start)
    else $error("ppma_ctrl: start while busy");

endmodule
