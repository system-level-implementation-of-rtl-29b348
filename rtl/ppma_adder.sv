// ppma_adder: sums the partial similarity counts and keeps the maximum.
//
// Each time the units report (cnt_valid, all units in the same cycle) the
// UNITS partial counts are added into the similarity degree of the current
// shift position (fig. 2 step 5). Over one comparison the adder keeps the
// largest of these sums and the shift position where it first occurred
// (step 7). clear, pulsed by the controller before a comparison, restarts the
// shift counter; after STEPS reports, done pulses for one cycle with
// similarity and best_shift valid (they then hold until the next clear).
// step_sum/step_valid show every per-shift sum one cycle after the report.
//
// Timing: report in cycle t -> step_sum and the updated maximum in t+1; done
// in the cycle after the STEPS-th report. Ties keep the earlier shift. The
// adding of all partial counts follows the original design; the tie rule,
// the running-maximum register and the handshake are this design's choices.
module ppma_adder #(
  parameter int unsigned UNITS = (ppma_pkg::IMG_DEFAULT / ppma_pkg::TILE_DEFAULT) ** 2,
  parameter int unsigned TILE  = ppma_pkg::TILE_DEFAULT,
  parameter int unsigned STEPS = ppma_pkg::IMG_DEFAULT,   // shift positions
  localparam int unsigned CW   = $clog2(TILE * TILE + 1),
  localparam int unsigned SW   = $clog2(UNITS * TILE * TILE + 1),
  localparam int unsigned KW   = $clog2(STEPS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,              // start of a new comparison
  input  logic [CW-1:0] cnt [UNITS],
  input  logic          cnt_valid,
  output logic [SW-1:0] step_sum,
  output logic          step_valid,
  output logic [SW-1:0] similarity,         // maximum over all shifts
  output logic [KW-1:0] best_shift,         // shift where it first occurred
  output logic          done
);

  logic [SW-1:0] sum;
  always_comb begin
    sum = '0;
    for (int u = 0; u < int'(UNITS); u++) sum += SW'(cnt[u]);
  end

  logic [KW:0] steps_seen;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      steps_seen <= '0;
      similarity <= '0;
      best_shift <= '0;
      step_sum   <= '0;
      step_valid <= 1'b0;
      done       <= 1'b0;
    end else begin
      step_valid <= cnt_valid;
      done       <= 1'b0;
      if (cnt_valid) begin
        step_sum   <= sum;
        steps_seen <= steps_seen + 1'b1;
        if (steps_seen == '0 || sum > similarity) begin
          similarity <= sum;
          best_shift <= KW'(steps_seen);
        end
        if (steps_seen == (KW+1)'(STEPS - 1)) done <= 1'b1;
      end
    end
  end

endmodule
