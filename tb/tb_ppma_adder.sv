// tb_ppma_adder: self-checking test of the adder / maximum block.
//
// Feeds comparisons of 64 reports of 16 random partial counts each, with idle
// gaps between reports, and checks every per-shift sum, the final maximum, the
// shift where it first occurred (including a forced tie), and that done pulses
// exactly once, one cycle after the 64th report.
module tb_ppma_adder;
  localparam int UNITS = 16, TILE = 16, STEPS = 64;

  logic clk = 0, rst = 1, clear = 0;
  logic [8:0] cnt [UNITS];
  logic cnt_valid = 0;
  logic [12:0] step_sum, similarity;
  logic step_valid, done;
  logic [5:0] best_shift;
  int checks = 0, failures = 0;

  ppma_adder #(.UNITS(UNITS), .TILE(TILE), .STEPS(STEPS)) dut (
    .clk, .rst, .clear, .cnt, .cnt_valid, .step_sum, .step_valid,
    .similarity, .best_shift, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_comparison(int tie_at);
    int sums [STEPS];
    int best = -1, best_k = 0;
    int done_seen = 0;
    clear <= 1; @(posedge clk); clear <= 0;
    for (int k = 0; k < STEPS; k++) begin
      int s = 0;
      for (int u = 0; u < UNITS; u++) begin
        cnt[u] <= 9'($urandom_range(0, 256));
      end
      @(negedge clk);
      for (int u = 0; u < UNITS; u++) s += int'(cnt[u]);
      sums[k] = s;
      if (s > best) begin best = s; best_k = k; end
      cnt_valid <= 1;
      @(posedge clk); #1;
      cnt_valid <= 0;
      check(step_valid === 1'b1, "step_valid");
      check(int'(step_sum) == s, "step_sum");
      check(done === (k == STEPS - 1), "done timing");
      if (done) done_seen++;
      repeat ($urandom_range(0, 3)) begin
        @(posedge clk); #1;
        check(step_valid === 1'b0, "step_valid low");
        check(done === 1'b0, "done only once");
      end
      if (k == tie_at) begin
        // repeat the best so far: the earlier shift must be kept
        for (int u = 0; u < UNITS; u++) begin
          int part = best - 256 * u;
          cnt[u] <= 9'(part > 256 ? 256 : (part < 0 ? 0 : part));
        end
        @(negedge clk);
        cnt_valid <= 1;
        @(posedge clk); #1;
        cnt_valid <= 0;
        k++;
        check(int'(step_sum) == best, "tie sum");
        if (k == STEPS - 1) begin check(done === 1'b1, "done at tie"); done_seen++; end
      end
    end
    check(int'(similarity) == best, "maximum");
    check(int'(best_shift) == best_k, "best shift");
    check(done_seen == 1, "one done");
  endtask

  initial begin
    foreach (cnt[u]) cnt[u] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    run_comparison(-1);
    run_comparison(10);
    run_comparison(40);
    run_comparison(-1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
