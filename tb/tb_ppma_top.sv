// tb_ppma_top: end-to-end test of the PPMA matcher at its default size.
//
// Loads 64x64 images through the host port, runs comparisons and checks the
// similarity degree, the winning shift, the sum of every one of the 64 shift
// positions, and the comparison time (L + 1074 cycles from the start edge to
// busy falling, L = 512 after a new image, 272 when only the template
// changed) against a whole-image reference model. The comparisons cover:
//   - a new image with a random template (full 512-cycle load)
//   - templates changed alone (272-cycle load with the restoring shift)
//   - a template that is the image rotated by 37 pixels (the best match is
//     found at shift 37, across tile borders and the wrap-around)
//   - an empty template (all 64 sums tie at 0: shift 0 must be kept)
//   - a case where the noise-tolerance expansion changes the result
// and counts each of these mechanisms; one that never happens is a failure.
// Shifts are counted where a shift position's sum is correct and differs from
// the previous position's; the restoring shift is proven by the template-only
// comparisons matching the reference from shift 0.
module tb_ppma_top;
  import ppma_pkg::*;
  import ppma_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic host_we = 0, host_sel = 0, start = 0;
  logic [5:0] host_row = 0;
  logic [63:0] host_data = 0;
  logic busy, done, step_valid;
  logic [12:0] similarity, step_sum;
  logic [5:0] best_shift;
  int checks = 0, failures = 0;

  ppma_top dut (
    .clk, .rst, .host_we, .host_sel, .host_row, .host_data, .start, .busy,
    .done, .similarity, .best_shift, .step_sum, .step_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // mechanism counters
  int n_full_load, n_restore_load, n_shift_cycles, n_computes, n_best_late,
      n_tie, n_expansion_matters;

  int got_sums [64];
  int n_got;
  always @(posedge clk) if (!rst && step_valid) begin
    if (n_got < 64) got_sums[n_got] = int'(step_sum);
    n_got++;
    n_computes++;
  end

  task automatic write_img(logic sel, img_t x);
    for (int r = 0; r < 64; r++) begin
      host_we <= 1; host_sel <= sel; host_row <= 6'(r); host_data <= x[r];
      @(posedge clk);
    end
    host_we <= 0;
  endtask

  task automatic compare(img_t n, img_t m, int load_len, string name);
    int best, best_k, plain_best, plain_k, cycles, dones;
    int sums [64], plain [64];
    ref_similarity(n, m, best, best_k, sums);
    plain_best = -1;
    for (int k = 0; k < 64; k++) begin
      plain[k] = overlap(m, rot_right(n, k));
      if (plain[k] > plain_best) begin plain_best = plain[k]; plain_k = k; end
    end
    n_got = 0; cycles = 0; dones = 0;
    start <= 1; @(posedge clk); start <= 0;
    do begin
      @(posedge clk); #1 cycles++;
      if (done) dones++;
    end while (busy && cycles < 5000);
    check(cycles == load_len + 1074, $sformatf("%s: %0d cycles", name, cycles));
    check(dones == 1, $sformatf("%s: done pulses %0d", name, dones));
    check(n_got == 64, $sformatf("%s: %0d step sums", name, n_got));
    for (int k = 0; k < 64; k++) begin
      check(got_sums[k] == sums[k], $sformatf("%s: sum at shift %0d: %0d vs %0d", name, k, got_sums[k], sums[k]));
      // a correct sum that differs from the previous shift's shows a shift took place
      if (k > 0 && got_sums[k] == sums[k] && sums[k] != sums[k-1]) n_shift_cycles++;
    end
    check(int'(similarity) == best, $sformatf("%s: similarity %0d vs %0d", name, similarity, best));
    check(int'(best_shift) == best_k, $sformatf("%s: best shift %0d vs %0d", name, best_shift, best_k));
    if (load_len == 512) n_full_load++; else n_restore_load++;
    if (best_k > 0) n_best_late++;
    if (best == 0) n_tie++;
    if (plain_best != best || plain_k != best_k) n_expansion_matters++;
    $display("%s: similarity %0d at shift %0d, %0d cycles", name, similarity, best_shift, cycles);
  endtask

  initial begin
    img_t n1, n2, m;
    n_full_load = 0; n_restore_load = 0; n_shift_cycles = 0; n_computes = 0;
    n_best_late = 0; n_tie = 0; n_expansion_matters = 0; n_got = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);

    n1 = random_img(2);
    m  = random_img(3);
    write_img(SEL_IMAGE, n1); write_img(SEL_TEMPLATE, m);
    compare(n1, m, 512, "random template");

    // template = image rotated right by 37, with a few rows dropped
    m = rot_right(n1, 37);
    m[5] = '0; m[40] = '0;
    write_img(SEL_TEMPLATE, m);
    compare(n1, m, 272, "rotated template");
    check(int'(best_shift) == 37, "rotation found at 37");

    foreach (m[r]) m[r] = '0;
    write_img(SEL_TEMPLATE, m);
    compare(n1, m, 272, "empty template");

    // sparse image: expansion decides the winner
    n2 = random_img(4);
    m  = random_img(4);
    write_img(SEL_IMAGE, n2); write_img(SEL_TEMPLATE, m);
    compare(n2, m, 512, "sparse pair");
    m = random_img(5);
    write_img(SEL_TEMPLATE, m);
    compare(n2, m, 272, "sparser template");

    check(n_full_load >= 1, "mechanism: full load");
    check(n_restore_load >= 1, "mechanism: template-only load with restoring shift");
    check(n_shift_cycles >= 1, $sformatf("mechanism: visible shifts %0d", n_shift_cycles));
    check(n_computes == 5 * 64, "mechanism: compute steps reported");
    check(n_best_late >= 1, "mechanism: maximum found after shifting");
    check(n_tie >= 1, "mechanism: tie keeps first shift");
    check(n_expansion_matters >= 1, "mechanism: expansion changes the result");
    $display("full loads %0d, restore loads %0d, visible shifts %0d, computes %0d, late maxima %0d, ties %0d, expansion mattered %0d",
             n_full_load, n_restore_load, n_shift_cycles, n_computes, n_best_late, n_tie, n_expansion_matters);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
