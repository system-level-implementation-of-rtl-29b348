// tb_ppma_top_plu: end-to-end test of the PPMA matcher with the partially
// unrolled count (LPC = 1: each unit counts one tile line per cycle, 16
// cycles per count).
//
// Runs a new-image comparison and a template-only comparison against the
// whole-image reference model, checks every per-shift sum, the maximum and its
// shift, and the longer comparison time: L + 2034 cycles (L = 512 or 272),
// i.e. 15 more cycles in each of the 64 steps than the fully unrolled array.
module tb_ppma_top_plu;
  import ppma_pkg::*;
  import ppma_ref_pkg::*;

  localparam int LPC = 1;
  localparam int EXTRA = 64 * (16 / LPC) + 1010;   // cycles after the load

  logic clk = 0, rst = 1;
  logic host_we = 0, host_sel = 0, start = 0;
  logic [5:0] host_row = 0;
  logic [63:0] host_data = 0;
  logic busy, done, step_valid;
  logic [12:0] similarity, step_sum;
  logic [5:0] best_shift;
  int checks = 0, failures = 0;

  ppma_top #(.LPC(LPC)) dut (
    .clk, .rst, .host_we, .host_sel, .host_row, .host_data, .start, .busy,
    .done, .similarity, .best_shift, .step_sum, .step_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  int got_sums [64];
  int n_got;
  always @(posedge clk) if (!rst && step_valid) begin
    if (n_got < 64) got_sums[n_got] = int'(step_sum);
    n_got++;
  end

  task automatic write_img(logic sel, img_t x);
    for (int r = 0; r < 64; r++) begin
      host_we <= 1; host_sel <= sel; host_row <= 6'(r); host_data <= x[r];
      @(posedge clk);
    end
    host_we <= 0;
  endtask

  task automatic compare(img_t n, img_t m, int load_len, string name);
    int best, best_k, cycles, dones;
    int sums [64];
    ref_similarity(n, m, best, best_k, sums);
    n_got = 0; cycles = 0; dones = 0;
    start <= 1; @(posedge clk); start <= 0;
    do begin
      @(posedge clk); #1 cycles++;
      if (done) dones++;
    end while (busy && cycles < 8000);
    check(cycles == load_len + EXTRA, $sformatf("%s: %0d cycles", name, cycles));
    check(dones == 1, $sformatf("%s: done pulses %0d", name, dones));
    check(n_got == 64, $sformatf("%s: %0d step sums", name, n_got));
    for (int k = 0; k < 64; k++)
      check(got_sums[k] == sums[k], $sformatf("%s: sum at shift %0d", name, k));
    check(int'(similarity) == best, $sformatf("%s: similarity %0d vs %0d", name, similarity, best));
    check(int'(best_shift) == best_k, $sformatf("%s: best shift %0d vs %0d", name, best_shift, best_k));
    $display("%s: similarity %0d at shift %0d, %0d cycles", name, similarity, best_shift, cycles);
  endtask

  initial begin
    img_t n, m;
    n_got = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    n = random_img(2);
    m = random_img(3);
    write_img(SEL_IMAGE, n); write_img(SEL_TEMPLATE, m);
    compare(n, m, 512, "new image");
    m = rot_right(n, 21);
    write_img(SEL_TEMPLATE, m);
    compare(n, m, 272, "rotated template");
    check(int'(best_shift) == 21, "rotation found at 21");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
