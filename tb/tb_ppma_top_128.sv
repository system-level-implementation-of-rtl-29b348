// tb_ppma_top_128: the PPMA matcher scaled to 128x128 images.
//
// Builds the array with IMG = 128 and TILE = 32: still 16 units, each holding
// a 32x32 tile, a 32-bit line bus and 128 shift positions. Checks two
// comparisons (new image, then template only) against a whole-image reference
// written here for 128x128: all 128 per-shift sums, the maximum and its shift,
// and the cycle count L + 128*17 - 14 with L = 1024 (2 x 512 lines) or
// 528 (16 restoring column cycles + 512 template lines).
module tb_ppma_top_128;
  import ppma_pkg::*;

  localparam int IMG = 128, TILE = 32, SIGMA = 2;
  typedef logic [IMG-1:0] img_t [IMG];

  logic clk = 0, rst = 1;
  logic host_we = 0, host_sel = 0, start = 0;
  logic [6:0] host_row = 0;
  logic [IMG-1:0] host_data = 0;
  logic busy, done, step_valid;
  logic [14:0] similarity, step_sum;
  logic [6:0] best_shift;
  int checks = 0, failures = 0;

  ppma_top #(.IMG(IMG), .TILE(TILE), .SIGMA(SIGMA)) dut (
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

  // whole-image reference at 128x128
  function automatic int ref_sum(img_t n, img_t m, int k);
    int s = 0;
    for (int r = 0; r < IMG; r++)
      for (int c = 0; c < IMG; c++) begin
        logic e = 1'b0;
        for (int q = r - SIGMA; q <= r + SIGMA; q++)
          if (q >= 0 && q < IMG && m[q][c]) e = 1'b1;
        if (e && n[r][((c - k) % IMG + IMG) % IMG]) s++;
      end
    return s;
  endfunction

  function automatic img_t random_img(int density);
    img_t x;
    for (int r = 0; r < IMG; r++) begin
      x[r] = {$urandom, $urandom, $urandom, $urandom};
      for (int d = 1; d < density; d++) x[r] &= {$urandom, $urandom, $urandom, $urandom};
    end
    return x;
  endfunction

  int got_sums [IMG];
  int n_got;
  always @(posedge clk) if (!rst && step_valid) begin
    if (n_got < IMG) got_sums[n_got] = int'(step_sum);
    n_got++;
  end

  task automatic write_img(logic sel, img_t x);
    for (int r = 0; r < IMG; r++) begin
      host_we <= 1; host_sel <= sel; host_row <= 7'(r); host_data <= x[r];
      @(posedge clk);
    end
    host_we <= 0;
  endtask

  task automatic compare(img_t n, img_t m, int load_len, string name);
    int best = -1, best_k = 0, cycles = 0, dones = 0;
    int sums [IMG];
    for (int k = 0; k < IMG; k++) begin
      sums[k] = ref_sum(n, m, k);
      if (sums[k] > best) begin best = sums[k]; best_k = k; end
    end
    n_got = 0;
    start <= 1; @(posedge clk); start <= 0;
    do begin
      @(posedge clk); #1 cycles++;
      if (done) dones++;
    end while (busy && cycles < 10000);
    check(cycles == load_len + IMG * 17 - 14, $sformatf("%s: %0d cycles", name, cycles));
    check(dones == 1, $sformatf("%s: done pulses %0d", name, dones));
    check(n_got == IMG, $sformatf("%s: %0d step sums", name, n_got));
    for (int k = 0; k < IMG; k++)
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
    n = random_img(3);
    m = random_img(3);
    write_img(SEL_IMAGE, n); write_img(SEL_TEMPLATE, m);
    compare(n, m, 1024, "new image");
    // template = image rotated right by 99 pixels
    for (int r = 0; r < IMG; r++)
      for (int c = 0; c < IMG; c++) m[r][c] = n[r][((c - 99) % IMG + IMG) % IMG];
    write_img(SEL_TEMPLATE, m);
    compare(n, m, 528, "rotated template");
    check(int'(best_shift) == 99, "rotation found at 99");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
