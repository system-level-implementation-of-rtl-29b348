// ppma_ref_pkg: reference model of the PPMA comparison for the testbenches.
//
// Works on whole 64x64 images, pixel by pixel, without any tiling:
//   expand_img   every 1 pixel is repeated in the SIGMA rows above and below
//   rot_right    cyclic right shift by k pixels: out[r][c] = in[r][(c-k) mod 64]
//   overlap      number of pixels that are 1 in both images
//   ref_similarity  for k = 0..63 the overlap of expand_img(m) with
//                rot_right(n, k); returns the maximum and the first k reaching it
package ppma_ref_pkg;
  localparam int IMG = 64;
  localparam int SIGMA = 2;
  typedef logic [IMG-1:0] img_t [IMG];

  function automatic img_t expand_img(img_t m);
    img_t e;
    for (int r = 0; r < IMG; r++) begin
      e[r] = '0;
      for (int c = 0; c < IMG; c++)
        for (int s = r - SIGMA; s <= r + SIGMA; s++)
          if (s >= 0 && s < IMG && m[s][c]) e[r][c] = 1'b1;
    end
    return e;
  endfunction

  function automatic img_t rot_right(img_t n, int k);
    img_t o;
    for (int r = 0; r < IMG; r++)
      for (int c = 0; c < IMG; c++)
        o[r][c] = n[r][((c - k) % IMG + IMG) % IMG];
    return o;
  endfunction

  function automatic int overlap(img_t a, img_t b);
    int s = 0;
    for (int r = 0; r < IMG; r++) s += $countones(a[r] & b[r]);
    return s;
  endfunction

  function automatic void ref_similarity(img_t n, img_t m, output int best, output int best_k,
                                     output int sums [IMG]);
    img_t e = expand_img(m);
    best = -1; best_k = 0;
    for (int k = 0; k < IMG; k++) begin
      sums[k] = overlap(e, rot_right(n, k));
      if (sums[k] > best) begin best = sums[k]; best_k = k; end
    end
  endfunction

  // random sparse image: each pixel is 1 with probability 1/2^density
  function automatic img_t random_img(int density);
    img_t x;
    for (int r = 0; r < IMG; r++) begin
      x[r] = {$urandom, $urandom};
      for (int d = 1; d < density; d++) x[r] &= {$urandom, $urandom};
    end
    return x;
  endfunction
endpackage
