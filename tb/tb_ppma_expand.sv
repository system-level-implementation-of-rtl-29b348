// tb_ppma_expand: self-checking test of the template expansion.
//
// Checks, bit by bit, that an expanded row has a 1 exactly where some template
// pixel of the same column lies at most SIGMA rows away, without wrap-around
// at the top and bottom. Uses single-pixel templates (including pixels in the
// first and last rows) and random templates of several densities.
module tb_ppma_expand;
  localparam int IMG = 64;
  localparam int SIGMA = 2;

  logic [IMG-1:0] tmpl [IMG];
  logic [5:0]     row;
  logic [IMG-1:0] exp_row;
  int checks = 0, failures = 0;

  ppma_expand #(.IMG(IMG), .SIGMA(SIGMA)) dut (.tmpl, .row, .exp_row);

  function automatic logic ref_bit(int r, int c);
    for (int s = 0; s < IMG; s++)
      if (tmpl[s][c] && (s - r <= SIGMA) && (r - s <= SIGMA)) return 1'b1;
    return 1'b0;
  endfunction

  task automatic check_all_rows();
    for (int r = 0; r < IMG; r++) begin
      row = 6'(r);
      #1;
      for (int c = 0; c < IMG; c++) begin
        checks++;
        if (exp_row[c] !== ref_bit(r, c)) begin
          failures++;
          if (failures < 10) $display("FAIL row %0d col %0d got %b", r, c, exp_row[c]);
        end
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // single pixels at both edges and in the middle
    foreach (tmpl[r]) tmpl[r] = '0;
    tmpl[0][3] = 1'b1; tmpl[63][60] = 1'b1; tmpl[31][31] = 1'b1;
    check_all_rows();
    // the pixel in row 63 must not reach row 0 or 1
    row = 6'd0; #1; checks++; if (exp_row[60]) failures++;
    row = 6'd61; #1; checks++; if (!exp_row[60]) failures++;
    row = 6'd60; #1; checks++; if (exp_row[60]) failures++;
    // random templates
    for (int t = 0; t < 6; t++) begin
      foreach (tmpl[r]) tmpl[r] = {$urandom, $urandom} & {$urandom, $urandom} &
                                  ((t % 2) ? {$urandom, $urandom} : '1);
      check_all_rows();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
