// tb_ppma_ctrl: self-checking test of the controller.
//
// The testbench decodes the controller's bus the way the units would, into its
// own 64x64 copies of what the units hold. At every compute broadcast it
// checks that the units' copy of N equals the original N shifted right by the
// step number and that their template equals the expanded template. It also
// checks the bus schedule: 512 load cycles after N was written, 272 (16 restore
// shift cycles + 256 template lines) when only the template changed, 16
// column cycles between steps, 64 steps, and busy falling one cycle after the
// adder's done (which the testbench plays).
module tb_ppma_ctrl;
  import ppma_pkg::*;
  import ppma_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic host_we = 0, host_sel = 0, start = 0;
  logic [5:0] host_row = 0;
  logic [63:0] host_data = 0;
  logic busy, adder_clear, adder_done = 0;
  bus_op_e bus_op;
  logic [8:0] bus_addr;
  logic [15:0] bus_data;
  int checks = 0, failures = 0;

  ppma_ctrl #(.IMG(64), .TILE(16), .SIGMA(2)) dut (
    .clk, .rst, .host_we, .host_sel, .host_row, .host_data, .start, .busy,
    .bus_op, .bus_addr, .bus_data, .adder_clear, .adder_done);

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

  img_t n_img, m_img, n_units, m_units;
  int cycle, n_compute, n_column, n_line_n, n_line_m, first_compute, n_clear;
  int col_between;   // column cycles since the last compute

  // bus decoder = the units as seen by the testbench
  always @(posedge clk) if (!rst) begin
    int u, tr, tc;
    cycle++;
    if (adder_clear) n_clear++;
    u = int'(bus_addr[7:4]); tr = u / 4; tc = u % 4;
    case (bus_op)
      BUS_LINE: begin
        if (bus_addr[8]) begin m_units[tr*16 + bus_addr[3:0]][tc*16 +: 16] = bus_data; n_line_m++; end
        else             begin n_units[tr*16 + bus_addr[3:0]][tc*16 +: 16] = bus_data; n_line_n++; end
      end
      BUS_COLUMN: begin
        for (int l = 0; l < 16; l++)
          n_units[tr*16 + l][tc*16 +: 16] = {n_units[tr*16 + l][tc*16 +: 15], bus_data[l]};
        n_column++; col_between++;
      end
      BUS_COMPUTE: begin
        if (n_compute == 0) first_compute = cycle;
        else check(col_between == 16, "16 column cycles between steps");
        check(n_units == rot_right(n_img, n_compute), $sformatf("N at step %0d", n_compute));
        check(m_units == expand_img(m_img), "expanded template");
        n_compute++; col_between = 0;
      end
      default: ;
    endcase
  end

  task automatic write_img(logic sel, img_t x);
    for (int r = 0; r < 64; r++) begin
      host_we <= 1; host_sel <= sel; host_row <= 6'(r); host_data <= x[r];
      @(posedge clk);
    end
    host_we <= 0;
  endtask

  task automatic compare(int load_len, int restore_len);
    int start_cycle, c0;
    n_compute = 0; n_column = 0; n_line_n = 0; n_line_m = 0; n_clear = 0; col_between = 0;
    start <= 1; @(posedge clk); start <= 0;
    #1 start_cycle = cycle;
    wait (n_compute == 64);
    @(posedge clk); @(posedge clk);
    adder_done <= 1; @(posedge clk); adder_done <= 0;
    c0 = cycle;
    #1;
    check(busy === 1'b0, "busy falls after done");
    check(first_compute - start_cycle == load_len + 1, $sformatf("load length %0d", first_compute - start_cycle - 1));
    check(n_column == restore_len + 63 * 16, "column cycles");
    check(n_line_m == 256, "template lines");
    check(n_line_n == (load_len == 512 ? 256 : 0), "image lines");
    check(n_clear == 1, "one adder clear");
    @(posedge clk);
  endtask

  initial begin
    foreach (n_units[r]) begin n_units[r] = '0; m_units[r] = '0; end
    cycle = 0; n_compute = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    n_img = random_img(2); m_img = random_img(3);
    write_img(SEL_IMAGE, n_img); write_img(SEL_TEMPLATE, m_img);
    compare(512, 0);
    m_img = random_img(4); write_img(SEL_TEMPLATE, m_img);
    compare(272, 16);
    compare(272, 16);
    // one changed image row forces a full load
    n_img[17] = {$urandom, $urandom};
    host_we <= 1; host_sel <= SEL_IMAGE; host_row <= 6'd17; host_data <= n_img[17];
    @(posedge clk); host_we <= 0;
    compare(512, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
