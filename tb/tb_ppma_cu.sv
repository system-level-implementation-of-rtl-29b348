// tb_ppma_cu: self-checking test of one computation unit.
//
// Drives random bus traffic (line writes to this unit and to others, column
// shifts, compute broadcasts, idle cycles) and keeps its own copy of the two
// tiles. After each compute it checks that count_valid rises for exactly the
// next cycle and that count equals the number of pixels set in both tiles.
module tb_ppma_cu;
  import ppma_pkg::*;
  localparam int TILE = 16;
  localparam int UNITS = 16;
  localparam int ID = 5;

  logic clk = 0, rst = 1;
  bus_op_e bus_op;
  logic [8:0] bus_addr;
  logic [15:0] bus_data;
  logic [8:0] count;
  logic count_valid;
  int checks = 0, failures = 0;
  int n_computes = 0, n_shifts = 0;

  logic [15:0] n_ref [TILE];
  logic [15:0] m_ref [TILE];

  ppma_cu #(.TILE(TILE), .UNITS(UNITS), .UNIT_ID(ID)) dut (
    .clk, .rst, .bus_op, .bus_addr, .bus_data, .count, .count_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_count();
    int s = 0;
    for (int l = 0; l < TILE; l++)
      for (int c = 0; c < TILE; c++)
        if (n_ref[l][c] && m_ref[l][c]) s++;
    return s;
  endfunction

  logic expect_valid;
  int   expect_count;

  // checker, sampled just before each edge
  always @(negedge clk) if (!rst) begin
    checks++;
    if (count_valid !== expect_valid) begin
      failures++;
      $display("FAIL valid=%b expected %b", count_valid, expect_valid);
    end
    if (expect_valid) begin
      checks++;
      if (int'(count) != expect_count) begin
        failures++;
        $display("FAIL count=%0d expected %0d", count, expect_count);
      end
    end
  end

  task automatic drive(bus_op_e op, logic [8:0] a, logic [15:0] d);
    bus_op <= op; bus_addr <= a; bus_data <= d;
    @(posedge clk);
    // update the reference with what the unit sampled at this edge
    expect_valid = (op == BUS_COMPUTE);
    if (op == BUS_COMPUTE) expect_count = ref_count();
    if (op == BUS_LINE && a[7:4] == 4'(ID)) begin
      if (a[8]) m_ref[a[3:0]] = d; else n_ref[a[3:0]] = d;
    end
    if (op == BUS_COLUMN && a[7:4] == 4'(ID))
      for (int l = 0; l < TILE; l++) n_ref[l] = {n_ref[l][14:0], d[l]};
    #1;
  endtask

  initial begin
    foreach (n_ref[l]) begin n_ref[l] = '0; m_ref[l] = '0; end
    expect_valid = 0; expect_count = 0;
    bus_op = BUS_IDLE; bus_addr = '0; bus_data = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    // fill both tiles fully with this unit's lines
    for (int l = 0; l < TILE; l++) drive(BUS_LINE, {1'b0, 4'(ID), 4'(l)}, 16'($urandom));
    for (int l = 0; l < TILE; l++) drive(BUS_LINE, {1'b1, 4'(ID), 4'(l)}, 16'($urandom));
    drive(BUS_COMPUTE, '0, '0); n_computes++;
    // all ones: count must be 256
    for (int l = 0; l < TILE; l++) drive(BUS_LINE, {1'b0, 4'(ID), 4'(l)}, 16'hffff);
    for (int l = 0; l < TILE; l++) drive(BUS_LINE, {1'b1, 4'(ID), 4'(l)}, 16'hffff);
    drive(BUS_COMPUTE, '0, '0); n_computes++;
    checks++; if (ref_count() != 256) begin failures++; $display("FAIL all-ones"); end
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      int k;
      logic [3:0] u;
      k = $urandom_range(0, 9);
      u = ($urandom_range(0, 2) == 0) ? 4'($urandom) : 4'(ID);
      if (k < 4)       drive(BUS_LINE, {1'($urandom), u, 4'($urandom)}, 16'($urandom));
      else if (k < 7) begin drive(BUS_COLUMN, {1'b0, u, 4'd0}, 16'($urandom)); n_shifts++; end
      else if (k < 9) begin drive(BUS_COMPUTE, 9'($urandom), 16'($urandom)); n_computes++; end
      else             drive(BUS_IDLE, 9'($urandom), 16'($urandom));
    end
    drive(BUS_IDLE, '0, '0);
    drive(BUS_IDLE, '0, '0);
    checks++; if (n_computes < 100 || n_shifts < 100) begin failures++; $display("FAIL traffic mix %0d %0d", n_computes, n_shifts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
