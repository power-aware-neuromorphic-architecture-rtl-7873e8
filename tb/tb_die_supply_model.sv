// tb_die_supply_model: self-checking testbench of the die_supply_model
// behavioural model at a reduced size (64 rows x 16 neurons x 2 bits = 2048
// cells). Two instances are used, one defect-free and one with 5 % stuck-at
// cells. Checked: at nominal and mildly reduced supply (0.9 V) the read data
// passes unchanged; a gated die reads as zeros; at 0.8 V and 0.7 V the
// fraction of cells read wrongly is close to the characterised bit error rate
// (0.01903 and 0.62309) and matches the count the model reports; a failing
// cell inverts both 0 and 1; stuck-at cells return the same value whatever is
// stored and number about 5 % of the die.
module tb_die_supply_model;
  import snn_pkg::*;

  localparam int ROWS = 64, NEU = 16, W = NEU * 2, CELLS = ROWS * W;

  logic clk = 1'b0;
  layer_supply_t supply = '0;
  logic rd_en = 1'b0;
  logic [5:0] rd_addr = '0;
  logic [W-1:0] din = '0;
  logic [W-1:0] dout_a, dout_b;
  int unsigned ber_a, flips_a, ber_b, flips_b;

  int checks = 0, failures = 0;

  die_supply_model #(.ROWS(ROWS), .NEURONS(NEU), .DEFECT_PPM(0), .SEED(7)) dut_a (
    .clk, .supply, .rd_en, .rd_addr, .din, .dout(dout_a),
    .ber_ppm(ber_a), .flip_cells(flips_a)
  );
  die_supply_model #(.ROWS(ROWS), .NEURONS(NEU), .DEFECT_PPM(50000), .SEED(11)) dut_b (
    .clk, .supply, .rd_en, .rd_addr, .din, .dout(dout_b),
    .ber_ppm(ber_b), .flip_cells(flips_b)
  );

  always #5 clk = ~clk;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Read row r of both instances with stored data d.
  task automatic rd(input int r, input logic [W-1:0] d,
                    output logic [W-1:0] a, output logic [W-1:0] b);
    rd_en = 1; rd_addr = 6'(r);
    @(posedge clk); #1;
    rd_en = 0; din = d;
    #1;
    a = dout_a; b = dout_b;
  endtask

  task automatic set_supply(input logic g, input int v);
    supply.gate = g; supply.vsel = 5'(v);
    repeat (2) @(posedge clk);
    #1;
  endtask

  // Count wrong cells of instance A over the whole die, checking that
  // failing cells invert both values.
  task automatic count_errors(output int n);
    logic [W-1:0] a0, a1, b0, b1;
    n = 0;
    for (int r = 0; r < ROWS; r++) begin
      rd(r, '0, a0, b0);
      rd(r, '1, a1, b1);
      check("failing cell inverts both values", (a0 ^ ~a1) == '0);
      n += $countones(a0);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] a, b, a2, b2, s0, s1;
    int n, nstuck;
    repeat (2) @(posedge clk); #1;

    // nominal: transparent (instance A), random data
    for (int i = 0; i < 200; i++) begin
      logic [W-1:0] d;
      d = W'($urandom);
      rd($urandom_range(0, ROWS - 1), d, a, b);
      check("nominal passes data", a == d);
    end
    check("nominal ber 0", ber_a == 0);

    // stuck-at defects of instance B, at nominal supply
    nstuck = 0;
    for (int r = 0; r < ROWS; r++) begin
      rd(r, '0, a, s0);
      rd(r, '1, a, s1);
      rd(r, '0, a, b2);
      check("stuck cells repeatable", b2 == s0);
      // a stuck-at-1 cell reads 1 with 0 stored; a stuck-at-0 cell reads 0 with 1 stored
      nstuck += $countones(s0) + $countones(~s1);
    end
    $display("stuck cells %0d of %0d", nstuck, CELLS);
    check("defect density near 5%", nstuck > CELLS * 3 / 100 && nstuck < CELLS * 7 / 100);

    // 0.9 V (vsel 8): still error-free
    set_supply(0, 8);
    count_errors(n);
    check("0.9 V error-free", n == 0 && ber_a == 0);

    // 0.8 V (vsel 12): BER 0.01903
    set_supply(0, 12);
    count_errors(n);
    $display("0.8 V: %0d wrong cells of %0d (model says %0d)", n, CELLS, flips_a);
    check("0.8 V ber code", ber_a == 19030);
    check("0.8 V count matches model", n == int'(flips_a));
    check("0.8 V rate", n > CELLS * 1 / 100 && n < CELLS * 3 / 100);

    // 0.7 V (vsel 16): BER 0.62309
    set_supply(0, 16);
    count_errors(n);
    $display("0.7 V: %0d wrong cells of %0d", n, CELLS);
    check("0.7 V rate", n > CELLS * 57 / 100 && n < CELLS * 67 / 100);

    // gated: zeros whatever arrives
    set_supply(1, 0);
    for (int r = 0; r < 8; r++) begin
      rd(r, '1, a, b);
      check("gated reads zero", a == '0 && b == '0);
    end

    // back to nominal: errors gone
    set_supply(0, 0);
    count_errors(n);
    check("nominal again error-free", n == 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
