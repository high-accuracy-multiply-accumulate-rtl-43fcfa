// tb_unary_mac_or_seq: self-checking testbench of the sequential MAC.
//
// Three configurations: the default (n = 32, 6 products, v = 10); n = 16 with
// 6 products (v = 5, delays 0, 5, 10, 80, 85, 90), where all inputs at 5 must
// give 150 ones in 240 cycles (sum 0.625) and all inputs at 6 (one extra one
// per period) must give 207 ones (0.8625 against an exact 0.9); and the
// smallest case n = 3, k = 2, two products, with x1 = 2/3, y1 = 1, x2 = 1/3,
// y2 = 1/2, whose output 1101100 holds 4 ones. Random operations inside and
// outside the exact range are checked bit by bit against the reference model.
module tb_unary_mac_or_seq;
  import tb_usc_ref::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  tb_mac_harness #(.N_PERIOD(32), .N_SUM(6), .IMPL(2)) h_def (.clk, .rst);
  tb_mac_harness #(.N_PERIOD(16), .N_SUM(6), .IMPL(2)) h_16  (.clk, .rst);
  tb_mac_harness #(.N_PERIOD(3),  .N_SUM(2), .IMPL(2)) h_3   (.clk, .rst);

  int checks, failures;

  initial begin : watchdog
    repeat (600000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d",
             h_def.checks + h_16.checks + h_3.checks, h_def.failures + h_16.failures + h_3.failures + 1);
    $finish;
  end

  initial begin
    vec_t xs, ys;
    int got;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // n = 16, all inputs 5: exact sum 6 * 25 = 150.
    xs = '{default: 5}; ys = '{default: 5};
    h_16.run_op(xs, ys, 150, got);
    // n = 16, all inputs 6: 207 ones (the overlap costs 9 of 216).
    xs = '{default: 6}; ys = '{default: 6};
    h_16.run_op(xs, ys, 207, got);
    // n = 3 example: 4 ones.
    xs = '{default: 0}; ys = '{default: 0};
    xs[0] = 2; ys[0] = 2; xs[1] = 1; ys[1] = 1;
    h_3.run_op(xs, ys, 4, got);
    // Default size: maximum exact inputs, then zero.
    xs = '{default: 10}; ys = '{default: 10};
    h_def.run_op(xs, ys, 600, got);
    xs = '{default: 0}; ys = '{default: 0};
    h_def.run_op(xs, ys, 0, got);
    for (int r = 0; r < 6; r++) h_def.run_random(10);
    for (int r = 0; r < 4; r++) h_def.run_random(32);
    for (int r = 0; r < 4; r++) h_16.run_random(5);
    for (int r = 0; r < 4; r++) h_16.run_random(16);
    checks   = h_def.checks + h_16.checks + h_3.checks;
    failures = h_def.failures + h_16.failures + h_3.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
