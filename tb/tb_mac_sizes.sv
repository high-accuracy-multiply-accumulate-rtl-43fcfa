// tb_mac_sizes: the delayed-generation MAC at the sizes of the accuracy
// study: n = 16 with 2 products, n = 32 with 2 and 12 products, n = 64 with
// 20 and n = 128 with 30 products. For each size v follows from the number
// of products (16, 10.., 8, 12, 21 ones per period), and random inputs up to
// v must give exactly sum(x*y) ones; inputs drawn from [0, 1.38] and clipped
// at 1 (the widest range of the study) are checked bit by bit against the
// reference model and their mean absolute error relative to the exact sum
// is printed. Every operation also checks the latency n*k + D_max.
module tb_mac_sizes;
  import tb_usc_ref::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  tb_mac_harness #(.N_PERIOD(16),  .N_SUM(2),  .IMPL(0)) h16_2   (.clk, .rst);
  tb_mac_harness #(.N_PERIOD(32),  .N_SUM(2),  .IMPL(0)) h32_2   (.clk, .rst);
  tb_mac_harness #(.N_PERIOD(32),  .N_SUM(12), .IMPL(0)) h32_12  (.clk, .rst);
  tb_mac_harness #(.N_PERIOD(64),  .N_SUM(20), .IMPL(0)) h64_20  (.clk, .rst);
  tb_mac_harness #(.N_PERIOD(128), .N_SUM(30), .IMPL(0)) h128_30 (.clk, .rst);

  function automatic int total_checks();
    return h16_2.checks + h32_2.checks + h32_12.checks + h64_20.checks + h128_30.checks;
  endfunction
  function automatic int total_failures();
    return h16_2.failures + h32_2.failures + h32_12.failures + h64_20.failures + h128_30.failures;
  endfunction

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures() + 1);
    $finish;
  end

  // Inputs uniform in [0, 1.38] of full scale, clipped to full scale.
  function automatic int clipped(input int full);
    int r;
    r = $urandom_range(0, (full * 138) / 100);
    return r > full ? full : r;
  endfunction

  initial begin
    vec_t xs, ys;
    int got, err;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (4) h16_2.run_random(ref_v(16, 2));
    repeat (4) h32_2.run_random(ref_v(32, 2));
    repeat (3) h32_12.run_random(ref_v(32, 12));
    repeat (2) h64_20.run_random(ref_v(64, 20));
    h128_30.run_random(ref_v(128, 30));
    // Wide-range inputs at n = 32, 2 products.
    err = 0;
    for (int r = 0; r < 4; r++) begin
      xs = '{default: 0}; ys = '{default: 0};
      for (int i = 0; i < 2; i++) begin
        xs[i] = clipped(32);
        ys[i] = clipped(31);
      end
      h32_2.run_op(xs, ys, -1, got);
      err += exact_sum(2, xs, ys) - got;
    end
    $display("n=32, 2 products, inputs in [0,1.38] clipped: mean error %0d ones of %0d", err / 4, 32 * 31);
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures());
    $finish;
  end
endmodule
