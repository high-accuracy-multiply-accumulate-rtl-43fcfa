// tb_mac_harness: drives one MAC implementation and checks it against the
// reference model in tb_usc_ref.
//
// IMPL selects the unit: 0 = unary_mac_or, 1 = unary_mac_or_reg,
// 2 = unary_mac_or_seq (whose factor pair is selected from x/y by its sel
// output). run_op() applies x/y, pulses start, and then checks, cycle by
// cycle, every valid output bit against the reference stream, the number of
// valid cycles, the start-to-done latency (n*k + D_max cycles for the
// parallel units, N_SUM times that for the sequential one), the ones count
// against the reference and, where given, against an expected count.
// `checks`, `failures` and the event counters are read by the testbench top.
module tb_mac_harness
  import tb_usc_ref::*;
#(
  parameter int N_PERIOD = 32,
  parameter int N_SUM    = 6,
  parameter int IMPL     = 0
) (
  input logic clk,
  input logic rst
);
  localparam int XW  = $clog2(N_PERIOD + 1);
  localparam int V   = ref_v(N_PERIOD, N_SUM);
  localparam int NK  = N_PERIOD * (N_PERIOD - 1);

  int checks = 0, failures = 0;
  int stall_cycles = 0, gen_cycles = 0;

  logic                     start;
  logic [N_SUM-1:0][XW-1:0] x, y;
  logic                     busy, z, z_valid, done;
  logic [31:0]              result;
  logic                     gen;

  if (IMPL == 0) begin : g_dut
    logic [$bits(u_dut.result)-1:0] r;
    unary_mac_or #(.N_PERIOD(N_PERIOD), .N_SUM(N_SUM)) u_dut (
      .clk, .rst, .start, .x, .y, .busy, .z, .z_valid, .done, .result(r)
    );
    assign result = 32'(r);
    assign gen    = 1'b0;
  end else if (IMPL == 1) begin : g_dut
    logic [$bits(u_dut.result)-1:0] r;
    unary_mac_or_reg #(.N_PERIOD(N_PERIOD), .N_SUM(N_SUM)) u_dut (
      .clk, .rst, .start, .x, .y, .busy, .z, .z_valid, .done, .result(r)
    );
    assign result = 32'(r);
    assign gen    = 1'b0;
  end else begin : g_dut
    logic [$bits(u_dut.result)-1:0] r;
    logic [$bits(u_dut.sel)-1:0]    sel;
    unary_mac_or_seq #(.N_PERIOD(N_PERIOD), .N_SUM(N_SUM)) u_dut (
      .clk, .rst, .start, .b(x[sel]), .c(y[sel]), .sel, .gen,
      .busy, .z, .z_valid, .done, .result(r)
    );
    assign result = 32'(r);
  end

  initial begin
    start = 1'b0;
    x     = '0;
    y     = '0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [n=%0d N=%0d impl=%0d] %s", N_PERIOD, N_SUM, IMPL, what);
    end
  endtask

  // Runs one MAC operation; exp < 0 means "no expected count given".
  // Returns the ones count the unit reported.
  task automatic run_op(input vec_t xs, input vec_t ys, input int exp, output int got);
    vec_t d;
    int lat, tz, want, nvalid, bad_bits, exp_lat;
    d = ref_delays(N_PERIOD, V);
    exp_lat = (IMPL == 2 ? N_SUM : 1) * (NK + d[N_SUM - 1]) + 1;
    @(negedge clk);
    for (int i = 0; i < N_SUM; i++) begin
      x[i] = XW'(xs[i]);
      y[i] = XW'(ys[i]);
    end
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1; tz = 0; nvalid = 0; bad_bits = 0;
    while (!done && lat < exp_lat + 10) begin
      if (z_valid) begin
        if (z !== ref_bit(N_PERIOD, V, N_SUM, tz, xs, ys)) bad_bits++;
        tz++;
        nvalid++;
      end
      if (busy) begin
        if (gen) gen_cycles++;
        else     stall_cycles++;
      end
      @(negedge clk);
      lat++;
    end
    check(done === 1'b1, "done pulse seen");
    check(lat == exp_lat, $sformatf("latency %0d, expected %0d", lat, exp_lat));
    check(nvalid == NK + d[N_SUM - 1], $sformatf("valid cycles %0d", nvalid));
    check(bad_bits == 0, $sformatf("%0d output bits differ from the reference stream", bad_bits));
    want = ref_count(N_PERIOD, V, N_SUM, xs, ys);
    check(result == 32'(want), $sformatf("count %0d, reference %0d", result, want));
    if (exp >= 0) check(result == 32'(exp), $sformatf("count %0d, expected %0d", result, exp));
    got = int'(result);
    @(negedge clk);
    check(done === 1'b0, "done is a single-cycle pulse");
    check(result == 32'(got), "result held after done");
  endtask

  // Random operation with every input at most vlim ones per period;
  // inside the exact range the count must equal sum(x*y).
  task automatic run_random(input int vlim);
    vec_t xs, ys;
    int got;
    xs = '{default: 0};
    ys = '{default: 0};
    for (int i = 0; i < N_SUM; i++) begin
      xs[i] = $urandom_range(0, vlim);
      ys[i] = $urandom_range(0, vlim > N_PERIOD - 1 ? N_PERIOD - 1 : vlim);
    end
    run_op(xs, ys, (vlim <= V) ? exact_sum(N_SUM, xs, ys) : -1, got);
  endtask
endmodule
