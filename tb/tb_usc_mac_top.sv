// tb_usc_mac_top: end-to-end test of the three MAC implementations at the
// default size (n = 32, k = 31, 6 products, v = 10).
//
// Every operation drives the same x/y into all three units and checks:
// the delayed-generation and register-delay units emit the same output bit
// in every cycle; the sequential unit's final stream equals it; all three
// counts equal the reference model; the start-to-done latencies are
// n*k + D_max = 1332 and 6 * 1332 cycles. Inside the exact range (every input
// at most v ones) the count must be sum(x*y). Above it, the loss must stay
// within the error bound ((3/2)c(c+1) + c(v-1)) * L ones, c = ones above v,
// L = products with an input above v. A start pulse while the units are busy
// must be ignored. The mechanisms exercised are counted and each must occur:
// exact operations, overflow operations that lose ones to overlap, ones
// placed after n*k by the major delay, ones placed by a minor delay (inside
// the first n*k cycles but from a delayed product), stall cycles of the
// sequential unit, and ignored start pulses.
module tb_usc_mac_top;
  import tb_usc_ref::*;

  localparam int N_PERIOD = 32;
  localparam int N_SUM    = 6;
  localparam int XW       = 6;
  localparam int NK       = N_PERIOD * (N_PERIOD - 1);

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic                     start;
  logic [N_SUM-1:0][XW-1:0] x, y;
  logic or_busy, or_z, or_z_valid, or_done;
  logic reg_busy, reg_z, reg_z_valid, reg_done;
  logic seq_busy, seq_gen, seq_z, seq_z_valid, seq_done;
  logic [2:0]  seq_sel;
  logic [10:0] or_result, reg_result, seq_result;

  usc_mac_top u_top (
    .clk, .rst, .start, .x, .y,
    .or_busy, .or_z, .or_z_valid, .or_done, .or_result,
    .reg_busy, .reg_z, .reg_z_valid, .reg_done, .reg_result,
    .seq_busy, .seq_gen, .seq_sel, .seq_z, .seq_z_valid, .seq_done, .seq_result
  );

  int checks = 0, failures = 0;
  int n_exact = 0, n_overflow_loss = 0, n_major_ones = 0, n_minor_ones = 0;
  int n_stall = 0, n_ignored_start = 0;
  int V, D[N_SUM];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic run_op(input vec_t xs, input vec_t ys, input int c, input bit poke_start);
    bit   par[$];
    int   lat, or_lat, reg_lat, seq_lat, t, tseq, bad_pair, bad_seq, bad_ref, want, sum, lossmax, lcnt;
    bit   or_seen, reg_seen, seq_seen;
    @(negedge clk);
    for (int i = 0; i < N_SUM; i++) begin
      x[i] = XW'(xs[i]);
      y[i] = XW'(ys[i]);
    end
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1; t = 0; tseq = 0; bad_pair = 0; bad_seq = 0; bad_ref = 0;
    or_seen = 0; reg_seen = 0; seq_seen = 0; or_lat = 0; reg_lat = 0; seq_lat = 0;
    while (!seq_seen && lat < 8200) begin
      if (or_z_valid) begin
        if (or_z !== reg_z || !reg_z_valid) bad_pair++;
        if (or_z !== ref_bit(N_PERIOD, V, N_SUM, t, xs, ys)) bad_ref++;
        if (or_z && t >= NK) n_major_ones++;
        if (or_z && t < NK && (t % N_PERIOD) >= V) n_minor_ones++;
        par.push_back(or_z);
        t++;
      end
      if (seq_z_valid) begin
        if (tseq >= par.size() || seq_z !== par[tseq]) bad_seq++;
        tseq++;
      end
      if (seq_busy && !seq_gen) n_stall++;
      if (poke_start && lat == 500) start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat++;
      if (or_done && !or_seen)   begin or_seen = 1;  or_lat = lat; end
      if (reg_done && !reg_seen) begin reg_seen = 1; reg_lat = lat; end
      if (seq_done && !seq_seen) begin seq_seen = 1; seq_lat = lat; end
    end
    if (poke_start) begin
      check(or_lat == NK + D[N_SUM-1] + 1, "start while busy was ignored");
      n_ignored_start++;
    end
    check(or_lat  == NK + D[N_SUM-1] + 1,             $sformatf("parallel latency %0d", or_lat));
    check(reg_lat == NK + D[N_SUM-1] + 1,             $sformatf("register latency %0d", reg_lat));
    check(seq_lat == N_SUM * (NK + D[N_SUM-1]) + 1,   $sformatf("sequential latency %0d", seq_lat));
    check(t == NK + D[N_SUM-1] && tseq == t,          $sformatf("stream lengths %0d %0d", t, tseq));
    check(bad_pair == 0, $sformatf("%0d bits differ between parallel units", bad_pair));
    check(bad_ref  == 0, $sformatf("%0d bits differ from the reference", bad_ref));
    check(bad_seq  == 0, $sformatf("%0d bits differ in the sequential stream", bad_seq));
    want = ref_count(N_PERIOD, V, N_SUM, xs, ys);
    check(int'(or_result) == want && int'(reg_result) == want && int'(seq_result) == want,
          $sformatf("counts %0d %0d %0d, reference %0d", or_result, reg_result, seq_result, want));
    sum = exact_sum(N_SUM, xs, ys);
    if (c == 0) begin
      check(want == sum, $sformatf("exact range: %0d vs sum %0d", want, sum));
      if (want == sum) n_exact++;
    end else begin
      lcnt = 0;
      for (int i = 0; i < N_SUM; i++) if (xs[i] > V || ys[i] > V) lcnt++;
      lossmax = ((3 * c * (c + 1)) / 2 + c * (V - 1)) * lcnt;
      check(want <= sum && sum - want <= lossmax,
            $sformatf("overflow: count %0d sum %0d bound %0d", want, sum, lossmax));
      if (want < sum) n_overflow_loss++;
    end
  endtask

  initial begin
    vec_t xs, ys, d;
    start = 1'b0; x = '0; y = '0;
    V = ref_v(N_PERIOD, N_SUM);
    d = ref_delays(N_PERIOD, V);
    for (int i = 0; i < N_SUM; i++) D[i] = d[i];
    repeat (3) @(negedge clk);
    rst = 1'b0;
    xs = '{default: 10}; ys = '{default: 10};
    run_op(xs, ys, 0, 1'b1);
    for (int r = 0; r < 6; r++) begin
      xs = '{default: 0}; ys = '{default: 0};
      for (int i = 0; i < N_SUM; i++) begin
        xs[i] = $urandom_range(0, V);
        ys[i] = $urandom_range(0, V);
      end
      run_op(xs, ys, 0, 1'b0);
    end
    for (int c = 1; c <= 2; c++) begin
      for (int r = 0; r < 3; r++) begin
        xs = '{default: 0}; ys = '{default: 0};
        for (int i = 0; i < N_SUM; i++) begin
          xs[i] = (r == 0) ? V + c : $urandom_range(0, V + c);
          ys[i] = (r == 0) ? V + c : $urandom_range(0, V + c);
        end
        run_op(xs, ys, c, 1'b0);
      end
    end
    check(n_exact > 0,         "mechanism: exact accumulation");
    check(n_overflow_loss > 0, "mechanism: overflow loss");
    check(n_major_ones > 0,    "mechanism: major delay");
    check(n_minor_ones > 0,    "mechanism: minor delay");
    check(n_stall > 0,         "mechanism: sequential stall");
    check(n_ignored_start > 0, "mechanism: start while busy");
    $display("mechanisms: exact=%0d overflow_loss=%0d major_ones=%0d minor_ones=%0d stall=%0d ignored_start=%0d",
             n_exact, n_overflow_loss, n_major_ones, n_minor_ones, n_stall, n_ignored_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
