// tb_grayscale: RGB to gray conversion, Gray = 0.2989 R + 0.5870 G +
// 0.1140 B, on the three MAC implementations with three products (n = 32).
//
// The colour components are reduced to 5 bits (R >> 3 etc.) and drive the
// period-32 streams; the weights are constant period-31 streams of
// round(w * 31) ones: 9, 18 and 4. With three products v = 10 and the
// delays are 0, 10, 20, so one gray value takes 992 + 20 = 1012 cycles in the
// parallel units and 3 * 1012 in the sequential one; both are checked. Pixels
// come from a generated test image (smooth gradients plus noise). Every unit's
// count must equal the reference model; the mean absolute error against
// exact 5-bit arithmetic, sum(c5/32 * w/31), is printed in percent of full
// scale.
module tb_grayscale;
  import tb_usc_ref::*;

  localparam int NPIX = 48;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic                start;
  logic [2:0][5:0]     x, y;
  logic or_busy, or_z, or_z_valid, or_done;
  logic reg_busy, reg_z, reg_z_valid, reg_done;
  logic seq_busy, seq_gen, seq_z, seq_z_valid, seq_done;
  logic [1:0]  seq_sel;
  logic [12:0] or_result, reg_result, seq_result;

  usc_mac_top #(.N_PERIOD(32), .N_SUM(3), .CW(13)) u_top (
    .clk, .rst, .start, .x, .y,
    .or_busy, .or_z, .or_z_valid, .or_done, .or_result,
    .reg_busy, .reg_z, .reg_z_valid, .reg_done, .reg_result,
    .seq_busy, .seq_gen, .seq_sel, .seq_z, .seq_z_valid, .seq_done, .seq_result
  );

  int checks = 0, failures = 0;
  int w[3] = '{9, 18, 4};   // round(0.2989*31), round(0.5870*31), round(0.1140*31)

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (NPIX * 3100 + 1000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    vec_t xs, ys;
    int rgb[3], lat, or_lat, seq_lat, want;
    real exact, abs_err;
    start = 1'b0; x = '0; y = '0;
    abs_err = 0.0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int p = 0; p < NPIX; p++) begin
      rgb[0] = (p * 255 / NPIX + $urandom_range(0, 15)) % 256;
      rgb[1] = (255 - p * 200 / NPIX + $urandom_range(0, 15)) % 256;
      rgb[2] = ((p % 8) * 32 + $urandom_range(0, 31)) % 256;
      xs = '{default: 0}; ys = '{default: 0};
      for (int i = 0; i < 3; i++) begin
        xs[i] = rgb[i] >> 3;
        ys[i] = w[i];
        x[i]  = 6'(xs[i]);
        y[i]  = 6'(ys[i]);
      end
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 1; or_lat = 0; seq_lat = 0;
      while (seq_lat == 0 && lat < 4000) begin
        @(negedge clk);
        lat++;
        if (or_done)  or_lat  = lat;
        if (seq_done) seq_lat = lat;
      end
      check(or_lat == 1013, $sformatf("parallel latency %0d", or_lat));
      check(seq_lat == 3 * 1012 + 1, $sformatf("sequential latency %0d", seq_lat));
      want = ref_count(32, 10, 3, xs, ys);
      check(int'(or_result) == want && int'(reg_result) == want && int'(seq_result) == want,
            $sformatf("pixel %0d: counts %0d %0d %0d, reference %0d", p, or_result, reg_result, seq_result, want));
      exact = 0.0;
      for (int i = 0; i < 3; i++) exact += (xs[i] / 32.0) * (w[i] / 31.0);
      abs_err += (exact > want / 992.0) ? exact - want / 992.0 : want / 992.0 - exact;
    end
    $display("gray-scale: %0d pixels, mean absolute error %0.2f %% of full scale", NPIX, 100.0 * abs_err / NPIX);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
