// tb_delay_schedule: checks the run-time delay of every product index
// against the nested-loop delay algorithm of the reference model, for the
// default size (n = 32, 6 products: 0, 10, 20, 320, 330, 340), for n = 16
// (0, 5, 10, 80, 85, 90), for n = 32 with 12 products (v = 8) and for
// n = 32 with 2 products (v = 16, delays 0 and 16; a one-bit index).
module tb_delay_schedule;
  import tb_usc_ref::*;

  int checks = 0, failures = 0;
  int fig[6] = '{0, 5, 10, 80, 85, 90};   // published delays for n = 16, v = 5

  logic [2:0] idx_a;  logic [8:0]  d_a;
  logic [2:0] idx_b;  logic [6:0]  d_b;
  logic [3:0] idx_c;  logic [9:0]  d_c;
  logic       idx_d;  logic [4:0]  d_d;

  delay_schedule #(.N_PERIOD(32), .N_SUM(6))  u_a (.idx(idx_a), .delay(d_a));
  delay_schedule #(.N_PERIOD(16), .N_SUM(6))  u_b (.idx(idx_b), .delay(d_b));
  delay_schedule #(.N_PERIOD(32), .N_SUM(12)) u_c (.idx(idx_c), .delay(d_c));
  delay_schedule #(.N_PERIOD(32), .N_SUM(2))  u_d (.idx(idx_d), .delay(d_d));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #100000;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    vec_t da, db, dc;
    da = ref_delays(32, ref_v(32, 6));
    db = ref_delays(16, ref_v(16, 6));
    dc = ref_delays(32, ref_v(32, 12));
    check(ref_v(32, 6) == 10 && ref_v(16, 6) == 5 && ref_v(32, 12) == 8, "reference v");
    for (int i = 0; i < 6; i++) begin
      idx_a = 3'(i); idx_b = 3'(i);
      #1;
      check(int'(d_a) == da[i], $sformatf("n=32 N=6 idx %0d: %0d vs %0d", i, d_a, da[i]));
      check(int'(d_b) == db[i], $sformatf("n=16 N=6 idx %0d: %0d vs %0d", i, d_b, db[i]));
      check(int'(d_b) == fig[i], $sformatf("n=16 idx %0d: %0d vs published %0d", i, d_b, fig[i]));
    end
    for (int i = 0; i < 12; i++) begin
      idx_c = 4'(i);
      #1;
      check(int'(d_c) == dc[i], $sformatf("n=32 N=12 idx %0d: %0d vs %0d", i, d_c, dc[i]));
    end
    for (int i = 0; i < 2; i++) begin
      idx_d = 1'(i);
      #1;
      check(int'(d_d) == 16 * i, $sformatf("n=32 N=2 idx %0d: %0d", i, d_d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
