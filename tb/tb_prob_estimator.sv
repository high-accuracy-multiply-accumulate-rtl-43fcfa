// tb_prob_estimator: feeds random bit/valid patterns to the ones counter and
// compares its count with a count kept here; checks clear and that clear
// wins over a bit in the same cycle.
module tb_prob_estimator;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        clear, valid, bit_in;
  logic [10:0] count;

  prob_estimator #(.CW(11)) u_dut (.clk, .rst, .clear, .valid, .bit_in, .count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int model;
    clear = 1'b0; valid = 1'b0; bit_in = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int run = 0; run < 5; run++) begin
      clear = 1'b1; valid = 1'b1; bit_in = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      model = 0;
      check(count == 0, "clear wins over a bit in the same cycle");
      for (int c = 0; c < 1332; c++) begin
        valid  = ($urandom_range(0, 7) != 0);
        bit_in = ($urandom_range(0, 99) < run * 20 + 10);
        if (valid && bit_in) model++;
        @(negedge clk);
        check(int'(count) == model, $sformatf("run %0d cycle %0d: %0d vs %0d", run, c, count, model));
      end
      valid = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
