// tb_unary_sng: checks the unary generator for periods 32 and 31 with every
// value 0..PERIOD: each enabled period must start with `value` ones followed
// by zeros, a disabled generator must output 0 and hold its place, and
// clear must restart the period.
module tb_unary_sng;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       clear, en;
  logic [5:0] value_n, value_k;
  logic       bn, bk;

  unary_sng #(.PERIOD(32)) u_n (.clk, .rst, .clear, .en, .value(value_n), .bit_out(bn));
  unary_sng #(.PERIOD(31)) u_k (.clk, .rst, .clear, .en, .value(value_k), .bit_out(bk));

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
    int pos;
    clear = 1'b0; en = 1'b0; value_n = '0; value_k = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int v = 0; v <= 32; v++) begin
      value_n = 6'(v);
      value_k = 6'(v > 31 ? 31 : v);
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      en = 1'b1;
      pos = 0;
      // Two periods of 32 with a stall of 3 cycles inserted at pos 40.
      while (pos < 64) begin
        if (pos == 40) begin
          en = 1'b0;
          repeat (3) begin
            #1 check(bn == 1'b0 && bk == 1'b0, "disabled generator outputs 0");
            @(negedge clk);
          end
          en = 1'b1;
        end
        #1;
        check(bn == ((pos % 32) < v), $sformatf("period 32 value %0d pos %0d", v, pos));
        check(bk == ((pos % 31) < (v > 31 ? 31 : v)), $sformatf("period 31 value %0d pos %0d", v, pos));
        @(negedge clk);
        pos++;
      end
      en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
