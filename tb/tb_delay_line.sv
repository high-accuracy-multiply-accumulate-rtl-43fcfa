// tb_delay_line: drives random bits into shift registers of depth 0, 1, 5
// and 340 (the largest delay of the default MAC) and checks that each output
// equals the input of exactly DEPTH cycles before, and that reset clears
// every stage.
module tb_delay_line;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic din;
  logic [3:0] dout;
  int depths[4] = '{0, 1, 5, 340};

  delay_line #(.DEPTH(0))   u_0   (.clk, .rst, .din, .dout(dout[0]));
  delay_line #(.DEPTH(1))   u_1   (.clk, .rst, .din, .dout(dout[1]));
  delay_line #(.DEPTH(5))   u_5   (.clk, .rst, .din, .dout(dout[2]));
  delay_line #(.DEPTH(340)) u_340 (.clk, .rst, .din, .dout(dout[3]));

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
    bit hist[$];
    din = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // History starts with zeros: reset cleared every stage.
    for (int i = 0; i < 400; i++) hist.push_front(1'b0);
    for (int c = 0; c < 2000; c++) begin
      din = 1'($urandom_range(0, 1));
      hist.push_front(din);
      #1;
      for (int j = 0; j < 4; j++)
        check(dout[j] == hist[depths[j]], $sformatf("depth %0d cycle %0d", depths[j], c));
      @(negedge clk);
      void'(hist.pop_back());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
