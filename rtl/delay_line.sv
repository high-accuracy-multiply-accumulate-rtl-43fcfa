// delay_line: DEPTH-stage bit shift register.
//
// `dout` is `din` delayed by exactly DEPTH clock cycles; DEPTH = 0 is a plain
// wire. It shifts every cycle. In the register-delay MAC one of these sits
// between each AND gate and the OR gate, with DEPTH set to the product's
// relative delay from the delay schedule. The synchronous reset clears every
// stage so that no stale ones reach the OR gate (this design's choice).
// With DEPTH = 0 the clock and reset are not used (the linter notes this);
// they stay on the port list so that every depth has the same interface.
module delay_line #(
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic din,
  output logic dout
);
  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else if (DEPTH == 1) begin : g_one
    logic stage;
    always_ff @(posedge clk) begin
      if (rst) stage <= 1'b0;
      else     stage <= din;
    end
    assign dout = stage;
  end else begin : g_shift
    logic [DEPTH-1:0] sr;
    always_ff @(posedge clk) begin
      if (rst) sr <= '0;
      else     sr <= {sr[DEPTH-2:0], din};
    end
    assign dout = sr[DEPTH-1];
  end
endmodule
