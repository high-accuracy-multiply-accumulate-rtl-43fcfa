// prob_estimator: bit-stream to binary converter (ones counter).
//
// Counts the cycles in which `valid` and `bit_in` are both 1. After a whole
// MAC operation the count, divided by n*k, is the value of the output
// bit-stream; the count of an exact MAC equals sum(x_i*y_i) in units of
// 1/(n*k). `clear` (synchronous) restarts the count at 0 and takes
// precedence over a bit in the same cycle. The count is registered: a bit
// shows in `count` one cycle after it is presented. The counter width is
// sized by the instantiating MAC for its longest output stream.
module prob_estimator #(
  parameter int unsigned CW = 11
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,
  input  logic          valid,
  input  logic          bit_in,
  output logic [CW-1:0] count
);
  always_ff @(posedge clk) begin
    if (rst || clear)           count <= '0;
    else if (valid && bit_in)   count <= count + 1'b1;
  end
endmodule
