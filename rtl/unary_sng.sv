// unary_sng: unary stochastic number generator (counter plus comparator).
//
// While enabled, a counter runs 0, 1, ..., PERIOD-1, 0, ... and the output is
// 1 when the count is below `value`. Each PERIOD-cycle period therefore
// starts with `value` ones followed by PERIOD-value zeros: a deterministic
// unary bit-stream for value/PERIOD. When disabled the output is 0 and the
// counter holds, so a generator that is enabled later starts its stream later:
// this is how the MAC units delay a product relative to the others.
//
// Interface: `clear` (synchronous, like `rst`) returns the counter to 0;
// `en` advances it. `bit_out` is combinational from the counter and `en`, so
// the first bit of the stream appears in the cycle `en` first goes high.
// value may be 0..PERIOD; PERIOD gives an all-ones stream.
// Putting the ones first in the period follows the stream examples of the
// design; the synchronous reset and clear are this design's choice.
module unary_sng #(
  parameter int unsigned PERIOD = 32,
  parameter int unsigned XW     = $clog2(PERIOD + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,
  input  logic          en,
  input  logic [XW-1:0] value,
  output logic          bit_out
);
  localparam int unsigned CW = $clog2(PERIOD);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || clear)                    cnt <= '0;
    else if (en) begin
      if (cnt == CW'(PERIOD - 1))        cnt <= '0;
      else                               cnt <= cnt + 1'b1;
    end
  end

  assign bit_out = en && (XW'(cnt) < value);
endmodule
