// delay_schedule: relative delay of one product in the OR-based unary MAC.
//
// Products are given delays in a two-level pattern. The "minor" step is v
// cycles: it puts the short bursts of ones of one product into the v-cycle
// slots where every other product is guaranteed to be 0 (each n-cycle period
// of a product holds at most v ones, then n-v zeros). The "major" step is
// v*n cycles: it moves a whole group of products into the long all-zero
// stretch in the middle of the n*k-cycle product. Product idx gets
//     q = idx / (N_minor + 1),  p = idx mod (N_minor + 1),
//     delay = q*v*n + p*v,
// with N_minor = floor((n - v) / v). This is the enumeration of the
// published schedule (major loop outside, minor loop inside).
//
// Interface: purely combinational, idx in, delay out, no clock.
// The module is used at run time by the sequential MAC, which needs the delay
// of whichever product it is generating. Widths are this design's choice:
// idx is wide enough for N_SUM products, delay for the largest delay.
module delay_schedule
  import usc_pkg::*;
#(
  parameter int unsigned N_PERIOD = 32,                     // n; k = n - 1
  parameter int unsigned N_SUM    = 6,                      // number of products
  parameter int unsigned V        = v_max(N_PERIOD, N_SUM), // max ones per period
  parameter int unsigned IW       = bits_for(N_SUM - 1),
  parameter int unsigned DW       = bits_for(d_max(N_PERIOD, V, N_SUM))
) (
  input  logic [IW-1:0] idx,
  output logic [DW-1:0] delay
);
  localparam int unsigned MINOR_STEPS = n_minor(N_PERIOD, V) + 1;
  localparam int unsigned MAJOR_STEP  = V * N_PERIOD;
  localparam int unsigned MW          = DW + bits_for(MAJOR_STEP);

  localparam int unsigned SW          = IW + bits_for(MINOR_STEPS);

  logic [SW-1:0] q, p;

  // Divide at a width that holds both idx and the step count, then form the
  // sum wide and cut it to DW bits: for every idx < N_SUM it fits.
  always_comb begin
    q     = SW'(idx) / SW'(MINOR_STEPS);
    p     = SW'(idx) % SW'(MINOR_STEPS);
    delay = DW'(MW'(q) * MW'(MAJOR_STEP) + MW'(p) * MW'(V));
  end

  initial begin
    assert (N_SUM >= 1 && N_SUM <= num_delays(N_PERIOD, V))
      else $error("delay_schedule: N_SUM=%0d exceeds the %0d delays available for n=%0d, v=%0d",
                  N_SUM, num_delays(N_PERIOD, V), N_PERIOD, V);
  end
endmodule
