// usc_mac_top: the three implementations of the OR-based unary MAC side by
// side, fed with the same factors.
//
// All three compute z = sum_{i<N_SUM} x_i*y_i as a non-scaled unary
// bit-stream (x_i with period n = N_PERIOD, y_i with period k = n-1) and
// count its ones; they differ only in how the relative delays between the
// products are made:
//   * or_*  : unary_mac_or      - one generator per input, pairs enabled late
//   * reg_* : unary_mac_or_reg  - shared counters, shift-register delays
//   * seq_* : unary_mac_or_seq  - one generator pair, products in sequence,
//                                 recirculating accumulator
// The two parallel units finish after n*k + D_max cycles, the sequential one
// after N_SUM*(n*k + D_max); all three produce the same output stream and
// the same count. `start` goes to all three; each reports its own done pulse
// and result (ones of z; value = result / (n*k)). x/y must stay stable until
// the last of the three done pulses. The sequential unit's factor pair is
// selected from x/y here by its `sel` output.
// Placing the three implementations next to each other is this design's
// choice, so that they can be compared cycle by cycle.
module usc_mac_top
  import usc_pkg::*;
#(
  parameter int unsigned N_PERIOD = 32,
  parameter int unsigned N_SUM    = 6,
  parameter int unsigned V        = v_max(N_PERIOD, N_SUM),
  parameter int unsigned XW       = bits_for(N_PERIOD),
  parameter int unsigned IW       = bits_for(N_SUM - 1),
  parameter int unsigned CW       = bits_for(total_cycles(N_PERIOD, V, N_SUM))
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      start,
  input  logic [N_SUM-1:0][XW-1:0]  x,
  input  logic [N_SUM-1:0][XW-1:0]  y,
  // delayed-generation unit
  output logic                      or_busy,
  output logic                      or_z,
  output logic                      or_z_valid,
  output logic                      or_done,
  output logic [CW-1:0]             or_result,
  // register-delay unit
  output logic                      reg_busy,
  output logic                      reg_z,
  output logic                      reg_z_valid,
  output logic                      reg_done,
  output logic [CW-1:0]             reg_result,
  // sequential unit
  output logic                      seq_busy,
  output logic                      seq_gen,
  output logic [IW-1:0]             seq_sel,
  output logic                      seq_z,
  output logic                      seq_z_valid,
  output logic                      seq_done,
  output logic [CW-1:0]             seq_result
);
  logic [XW-1:0] seq_b, seq_c;

  unary_mac_or #(.N_PERIOD(N_PERIOD), .N_SUM(N_SUM), .V(V), .XW(XW), .CW(CW)) u_or (
    .clk, .rst, .start, .x, .y,
    .busy(or_busy), .z(or_z), .z_valid(or_z_valid), .done(or_done), .result(or_result)
  );

  unary_mac_or_reg #(.N_PERIOD(N_PERIOD), .N_SUM(N_SUM), .V(V), .XW(XW), .CW(CW)) u_reg (
    .clk, .rst, .start, .x, .y,
    .busy(reg_busy), .z(reg_z), .z_valid(reg_z_valid), .done(reg_done), .result(reg_result)
  );

  // Factor selection for the sequential unit (Fig. 2(a) style b, c inputs).
  always_comb begin
    seq_b = '0;
    seq_c = '0;
    for (int i = 0; i < N_SUM; i++) begin
      if (seq_sel == IW'(i)) begin
        seq_b = x[i];
        seq_c = y[i];
      end
    end
  end

  unary_mac_or_seq #(.N_PERIOD(N_PERIOD), .N_SUM(N_SUM), .V(V), .XW(XW), .IW(IW), .CW(CW)) u_seq (
    .clk, .rst, .start, .b(seq_b), .c(seq_c),
    .sel(seq_sel), .gen(seq_gen), .busy(seq_busy), .z(seq_z), .z_valid(seq_z_valid),
    .done(seq_done), .result(seq_result)
  );
endmodule
