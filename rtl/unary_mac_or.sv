// unary_mac_or: parallel OR-based unary MAC with delayed bit-stream generation
// (z = sum of x_i*y_i, non-scaled, exact while every input has at most V ones
// per period).
//
// Every MAC input has its own unary generator. x_i uses period n = N_PERIOD,
// y_i period k = n-1; because n and k are coprime, AND-ing the two streams
// over n*k cycles gives exactly x_i*y_i ones (stochastic multiplication).
// The N_SUM products go to one N_SUM-input OR gate. A plain OR would lose
// every cycle in which two products are 1 at once, so the generator pair of
// product i is only enabled in the window [D_i, D_i + n*k) of the operation,
// with D_i from the delay schedule (delay_schedule.sv, usc_pkg::delay_of).
// With those delays the ones of different products never share a cycle, so
// the OR output holds exactly sum(x_i*y_i) ones. A generator outputs 0 while
// it is disabled. The ones are counted by prob_estimator.
//
// Interface and timing:
//   * `start` is taken when not busy. The operation then runs for
//     T = n*k + D_max cycles with `busy` high; `z` is the OR output in those
//     cycles and `z_valid` marks them.
//   * `done` pulses one cycle after the last busy cycle; `result` then holds
//     the number of ones of z (value = result / (n*k)) until the next start.
//   * x and y are read directly by the generators and must stay stable while
//     busy (assertion below); the inputs are not latched.
// Enabling generators at the scheduled cycles, the periods, and the OR/AND
// structure follow the published design; start/done handshake, the counter
// based window control and the input widths (0..n ones) are this design's.
module unary_mac_or
  import usc_pkg::*;
#(
  parameter int unsigned N_PERIOD = 32,                     // n; k = n - 1
  parameter int unsigned N_SUM    = 6,                      // number of products
  parameter int unsigned V        = v_max(N_PERIOD, N_SUM), // max ones per period for exactness
  parameter int unsigned XW       = bits_for(N_PERIOD),
  parameter int unsigned CW       = bits_for(total_cycles(N_PERIOD, V, N_SUM))
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      start,
  input  logic [N_SUM-1:0][XW-1:0]  x,        // ones per n-cycle period
  input  logic [N_SUM-1:0][XW-1:0]  y,        // ones per k-cycle period
  output logic                      busy,
  output logic                      z,
  output logic                      z_valid,
  output logic                      done,
  output logic [CW-1:0]             result
);
  localparam int unsigned NK    = N_PERIOD * (N_PERIOD - 1);
  localparam int unsigned TOTAL = total_cycles(N_PERIOD, V, N_SUM);
  localparam int unsigned TW    = bits_for(TOTAL);
  localparam int unsigned IW    = bits_for(N_SUM - 1);
  localparam int unsigned DW    = bits_for(d_max(N_PERIOD, V, N_SUM));

  logic          go;
  logic [TW-1:0] t;
  logic [N_SUM-1:0] pair_en, sx, sy, prod;

  assign go = start && !busy;

  // Operation timer and start/done control.
  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      t    <= '0;
    end else begin
      done <= 1'b0;
      if (go) begin
        busy <= 1'b1;
        t    <= '0;
      end else if (busy) begin
        if (t == TW'(TOTAL - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        t <= t + 1'b1;
      end
    end
  end

  for (genvar i = 0; i < N_SUM; i++) begin : g_pair
    logic [DW-1:0] d_i;
    delay_schedule #(.N_PERIOD(N_PERIOD), .N_SUM(N_SUM), .V(V), .IW(IW), .DW(DW)) u_delay (
      .idx(IW'(i)), .delay(d_i)
    );
    // Generation window of pair i.
    assign pair_en[i] = busy && (TW'(d_i) <= t) && ({1'b0, t} < {1'b0, TW'(d_i)} + (TW + 1)'(NK));

    unary_sng #(.PERIOD(N_PERIOD),     .XW(XW)) u_sng_x (
      .clk, .rst, .clear(go), .en(pair_en[i]), .value(x[i]), .bit_out(sx[i])
    );
    unary_sng #(.PERIOD(N_PERIOD - 1), .XW(XW)) u_sng_y (
      .clk, .rst, .clear(go), .en(pair_en[i]), .value(y[i]), .bit_out(sy[i])
    );
    assign prod[i] = sx[i] & sy[i];      // stochastic multiplication
  end

  assign z       = |prod;                // non-scaled OR addition
  assign z_valid = busy;

  prob_estimator #(.CW(CW)) u_est (
    .clk, .rst, .clear(go), .valid(z_valid), .bit_in(z), .count(result)
  );

  initial begin
    assert (N_PERIOD >= 3) else $error("unary_mac_or: N_PERIOD must be at least 3");
    assert (V >= 1 && 2 * V <= N_PERIOD) else $error("unary_mac_or: need 1 <= V <= n/2");
  end

  property p_inputs_stable;
    @(posedge clk) disable iff (rst) (busy && !done) |=> (!busy || ($stable(x) && $stable(y)));
  endproperty
  a_inputs_stable: assert property (p_inputs_stable)
    else $error("unary_mac_or: x/y changed during an operation");
endmodule
