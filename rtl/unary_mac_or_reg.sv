// unary_mac_or_reg: parallel OR-based unary MAC with delay registers.
//
// Computes the same non-scaled z = sum(x_i*y_i) as unary_mac_or and produces
// the same output bit-stream, but makes the relative delays differently: all
// products are generated at the same time from one shared counter pair
// (one counter of period n = N_PERIOD, one of period k = n-1), each input
// compared with the counter of its period, and the product of pair i then
// passes through a shift register of D_i stages (delay_line.sv) before the
// OR gate. D_i comes from the delay schedule (usc_pkg::delay_of, the same
// formula as delay_schedule.sv); D_0 = 0 is a wire. After n*k cycles the
// comparators are forced to 0 so that only zeros follow into the registers.
//
// Interface and timing are those of unary_mac_or: `start` when idle, then
// T = n*k + D_max busy cycles with `z`/`z_valid`, then a one-cycle `done`
// with `result` = ones counted in z. x and y must be stable during the first
// n*k busy cycles (they are not latched).
// The shift-register delays and the comparators sharing one counter pair
// follow the published design. Its text also mentions "a total of 2N
// counters"; this design uses the single shared pair, which is what the
// description of comparing "the values of the two counters" with each pair
// of factors says. Handshake and widths are this design's choice.
module unary_mac_or_reg
  import usc_pkg::*;
#(
  parameter int unsigned N_PERIOD = 32,
  parameter int unsigned N_SUM    = 6,
  parameter int unsigned V        = v_max(N_PERIOD, N_SUM),
  parameter int unsigned XW       = bits_for(N_PERIOD),
  parameter int unsigned CW       = bits_for(total_cycles(N_PERIOD, V, N_SUM))
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      start,
  input  logic [N_SUM-1:0][XW-1:0]  x,
  input  logic [N_SUM-1:0][XW-1:0]  y,
  output logic                      busy,
  output logic                      z,
  output logic                      z_valid,
  output logic                      done,
  output logic [CW-1:0]             result
);
  localparam int unsigned NK    = N_PERIOD * (N_PERIOD - 1);
  localparam int unsigned TOTAL = total_cycles(N_PERIOD, V, N_SUM);
  localparam int unsigned TW    = bits_for(TOTAL);
  localparam int unsigned PW    = $clog2(N_PERIOD);

  logic          go, gen;
  logic [TW-1:0] t;
  logic [PW-1:0] cnt_n, cnt_k;
  logic [N_SUM-1:0] prod, prod_d;

  assign go  = start && !busy;
  assign gen = busy && ({1'b0, t} < (TW + 1)'(NK));

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

  // Shared counter pair with the coprime periods n and k.
  always_ff @(posedge clk) begin
    if (rst || go) begin
      cnt_n <= '0;
      cnt_k <= '0;
    end else if (gen) begin
      cnt_n <= (cnt_n == PW'(N_PERIOD - 1)) ? '0 : cnt_n + 1'b1;
      cnt_k <= (cnt_k == PW'(N_PERIOD - 2)) ? '0 : cnt_k + 1'b1;
    end
  end

  for (genvar i = 0; i < N_SUM; i++) begin : g_pair
    assign prod[i] = gen && (XW'(cnt_n) < x[i]) && (XW'(cnt_k) < y[i]);
    delay_line #(.DEPTH(delay_of(N_PERIOD, V, i))) u_dly (
      .clk, .rst, .din(prod[i]), .dout(prod_d[i])
    );
  end

  assign z       = |prod_d;
  assign z_valid = busy;

  prob_estimator #(.CW(CW)) u_est (
    .clk, .rst, .clear(go), .valid(z_valid), .bit_in(z), .count(result)
  );

  initial begin
    assert (N_SUM >= 1 && N_SUM <= num_delays(N_PERIOD, V))
      else $error("unary_mac_or_reg: N_SUM exceeds the available delays");
    assert (V >= 1 && 2 * V <= N_PERIOD) else $error("unary_mac_or_reg: need 1 <= V <= n/2");
  end

  property p_inputs_stable;
    @(posedge clk) disable iff (rst) (gen && !go) |=> (!gen || ($stable(x) && $stable(y)));
  endproperty
  a_inputs_stable: assert property (p_inputs_stable)
    else $error("unary_mac_or_reg: x/y changed while products are generated");
endmodule
