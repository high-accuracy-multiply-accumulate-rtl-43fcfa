// unary_mac_or_seq: sequential OR-based unary MAC (a <- a + b*c) with a
// recirculating accumulator.
//
// One generator pair (period n = N_PERIOD for b, k = n-1 for c) produces the
// products one after another; the factors of product i are read from the
// `b`/`c` inputs while `sel` = i. The accumulator is a shift register of
// L = n*k + D_max bits whose output is fed back to its input: one trip round
// it takes L cycles, so operation time tau maps to accumulator slot
// tau mod L. Product i is given its own round of L cycles and is generated
// only in slots [D_i, D_i + n*k) of that round (D_i from delay_schedule), so
// it lands in the accumulator at relative delay D_i, just as in the parallel
// units. In every other slot the pair is stalled and outputs 0. Each cycle
// the bit leaving the accumulator is OR-ed with the current product bit and
// written back (in round 0 the old content is dropped, which clears the
// accumulator). In the last round the written-back bits are final: they are
// the output bit-stream `z`, identical to that of unary_mac_or, and are
// counted by prob_estimator.
//
// Interface and timing:
//   * `start` is taken when idle; `busy` then stays high N_SUM*L cycles.
//   * `sel` is the index of the product being generated; b/c must show
//     x_sel/y_sel combinationally and stay stable while `gen` is high.
//   * `gen` is high while the generator pair runs; low busy cycles are stalls.
//   * `z`/`z_valid`: the final output stream, during the last round only.
//   * `done` pulses one cycle after the last busy cycle; `result` holds the
//     ones of z (value = result / (n*k)) until the next start.
// The one generator pair, the accumulator length n*k + D_max and stalling the
// generators between products follow the published design. The published
// text gives the stall between products as D_max; this design stalls
// L - n*k + (D_(i+1) - D_i) = D_max + D_(i+1) - D_i cycles so that each
// product reaches the accumulator at its own delay (the text also requires
// the stall to put "the new summand ... at the right time"); the average
// stall is still about D_max and the total time N_SUM*L. Clearing the
// accumulator in round 0 and emitting z in the last round are this design's.
module unary_mac_or_seq
  import usc_pkg::*;
#(
  parameter int unsigned N_PERIOD = 32,
  parameter int unsigned N_SUM    = 6,
  parameter int unsigned V        = v_max(N_PERIOD, N_SUM),
  parameter int unsigned XW       = bits_for(N_PERIOD),
  parameter int unsigned IW       = bits_for(N_SUM - 1),
  parameter int unsigned CW       = bits_for(total_cycles(N_PERIOD, V, N_SUM))
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [XW-1:0] b,        // ones per n-cycle period of factor b_sel
  input  logic [XW-1:0] c,        // ones per k-cycle period of factor c_sel
  output logic [IW-1:0] sel,
  output logic          gen,
  output logic          busy,
  output logic          z,
  output logic          z_valid,
  output logic          done,
  output logic [CW-1:0] result
);
  localparam int unsigned NK = N_PERIOD * (N_PERIOD - 1);
  localparam int unsigned L  = total_cycles(N_PERIOD, V, N_SUM);   // accumulator length
  localparam int unsigned PW = bits_for(L);
  localparam int unsigned DW = bits_for(d_max(N_PERIOD, V, N_SUM));

  logic          go, last_round, sb, sc, prod, acc_in;
  logic [PW-1:0] pos;
  logic [DW-1:0] d_i;
  logic [L-1:0]  acc;

  assign go         = start && !busy;
  assign last_round = (sel == IW'(N_SUM - 1));

  // Round/slot sequencing and start/done control.
  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      pos  <= '0;
      sel  <= '0;
    end else begin
      done <= 1'b0;
      if (go) begin
        busy <= 1'b1;
        pos  <= '0;
        sel  <= '0;
      end else if (busy) begin
        if (pos == PW'(L - 1)) begin
          pos <= '0;
          if (last_round) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            sel <= sel + 1'b1;
          end
        end else begin
          pos <= pos + 1'b1;
        end
      end
    end
  end

  delay_schedule #(.N_PERIOD(N_PERIOD), .N_SUM(N_SUM), .V(V), .IW(IW), .DW(DW)) u_delay (
    .idx(sel), .delay(d_i)
  );

  assign gen = busy && (PW'(d_i) <= pos) && ({1'b0, pos} < {1'b0, PW'(d_i)} + (PW + 1)'(NK));

  // The single generator pair; each product lasts n*k cycles, a multiple of
  // both periods, so the counters are back at 0 when the next product starts.
  unary_sng #(.PERIOD(N_PERIOD),     .XW(XW)) u_sng_b (
    .clk, .rst, .clear(go), .en(gen), .value(b), .bit_out(sb)
  );
  unary_sng #(.PERIOD(N_PERIOD - 1), .XW(XW)) u_sng_c (
    .clk, .rst, .clear(go), .en(gen), .value(c), .bit_out(sc)
  );
  assign prod = sb & sc;

  // Recirculating accumulator: OR the product into the returning bit.
  assign acc_in = ((sel != '0) && acc[L-1]) || prod;

  always_ff @(posedge clk) begin
    if (busy) acc <= {acc[L-2:0], acc_in};
  end

  assign z       = acc_in;
  assign z_valid = busy && last_round;

  prob_estimator #(.CW(CW)) u_est (
    .clk, .rst, .clear(go), .valid(z_valid), .bit_in(z), .count(result)
  );

  initial begin
    assert (V >= 1 && 2 * V <= N_PERIOD) else $error("unary_mac_or_seq: need 1 <= V <= n/2");
    assert (L >= 2) else $error("unary_mac_or_seq: accumulator too short");
  end

  property p_factors_stable;
    @(posedge clk) disable iff (rst) (gen && $past(gen)) |-> ($stable(b) && $stable(c));
  endproperty
  a_factors_stable: assert property (p_factors_stable)
    else $error("unary_mac_or_seq: b/c changed while the generator pair runs");
endmodule
