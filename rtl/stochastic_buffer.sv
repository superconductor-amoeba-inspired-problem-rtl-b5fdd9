// stochastic_buffer: the phi4 buffer with offset bias current I_b that holds a
// variable x_i and introduces the stochastic step of the amoeba-inspired search.
//
// A positive bias current has the polarity of logic 1, so a 1 from the phi3 buffer
// is always passed on, while a 0 is weakened and ends up as 1 with probability p
// (the flip probability chosen by I_b). This gives the update rule
//   x_i(t+1) = 1                     if X_i(t+1) = 1,
//   x_i(t+1) = 1 with probability p  if X_i(t+1) = 0 (else 0),
// with one p for both "a 1 -> 0 change fails" and "keeping a 0 fails", since both
// come from the same bias current. A strongly negative bias (bias.init) forces the
// buffer to 0, which initialises the variables. p = 0 makes the gate an ordinary
// buffer; p = 1 (P_ALWAYS) fixes it at 1.
// The random decision compares a fresh sample `rnd` (uniform 0..2^PROB_W-1) with
// bias.p_flip: flip when rnd < p_flip.
// Interface: clk, asynchronous active-low reset to 0, sw_en (phi4 switching), d
// (from phi3), bias, rnd, q (= x_i), flipped (pulse: the last switching turned a 0
// into a 1 by fluctuation).
// Timing: q and flipped change one cycle after the cycle in which sw_en was high;
// flipped is a one-cycle pulse.
// Following the description: 1 passes, 0 flips with a bias-controlled probability,
// negative bias initialises. Own choice: the binary probability encoding and the
// flipped status output.
module stochastic_buffer
  import saps_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  sw_en,
  input  logic  d,
  input  bias_t bias,
  input  rnd_t  rnd,
  output logic  q,
  output logic  flipped
);

  logic fluct;

  // rnd is at most 2^PROB_W-1, so p_flip = 2^PROB_W always flips.
  assign fluct = ({1'b0, rnd} < bias.p_flip);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q       <= 1'b0;
      flipped <= 1'b0;
    end else if (sw_en) begin
      if (bias.init) begin
        q       <= 1'b0;
        flipped <= 1'b0;
      end else begin
        q       <= d | fluct;
        flipped <= ~d & fluct;
      end
    end else begin
      flipped <= 1'b0;
    end
  end

endmodule
