// saps_pkg: types and constants shared by the amoeba-inspired NOR-problem solver.
//
// The solver is built from gates that are clocked in four excitation phases
// (phi1..phi4, 90 degrees apart). Each phase is one step of the fast clock here,
// so one solver iteration takes four clock cycles.
//
// The analog bias current I_b that sets the switching probability of the phi4
// buffers is represented by bias_t:
//   init   = 1 : strongly negative I_b, every phi4 buffer is forced to logic 0
//                (initialisation of the variables);
//   p_flip     : probability that a logic 0 arriving at a phi4 buffer ends up as
//                logic 1, in units of 2^-PROB_W. 0 means I_b = 0 (fully
//                deterministic), 2^PROB_W means I_b so large that every buffer
//                always switches to 1 (the "fixed" state).
// The encoding of the bias as a binary probability and PROB_W are choices of this
// design; the physical mapping from current to probability is not modelled.
package saps_pkg;

  // Resolution of the flip probability, in bits.
  localparam int unsigned PROB_W = 8;

  // Flip probability: value / 2**PROB_W, one extra bit so that 1.0 is representable.
  typedef logic [PROB_W:0]   prob_t;
  // One random sample drawn per phi4 switching event.
  typedef logic [PROB_W-1:0] rnd_t;

  localparam prob_t P_ALWAYS = prob_t'(1) << PROB_W;

  typedef struct packed {
    logic  init;    // negative bias: force all variables to 0
    prob_t p_flip;  // positive bias: probability of a 0 -> 1 flip
  } bias_t;

  // Excitation phases.
  typedef enum logic [1:0] {
    PH1 = 2'd0,  // buffers observe the variables
    PH2 = 2'd1,  // NOR gates compute X_i
    PH3 = 2'd2,  // intermediate buffers
    PH4 = 2'd3   // biased buffers hold the variables x_i
  } phase_e;

  localparam int unsigned NUM_PHASES = 4;

endpackage
