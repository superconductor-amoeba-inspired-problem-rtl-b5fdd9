// saps_top: superconductor amoeba-inspired problem solver for the NOR problem.
//
// The NOR problem asks for a ring of N bits with x_i = NOR(x_{i-1}, x_{i+1})
// (indices wrap around). The solver runs the amoeba-inspired search: every
// iteration it observes all variables, updates all of them at once by the NOR
// rule (a variable that meets its constraint keeps its value, one that does not is
// flipped), and lets the update fail at random by turning some 0s into 1s. Without
// the random step the ring is stuck alternating between all-0 and all-1
// (deadlock); with it, it falls into a satisfying state, stays there for a while
// and later leaves it again, visiting several solutions.
//
// Structure: N saps_cell instances wired as a ring (each NOR gate sees the phi1
// buffers of its two neighbours), one four_phase_excitation that clocks all of
// them, a common bias input for every phi4 buffer, and one dc_squid_readout per
// variable. Growing N repeats the same cell.
//
// Interface:
//   clk, rst_n  quarter-period clock; asynchronous reset of all gates to 0
//   run         excitation on
//   bias        common bias: init forces all x_i to 0; p_flip sets the flip
//               probability of a 0 in the phi4 buffers (see saps_pkg)
//   x           current variables, x[i-1] is x_i
//   v_rz        return-to-zero readout pulses, one per variable
//   v_uv        the same readout as analog levels in microvolts (model only)
//   flipped     per variable, a 0 was turned into 1 by fluctuation last iteration
//   iter_done   pulse when a new x is visible (every fourth cycle while running)
// Timing: one iteration takes four clock cycles; x changes only in the cycle
// where iter_done is high.
// Following the description: N = 4, the cell ring, the phases and the bias
// behaviour. Own choice: clocking, reset, the digital bias code and the
// pseudo-random sources (one per cell, seeds SEED_BASE + i * 0x9E3779B9).
module saps_top
  import saps_pkg::*;
#(
  parameter int unsigned N         = 4,
  parameter logic [31:0] SEED_BASE = 32'h1234_5678
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         run,
  input  bias_t        bias,
  output logic [N-1:0] x,
  output logic [N-1:0] v_rz,
  output logic [15:0]  v_uv [N],
  output logic [N-1:0] flipped,
  output logic         iter_done
);

  logic [NUM_PHASES-1:0] sw_en;
  logic [NUM_PHASES-1:0] excited;
  logic [N-1:0]          obs;

  four_phase_excitation u_exc (
    .clk, .rst_n, .run, .sw_en, .excited, .iter_done
  );

  for (genvar i = 0; i < N; i++) begin : g_cell
    localparam int unsigned L = (i + N - 1) % N;
    localparam int unsigned R = (i + 1) % N;

    saps_cell #(.SEED(SEED_BASE + 32'(i) * 32'h9E37_79B9)) u_cell (
      .clk, .rst_n, .sw_en, .bias,
      .obs_left (obs[L]),
      .obs_right(obs[R]),
      .obs      (obs[i]),
      .x        (x[i]),
      .flipped  (flipped[i])
    );

    dc_squid_readout u_readout (
      .x(x[i]), .excited(excited[PH4]), .v_rz(v_rz[i]), .v_uv(v_uv[i])
    );
  end

endmodule
