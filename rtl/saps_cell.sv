// saps_cell: one variable x_i of the amoeba-inspired NOR-problem solver.
//
// A chain of four adiabatic gates, one per excitation phase, performs one search
// iteration for x_i:
//   phi1  buffer/splitter  obs   <= x_i                (observe the variable and
//                                                        fan it out to the two
//                                                        neighbouring cells)
//   phi2  NOR gate         X_i   <= NOR(obs_{i-1}, obs_{i+1})   (constraint update)
//   phi3  buffer           mid   <= X_i
//   phi4  biased buffer    x_i   <= mid, or 1 by fluctuation   (stochastic step)
// The phi4 buffer draws its random samples from its own noise source, seeded with
// SEED, which advances once per phi4 switching.
// Interface: clk, rst_n, sw_en (one-hot phase switching from the excitation), bias,
// obs_left / obs_right (phi1 outputs of cells i-1 and i+1), obs (this cell's phi1
// output), x (phi4 state, the variable), flipped (fluctuation pulse).
// Timing: x changes once per four-cycle iteration, one cycle after phi4 switched.
// Following the description: the gate chain and its phases. Own choice: the
// random-number source that replaces thermal noise.
module saps_cell
  import saps_pkg::*;
#(
  parameter logic [31:0] SEED = 32'h2545_F491
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NUM_PHASES-1:0] sw_en,
  input  bias_t                 bias,
  input  logic                  obs_left,
  input  logic                  obs_right,
  output logic                  obs,
  output logic                  x,
  output logic                  flipped
);

  logic x_int;   // intermediate state X_i (phi2)
  logic mid;     // phi3 buffer
  rnd_t rnd;

  aqfp_buffer u_ph1 (
    .clk, .rst_n, .sw_en(sw_en[PH1]), .d(x), .q(obs)
  );

  aqfp_nor u_ph2 (
    .clk, .rst_n, .sw_en(sw_en[PH2]), .a(obs_left), .b(obs_right), .q(x_int)
  );

  aqfp_buffer u_ph3 (
    .clk, .rst_n, .sw_en(sw_en[PH3]), .d(x_int), .q(mid)
  );

  thermal_noise_source #(.SEED(SEED)) u_noise (
    .clk, .rst_n, .step(sw_en[PH4]), .rnd
  );

  stochastic_buffer u_ph4 (
    .clk, .rst_n, .sw_en(sw_en[PH4]), .d(mid), .bias, .rnd, .q(x), .flipped
  );

endmodule
