// four_phase_excitation: digital stand-in for the four-phase AC excitation that
// powers and clocks the adiabatic gates.
//
// In the circuit two sinusoidal excitation currents 90 degrees apart plus a dc
// offset excite four gate phases phi1..phi4 in turn; a gate switches (takes its
// logic state from its input) when its excitation rises and keeps that state while
// it stays excited, i.e. for half an excitation period. Here one quarter period is
// one cycle of clk. A 2-bit phase counter advances every cycle while `run` is high.
//
// Outputs (iter_done registered; sw_en and excited decoded from the phase
// register and `run`):
//   sw_en    : one-hot, sw_en[k] = gates of phase k+1 switch this cycle (run only);
//   excited  : excited[k] = gates of phase k+1 currently hold valid data, i.e. they
//              switched in this cycle or in the previous one (half a period);
//   iter_done: one-cycle pulse in the cycle after phi4 switched, i.e. when a new
//              set of variables x_i becomes visible; one pulse per 4 cycles.
// Reset (rst_n low) returns to phase phi1 with nothing excited.
// Following the description: four phases, phase order and half-period excitation.
// Own choice: one clock cycle per quarter period and the `run` gate.
module four_phase_excitation
  import saps_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  run,
  output logic [NUM_PHASES-1:0] sw_en,
  output logic [NUM_PHASES-1:0] excited,
  output logic                  iter_done
);

  phase_e                phase_q;
  logic [NUM_PHASES-1:0] last_sw_q;
  logic                  done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q   <= PH1;
      last_sw_q <= '0;
      done_q    <= 1'b0;
    end else begin
      last_sw_q <= sw_en;
      done_q    <= sw_en[PH4];
      if (run) phase_q <= phase_e'(phase_q + 2'd1);
    end
  end

  always_comb begin
    sw_en = '0;
    if (run) sw_en[phase_q] = 1'b1;
  end

  assign excited   = sw_en | last_sw_q;
  assign iter_done = done_q;

  // Exactly one phase switches per running cycle.
  a_onehot : assert property (@(posedge clk) disable iff (!rst_n) run |-> $onehot(sw_en));

endmodule
