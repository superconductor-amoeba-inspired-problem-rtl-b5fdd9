// dc_squid_readout: behavioural model of the dc-SQUID that reads out one variable.
//
// This is a behavioural model, not synthesizable logic in the sense of the real
// part: the real readout is an analog dc superconducting quantum interference
// device magnetically coupled to a phi4 buffer, whose voltage rises when the
// buffer holds logic 1. Because the buffer only carries current while it is
// excited, the voltage is unipolar return-to-zero: a pulse of height V_HIGH_UV
// for each iteration in which x_i = 1, and zero between excitations and for 0.
// The model gives that waveform as an amplitude in whole microvolts (v_uv) and as
// the thresholded logic level a room-temperature comparator would produce (v_rz).
// Interface: x (state of the coupled buffer), excited (that buffer is excited),
// v_rz, v_uv. Timing: combinational.
// Following the description: magnetic coupling to the phi4 buffer and RZ
// encoding. Own choice: the amplitude and the logic-level output.
module dc_squid_readout #(
  parameter int unsigned V_HIGH_UV = 100
) (
  input  logic x,
  input  logic excited,
  output logic v_rz,
  output logic [15:0] v_uv
);

  assign v_rz = x & excited;
  assign v_uv = v_rz ? 16'(V_HIGH_UV) : 16'd0;

endmodule
