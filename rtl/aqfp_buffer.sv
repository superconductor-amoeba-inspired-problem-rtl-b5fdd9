// aqfp_buffer: one adiabatic buffer (or 1-to-n splitter) clocked by an excitation
// phase.
//
// An adiabatic buffer takes the polarity of its input current when its excitation
// rises and stores it as a flux quantum in one of its two loops; the output current
// polarity is the logic value. In this digital model the gate is a register that
// loads `d` in the cycle its phase switches (`sw_en` high) and holds the value until
// the phase switches again. Its output `q` feeds every gate of the next phase, so
// one instance also stands for a splitter with any fan-out.
// Interface: clk, asynchronous active-low reset to logic 0, sw_en, d, q.
// Timing: q shows d one cycle after the cycle in which sw_en was high.
// Following the description: the buffer function and phase clocking. Own choice:
// the reset value 0.
module aqfp_buffer (
  input  logic clk,
  input  logic rst_n,
  input  logic sw_en,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= 1'b0;
    else if (sw_en) q <= d;
  end

endmodule
