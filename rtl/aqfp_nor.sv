// aqfp_nor: two-input adiabatic NOR gate switched in excitation phase phi2.
//
// It computes the intermediate state of a variable, X_i = NOR(x_{i-1}, x_{i+1}):
// a variable whose two neighbours are both 0 is pushed to 1, otherwise to 0. Like
// every adiabatic gate it latches its result when its phase switches and holds it
// while excited; here that is a register loaded when `sw_en` is high.
// Interface: clk, asynchronous active-low reset to 0, sw_en, inputs a and b, q.
// Timing: q = NOR(a, b) one cycle after the cycle in which sw_en was high.
// Following the description: the NOR function in phase phi2. Own choice: the
// reset value 0 (the gate's inner construction from majority logic is not
// modelled).
module aqfp_nor (
  input  logic clk,
  input  logic rst_n,
  input  logic sw_en,
  input  logic a,
  input  logic b,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= 1'b0;
    else if (sw_en) q <= ~(a | b);
  end

endmodule
