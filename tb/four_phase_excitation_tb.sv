// Self-checking testbench for four_phase_excitation: phases switch one at a time
// in the order phi1, phi2, phi3, phi4 while run is high, hold while run is low,
// each phase stays excited for two cycles (half a period) and iter_done pulses
// once per four running cycles, in the cycle after phi4 switched.
module four_phase_excitation_tb;
  import saps_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic [NUM_PHASES-1:0] sw_en, excited, prev_sw;
  logic iter_done;
  int   exp_ph, checks = 0, failures = 0, n_done = 0, n_run = 0;

  four_phase_excitation dut (.clk, .rst_n, .run, .sw_en, .excited, .iter_done);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_ph  = 0;
    prev_sw = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (sw_en !== '0 || excited !== '0 || iter_done !== 1'b0) begin failures++; $display("reset state wrong"); end
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      run = ($urandom_range(0, 4) != 0);
      #1;
      // iter_done marks the cycle after phi4 switched
      checks++;
      if (iter_done !== prev_sw[PH4]) begin failures++; $display("n=%0d iter_done=%b", n, iter_done); end
      if (iter_done) n_done++;
      checks++;
      if (run) begin
        if (sw_en !== NUM_PHASES'(1 << exp_ph)) begin
          failures++; $display("n=%0d sw_en=%b expected phase %0d", n, sw_en, exp_ph + 1);
        end
      end else if (sw_en !== '0) begin
        failures++; $display("n=%0d switching while stopped", n);
      end
      checks++;
      if (excited !== (sw_en | prev_sw)) begin failures++; $display("n=%0d excited=%b", n, excited); end
      prev_sw = sw_en;
      if (run) begin exp_ph = (exp_ph + 1) % 4; n_run++; end
    end
    @(negedge clk);
    if (iter_done) n_done++;
    checks++;
    if (n_done != n_run / 4) begin failures++; $display("iterations %0d for %0d running cycles", n_done, n_run); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
