// Self-checking testbench for thermal_noise_source: compares the output with an
// independent xorshift32 model, checks that the state holds while step is low,
// that two seeds give different streams, and that the samples are close to
// uniform (mean and 0/1 balance of the top bit).
module thermal_noise_source_tb;
  import saps_pkg::*;
  localparam logic [31:0] S0 = 32'hDEAD_BEEF;
  localparam logic [31:0] S1 = 32'h0BAD_F00D;

  logic clk = 1'b0, rst_n = 1'b0, step = 1'b0;
  rnd_t rnd0, rnd1;
  logic [31:0] model;
  int   checks = 0, failures = 0, diff = 0;
  longint sum = 0, ones = 0;

  thermal_noise_source #(.SEED(S0)) dut0 (.clk, .rst_n, .step, .rnd(rnd0));
  thermal_noise_source #(.SEED(S1)) dut1 (.clk, .rst_n, .step, .rnd(rnd1));

  always #5 clk = ~clk;

  function automatic logic [31:0] xs(input logic [31:0] v);
    logic [31:0] t;
    t = v;
    t = t ^ (t << 13);
    t = t ^ (t >> 17);
    t = t ^ (t << 5);
    return t;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = S0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (rnd0 !== model[31 -: PROB_W]) begin failures++; $display("seed output wrong"); end
    for (int n = 0; n < 8192; n++) begin
      step = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (step) model = xs(model);
      @(negedge clk);
      checks++;
      if (rnd0 !== model[31 -: PROB_W]) begin
        failures++;
        if (failures < 10) $display("n=%0d rnd=%h expected %h", n, rnd0, model[31 -: PROB_W]);
      end
      if (step) begin
        sum  += rnd0;
        ones += rnd0[PROB_W-1];
      end
      if (rnd0 != rnd1) diff++;
    end
    // about 6144 samples: mean near 127.5, top bit near one half
    checks++;
    if (sum / 6144 < 115 || sum / 6144 > 140) begin failures++; $display("mean off: %0d", sum / 6144); end
    checks++;
    if (ones < 2700 || ones > 3500) begin failures++; $display("top bit ones: %0d", ones); end
    checks++;
    if (diff < 7000) begin failures++; $display("seeds not independent: %0d", diff); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
