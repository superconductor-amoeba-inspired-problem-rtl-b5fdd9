// Self-checking testbench for saps_cell. The testbench plays the excitation
// (phi1..phi4 one cycle each) and the neighbours' phi1 outputs, and checks after
// every iteration:
//   obs (phi1) holds the variable of the previous iteration,
//   with p = 0 the new x equals NOR(left, right) and nothing flips,
//   with p = 1 x is always 1, with init x is always 0,
//   with a moderate p, x = NOR(left, right) | flipped and only 0s flip,
//   x changes only at the phi4 switching.
// The fraction of flips at the moderate p is also compared with p.
module saps_cell_tb;
  import saps_pkg::*;
  localparam prob_t P_MID = prob_t'(64);  // 0.25

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NUM_PHASES-1:0] sw_en;
  bias_t bias;
  logic  obs_left, obs_right, obs, x, flipped;
  logic  x_nor, x_prev, x_seen;
  int    checks = 0, failures = 0, n_zero = 0, n_flip = 0;

  saps_cell #(.SEED(32'hCAFE_0001)) dut (
    .clk, .rst_n, .sw_en, .bias, .obs_left, .obs_right, .obs, .x, .flipped
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%s", msg);
    end
  endtask

  initial begin
    sw_en     = '0;
    bias      = '{init: 1'b0, p_flip: '0};
    obs_left  = 1'b0;
    obs_right = 1'b0;
    x_prev    = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 8000; it++) begin
      // one mode per block of 1000 iterations, in a fixed order
      case ((it / 1000) % 4)
        0: bias = '{init: 1'b0, p_flip: '0};
        1: bias = '{init: 1'b0, p_flip: P_MID};
        2: bias = '{init: 1'b1, p_flip: P_MID};
        default: bias = '{init: 1'b0, p_flip: P_ALWAYS};
      endcase
      x_seen = x;
      for (int ph = 0; ph < NUM_PHASES; ph++) begin
        sw_en     = NUM_PHASES'(1 << ph);
        obs_left  = 1'($urandom);
        obs_right = 1'($urandom);
        if (ph == PH2) x_nor = ~(obs_left | obs_right);
        @(negedge clk);
        if (ph == PH1) check(obs == x_prev, $sformatf("it %0d: phi1 obs=%b expected %b", it, obs, x_prev));
        if (ph != PH4) check(x == x_seen, $sformatf("it %0d: x changed before phi4", it));
      end
      sw_en = '0;
      if (bias.init)
        check(x == 1'b0 && !flipped, $sformatf("it %0d: init gave x=%b", it, x));
      else if (bias.p_flip == '0)
        check(x == x_nor && !flipped, $sformatf("it %0d: p=0 x=%b expected %b", it, x, x_nor));
      else if (bias.p_flip == P_ALWAYS)
        check(x == 1'b1, $sformatf("it %0d: p=1 x=%b", it, x));
      else begin
        check(x == (x_nor | flipped), $sformatf("it %0d: x=%b nor=%b flipped=%b", it, x, x_nor, flipped));
        check(!(flipped && x_nor), $sformatf("it %0d: a 1 was flipped", it));
        if (!x_nor) begin
          n_zero++;
          if (flipped) n_flip++;
        end
      end
      x_prev = x;
    end
    // about 1500 zeros at p = 0.25: expect roughly 375 flips
    check(n_zero > 1000 && n_flip > n_zero / 6 && n_flip < n_zero / 3,
          $sformatf("flip rate %0d / %0d", n_flip, n_zero));
    $display("flip rate %0d / %0d", n_flip, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
