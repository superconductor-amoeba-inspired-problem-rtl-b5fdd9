// Self-checking testbench for stochastic_buffer. The random sample is driven by
// the testbench, so every decision is checked exactly: a 1 always passes, a 0
// becomes 1 exactly when rnd < p_flip, init forces 0, and flipped marks only
// 0 -> 1 flips and lasts one cycle. p_flip = 0 and p_flip = 2^PROB_W are covered.
module stochastic_buffer_tb;
  import saps_pkg::*;
  logic  clk = 1'b0, rst_n = 1'b0, sw_en = 1'b0, d = 1'b0;
  bias_t bias;
  rnd_t  rnd;
  logic  q, flipped;
  logic  ref_q, ref_f;
  int    checks = 0, failures = 0, n_flip = 0, n_init = 0, n_pass1 = 0, n_keep0 = 0;

  stochastic_buffer dut (.clk, .rst_n, .sw_en, .d, .bias, .rnd, .q, .flipped);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bias  = '{init: 1'b0, p_flip: '0};
    rnd   = '0;
    ref_q = 1'b0;
    ref_f = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      sw_en = ($urandom_range(0, 1) == 0);
      d     = 1'($urandom);
      rnd   = rnd_t'($urandom);
      case ($urandom_range(0, 9))
        0:       bias = '{init: 1'b1, p_flip: prob_t'($urandom)};
        1:       bias = '{init: 1'b0, p_flip: '0};
        2:       bias = '{init: 1'b0, p_flip: P_ALWAYS};
        default: bias = '{init: 1'b0, p_flip: prob_t'($urandom_range(0, 1 << PROB_W))};
      endcase
      @(posedge clk);
      if (sw_en) begin
        if (bias.init) begin
          ref_q = 1'b0; ref_f = 1'b0; n_init++;
        end else if (d) begin
          ref_q = 1'b1; ref_f = 1'b0; n_pass1++;
        end else if (int'(rnd) < int'(bias.p_flip)) begin
          ref_q = 1'b1; ref_f = 1'b1; n_flip++;
        end else begin
          ref_q = 1'b0; ref_f = 1'b0; n_keep0++;
        end
      end else begin
        ref_f = 1'b0;
      end
      @(negedge clk);
      checks++;
      if (q !== ref_q || flipped !== ref_f) begin
        failures++;
        if (failures < 10)
          $display("n=%0d init=%b p=%0d d=%b rnd=%0d: q=%b/%b flipped=%b/%b", n, bias.init,
                   bias.p_flip, d, rnd, q, ref_q, flipped, ref_f);
      end
    end
    checks++;
    if (n_flip == 0 || n_init == 0 || n_pass1 == 0 || n_keep0 == 0) begin
      failures++;
      $display("case not covered: flip=%0d init=%0d pass1=%0d keep0=%0d", n_flip, n_init, n_pass1, n_keep0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
