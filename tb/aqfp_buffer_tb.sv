// Self-checking testbench for aqfp_buffer: random data and random phase enables,
// compared every cycle with a reference register kept in the testbench.
module aqfp_buffer_tb;
  logic clk = 1'b0, rst_n = 1'b0, sw_en = 1'b0, d = 1'b0, q;
  logic ref_q;
  int   checks = 0, failures = 0;

  aqfp_buffer dut (.clk, .rst_n, .sw_en, .d, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = 1'b0;
    repeat (2) @(negedge clk);
    checks++;
    if (q !== 1'b0) begin failures++; $display("reset value %b", q); end
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      sw_en = ($urandom_range(0, 3) == 0);
      d     = 1'($urandom);
      @(posedge clk);
      if (sw_en) ref_q = d;
      @(negedge clk);
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("cycle %0d: q=%b expected %b", n, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
