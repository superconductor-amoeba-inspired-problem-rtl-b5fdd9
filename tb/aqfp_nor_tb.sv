// Self-checking testbench for aqfp_nor: random inputs and phase enables; the
// expected output is the NOR truth table applied only in switching cycles.
module aqfp_nor_tb;
  logic clk = 1'b0, rst_n = 1'b0, sw_en = 1'b0, a = 1'b0, b = 1'b0, q;
  logic ref_q;
  int   checks = 0, failures = 0;
  int   seen [4];

  aqfp_nor dut (.clk, .rst_n, .sw_en, .a, .b, .q);

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
    foreach (seen[k]) seen[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      sw_en = ($urandom_range(0, 2) == 0);
      a     = 1'($urandom);
      b     = 1'($urandom);
      @(posedge clk);
      if (sw_en) begin
        // truth table: only 00 gives 1
        ref_q = (a == 1'b0 && b == 1'b0);
        seen[{a, b}]++;
      end
      @(negedge clk);
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("cycle %0d: a=%b b=%b q=%b expected %b", n, a, b, q, ref_q);
      end
    end
    foreach (seen[k]) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("input %0d never switched", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
