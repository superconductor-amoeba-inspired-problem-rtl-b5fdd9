// Self-checking testbench for the dc_squid_readout model: the readout pulses only
// when the coupled buffer holds 1 and is excited (return to zero otherwise), at
// the chosen amplitude.
module dc_squid_readout_tb;
  localparam int unsigned V = 42;
  logic x, excited, v_rz;
  logic [15:0] v_uv;
  int   checks = 0, failures = 0;

  dc_squid_readout #(.V_HIGH_UV(V)) dut (.x, .excited, .v_rz, .v_uv);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 3; r++) begin
      for (int k = 0; k < 4; k++) begin
        {x, excited} = 2'(k);
        #10;
        checks++;
        if (v_rz !== (k == 3)) begin failures++; $display("x=%b excited=%b v_rz=%b", x, excited, v_rz); end
        checks++;
        if (v_uv != ((k == 3) ? 16'(V) : 16'd0)) begin failures++; $display("x=%b excited=%b v_uv=%0d", x, excited, v_uv); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
