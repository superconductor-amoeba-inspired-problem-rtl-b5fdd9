// Workload testbench for larger rings, built by repeating the same cell.
//
// N = 8: the same measurement sequence as the N = 4 testbench (200 sequences of
// 1000 iterations per bias setting, after initialising to all 0). Each iteration
// is checked against the NOR update rule with the reported fluctuations; deadlock
// at p = 0 and the fixed state at p = 1 are checked, and at a moderate p solutions
// must be found quickly and several different solutions must appear from the
// same initial state.
// N = 6: the worked example of the search. From all 0 with p = 0 the ring must
// alternate between all 0 and all 1 for ten iterations; with a moderate p it must
// reach the solutions (1,0,1,0,1,0) and (0,1,0,0,1,0), which the example reaches,
// and every visited solution must satisfy all six constraints.
module saps_ring_sizes_tb;
  import saps_pkg::*;

  localparam int N     = 8;
  localparam int SEQS  = 200;
  localparam int ITERS = 1000;
  localparam int NP    = 6;
  localparam int PSET [NP] = '{0, 2, 16, 32, 128, 256};  // p = PSET / 256

  logic         clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  bias_t        bias;
  logic [N-1:0] x, v_rz, flipped;
  logic [15:0]  v_uv [N];
  logic         iter_done;

  saps_top #(.N(N)) dut (.clk, .rst_n, .run, .bias, .x, .v_rz, .v_uv, .flipped, .iter_done);

  // second solver, N = 6
  localparam int N6 = 6;
  bias_t         bias6;
  logic [N6-1:0] x6, v_rz6, flipped6;
  logic [15:0]   v_uv6 [N6];
  logic          iter_done6;

  saps_top #(.N(N6), .SEED_BASE(32'h0606_0606)) dut6 (
    .clk, .rst_n, .run, .bias(bias6), .x(x6), .v_rz(v_rz6), .v_uv(v_uv6),
    .flipped(flipped6), .iter_done(iter_done6)
  );

  function automatic logic [N6-1:0] nor6(input logic [N6-1:0] v);
    logic [N6-1:0] r;
    for (int i = 0; i < N6; i++) r[i] = ~(v[(i + N6 - 1) % N6] | v[(i + 1) % N6]);
    return r;
  endfunction

  task automatic next6();
    do @(negedge clk); while (!iter_done6);
  endtask

  // Worked example with six variables; written as x[5:0], (1,0,1,0,1,0) is
  // 6'b010101 and (0,1,0,0,1,0) is 6'b010010.
  task automatic run_n6();
    logic [N6-1:0] prev6;
    int            seen_a = 0, seen_b = 0, n_sol6 = 0;
    bias6 = '{init: 1'b1, p_flip: '0};
    repeat (2) next6();
    check(x6 === '0, "N=6 init");
    bias6.init = 1'b0;
    for (int t = 1; t <= 10; t++) begin
      next6();
      check(x6 === ((t % 2) ? '1 : '0), $sformatf("N=6 p=0 t=%0d x=%b, expected alternation", t, x6));
    end
    for (int s = 0; s < 200; s++) begin
      bias6 = '{init: 1'b1, p_flip: prob_t'(32)};
      repeat (2) next6();
      bias6.init = 1'b0;
      prev6 = x6;
      for (int t = 1; t <= 100; t++) begin
        next6();
        check(x6 === (nor6(prev6) | flipped6) && (flipped6 & nor6(prev6)) == '0,
              $sformatf("N=6 update x=%b prev=%b flipped=%b", x6, prev6, flipped6));
        if (nor6(x6) == x6) begin
          n_sol6++;
          if (x6 == 6'b010101) seen_a++;
          if (x6 == 6'b010010) seen_b++;
        end
        prev6 = x6;
      end
    end
    $display("N=6: iterations in a solution %0d, in (1,0,1,0,1,0) %0d, in (0,1,0,0,1,0) %0d", n_sol6, seen_a, seen_b);
    check(seen_a > 0, "N=6 solution (1,0,1,0,1,0) never reached");
    check(seen_b > 0, "N=6 solution (0,1,0,0,1,0) never reached");
  endtask

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_init = 0, n_deadlock = 0, n_escape = 0, n_hold = 0, n_break = 0, n_fixed = 0, n_flip = 0;
  // cycle counter for the iteration period
  longint cyc = 0, last_done = -1;
  always @(posedge clk) cyc++;

  initial begin : watchdog
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  function automatic logic [N-1:0] nor_update(input logic [N-1:0] v);
    logic [N-1:0] r;
    for (int i = 0; i < N; i++) r[i] = ~(v[(i + N - 1) % N] | v[(i + 1) % N]);
    return r;
  endfunction

  function automatic logic satisfied(input logic [N-1:0] v);
    return nor_update(v) == v;
  endfunction

  function automatic logic deadlocked(input logic [N-1:0] v);
    return v == '0 || v == '1;
  endfunction

  // Wait for the next iteration; sample in the middle of the cycle.
  task automatic next_iteration();
    do @(negedge clk); while (!iter_done);
    if (last_done >= 0)
      check(cyc - last_done == 4, $sformatf("iteration period %0d cycles", cyc - last_done));
    last_done = cyc;
    // return-to-zero readout: pulses follow x now, zero two cycles later
    check(v_rz === x, $sformatf("readout %b for x=%b", v_rz, x));
    for (int i = 0; i < N; i++)
      check(v_uv[i] == (x[i] ? 16'd100 : 16'd0), "analog readout level");
  endtask

  // statistics per bias setting
  int     sat_at [NP][11];
  longint first_sum [NP];
  int     never [NP];
  longint sat_iters [NP];
  int     sol_count [logic [N-1:0]];

  initial begin
    logic [N-1:0] prev, expect_nor;
    int           first;
    logic         zero_phase_seen;

    bias  = '{init: 1'b1, p_flip: '0};
    bias6 = '{init: 1'b1, p_flip: '0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run   = 1'b1;

    for (int pi = 0; pi < NP; pi++) begin
      first_sum[pi] = 0;
      never[pi]     = 0;
      sat_iters[pi] = 0;
      for (int k = 0; k <= 10; k++) sat_at[pi][k] = 0;
      for (int s = 0; s < SEQS; s++) begin
        // initialisation with negative bias
        bias = '{init: 1'b1, p_flip: prob_t'(PSET[pi])};
        repeat (2) next_iteration();
        check(x === '0, $sformatf("init left x=%b", x));
        if (x == '0) n_init++;
        bias.init = 1'b0;
        prev  = x;
        first = 0;
        for (int t = 1; t <= ITERS; t++) begin
          next_iteration();
          expect_nor = nor_update(prev);
          check(x === (expect_nor | flipped), $sformatf("p=%0d t=%0d x=%b prev=%b flipped=%b", PSET[pi], t, x, prev, flipped));
          check((flipped & expect_nor) == '0, "a 1 was flipped");
          n_flip += $countones(flipped);
          if (PSET[pi] == 0) begin
            check(flipped == '0, "fluctuation at p = 0");
            check(x == ~prev && deadlocked(x), $sformatf("p=0 t=%0d x=%b not alternating", t, x));
            if (x == ~prev && deadlocked(x)) n_deadlock++;
          end
          if (PSET[pi] == 256) begin
            check(x === '1, $sformatf("p=1 x=%b", x));
            if (x == '1) n_fixed++;
          end
          if (satisfied(x)) begin
            sat_iters[pi]++;
            if (first == 0) first = t;
            if (deadlocked(prev)) n_escape++;
            if (x == prev) n_hold++;
            if (pi == 3) begin
              if (sol_count.exists(x)) sol_count[x]++;
              else sol_count[x] = 1;
            end
          end else if (satisfied(prev)) begin
            n_break++;
          end
          if (t <= 10) sat_at[pi][t] += int'(satisfied(x));
          prev = x;
        end
        if (first == 0) begin never[pi]++; first = ITERS; end
        first_sum[pi] += first;
      end
      $display("p=%0d/256: mean iterations to first solution %0.2f, P_sat(t=5)=%0.3f P_sat(t=10)=%0.3f, time in solutions %0.3f, sequences without solution %0d",
               PSET[pi], real'(first_sum[pi]) / SEQS, real'(sat_at[pi][5]) / SEQS,
               real'(sat_at[pi][10]) / SEQS, real'(sat_iters[pi]) / (SEQS * ITERS), never[pi]);
    end

    // deterministic and fixed settings never reach a solution
    check(sat_iters[0] == 0, "solution found at p = 0");
    check(sat_iters[NP-1] == 0, "solution found at p = 1");
    // moderate fluctuation finds solutions within a few iterations; very small
    // fluctuation takes far longer
    check(real'(first_sum[3]) / SEQS < 40.0, "moderate p is slow to find a solution");
    check(first_sum[1] > 3 * first_sum[3], "small p not slower than moderate p");
    check(real'(sat_at[3][10]) / SEQS > 0.03, "P_sat(10) at moderate p too low");
    // several different solutions are visited from the same initial state
    check(sol_count.num() >= 2, $sformatf("%0d distinct solutions", sol_count.num()));
    foreach (sol_count[v]) $display("solution x=%b seen in %0d iterations", v, sol_count[v]);

    $display("mechanisms: init %0d deadlock %0d escape %0d hold %0d break %0d fixed %0d flips %0d",
             n_init, n_deadlock, n_escape, n_hold, n_break, n_fixed, n_flip);
    check(n_init > 0, "initialisation never happened");
    check(n_deadlock > 0, "deadlock never happened");
    check(n_escape > 0, "escape from deadlock never happened");
    check(n_hold > 0, "a solution was never held");
    check(n_break > 0, "a solution was never left");
    check(n_fixed > 0, "fixed state never happened");
    check(n_flip > 0, "no fluctuation");

    run_n6();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
