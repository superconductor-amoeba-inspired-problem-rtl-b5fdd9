// End-to-end testbench for saps_top at its default size (N = 4).
//
// It repeats the measurement sequence used to characterise the solver: for each
// bias setting, 200 sequences, each one initialising the variables to all 0 with
// the negative bias and then running 1000 iterations with a positive bias. The
// bias settings sweep the flip probability from 0 (deterministic) through
// moderate values to 1 (fixed state).
//
// Every iteration is checked against the update rule, computed here from the
// previous variables: x_i(t+1) = NOR(x_{i-1}(t), x_{i+1}(t)) | flip_i, where a flip
// may only turn a 0 into a 1 (reported by the design's flipped output). Also
// checked: one iteration per four clock cycles, the return-to-zero readout,
// deterministic deadlock at p = 0 (strict all-0 / all-1 alternation, never a
// solution), the fixed all-1 state at p = 1, and at a moderate p that solutions
// are reached within a few iterations on average, that both solutions appear with
// similar frequencies and that solutions are kept for a while and then left.
// Each mechanism (initialisation, deadlock, escape from deadlock, holding a
// solution, leaving it, fixed state, fluctuation) is counted and must occur.
module saps_top_tb;
  import saps_pkg::*;

  localparam int N     = 4;
  localparam int SEQS  = 200;
  localparam int ITERS = 1000;
  localparam int NP    = 6;
  localparam int PSET [NP] = '{0, 2, 16, 32, 128, 256};  // p = PSET / 256

  logic         clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  bias_t        bias;
  logic [N-1:0] x, v_rz, flipped;
  logic [15:0]  v_uv [N];
  logic         iter_done;

  saps_top dut (.clk, .rst_n, .run, .bias, .x, .v_rz, .v_uv, .flipped, .iter_done);

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

    bias = '{init: 1'b1, p_flip: '0};
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
    check(real'(first_sum[3]) / SEQS < 12.0, "moderate p is slow to find a solution");
    check(first_sum[1] > 3 * first_sum[3], "small p not slower than moderate p");
    check(real'(sat_at[3][10]) / SEQS > 0.25, "P_sat(10) at moderate p too low");
    // both solutions appear, with similar frequencies (N = 4: 0101 and 1010)
    check(sol_count.num() == 2, $sformatf("%0d distinct solutions", sol_count.num()));
    foreach (sol_count[v]) begin
      $display("solution x=%b seen in %0d iterations", v, sol_count[v]);
      check(real'(sol_count[v]) / real'(sat_iters[3]) > 0.35, "solutions not similarly frequent");
    end

    $display("mechanisms: init %0d deadlock %0d escape %0d hold %0d break %0d fixed %0d flips %0d",
             n_init, n_deadlock, n_escape, n_hold, n_break, n_fixed, n_flip);
    check(n_init > 0, "initialisation never happened");
    check(n_deadlock > 0, "deadlock never happened");
    check(n_escape > 0, "escape from deadlock never happened");
    check(n_hold > 0, "a solution was never held");
    check(n_break > 0, "a solution was never left");
    check(n_fixed > 0, "fixed state never happened");
    check(n_flip > 0, "no fluctuation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
