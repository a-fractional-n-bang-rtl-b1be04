// tb_bbpll_gs_params -- effect of the gear-shift parameters q, m and P.
//
// Seven closed loops (bbpll_loop_harness) run side by side, each with one
// gear-shift setting; the first is the default (q = 2, m = 32, P = 1/8):
//   q = 2, 4, 8 at m = 32, P = 1/8
//   m = 16, 8   at q = 2,  P = 1/8
//   P = 1/4, 1/16 at q = 2, m = 32
// Each loop is reset on the 9.5 GHz channel, acquires it, and then switches
// to 8.75 GHz with AFS and the type-II gear shift. Measured per loop:
//   * the locking time (last cycle outside +/-650 kHz before 600 cycles
//     inside),
//   * the gear-shift steps from the last boost to the steady-state gains,
//     which must be ceil(11 / log2 q): alpha falls from 2^-1 to 2^-12,
//   * the cycles from the last boost to the steady-state gains, which
//     cannot be fewer than m per step (each step needs a fresh window of m
//     samples).
// The default, q = 4, m = 16 and both P variants must lock within 1000
// cycles; q = 4 must lock faster than q = 2 (fewer steps) and q = 8 slower
// (the abrupt scaling makes the loop overshoot), as the reference analysis
// predicts. The m = 8 setting, which that analysis expects to lose
// robustness, only has its result printed.
module tb_bbpll_gs_params;
  import bbpll_pkg::*;
  localparam int NCFG = 7;
  localparam int QL [NCFG] = '{1, 2, 3, 1, 1, 1, 1};
  localparam int MM [NCFG] = '{32, 32, 32, 16, 8, 32, 32};
  localparam int TH [NCFG] = '{4, 4, 4, 2, 1, 8, 2};
  localparam bit MUST_LOCK [NCFG] = '{1, 1, 0, 1, 0, 1, 1};
  localparam int MAX_CYC = 8000;

  logic clk = 0;
  always #2 clk = ~clk;

  int checks = 0, failures = 0;
  int lock_t [NCFG];
  int steps  [NCFG];
  int gs_len [NCFG];
  bit done   [NCFG];

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    logic rst_n = 0, switch_req = 0, gs_type2 = 1, afs_en = 1;
    fcw_t fcw_target = fcw_t'(38) <<< FCW_FRAC;
    real  freq;
    logic gs_settled, gs_boost, gs_step, afs_busy, aux_fire;

    bbpll_loop_harness #(
      .GS_Q_LOG2 (QL[i]),
      .GS_M      (MM[i]),
      .GS_THRESH (TH[i])
    ) u_loop (.*);

    initial begin
      int good, cyc, last_bad, last_boost, n_step, last_unsettled;
      done[i] = 0;
      repeat (3) @(posedge clk);
      @(negedge clk) rst_n = 1;
      repeat (2000) @(posedge clk);
      fcw_target = fcw_t'(35) <<< FCW_FRAC;
      @(negedge clk) switch_req = 1;
      @(negedge clk) switch_req = 0;
      good = 0; cyc = 0; last_bad = 0; last_boost = 0; n_step = 0; last_unsettled = 0;
      while ((good < 600 || !gs_settled) && cyc < MAX_CYC) begin
        @(posedge clk); #2;
        cyc++;
        if (gs_boost) begin last_boost = cyc; n_step = 0; end
        if (gs_step) n_step++;
        if (!gs_settled) last_unsettled = cyc;
        if (afs_busy || freq - 8.75e9 > 650.0e3 || freq - 8.75e9 < -650.0e3) begin
          good = 0; last_bad = cyc;
        end else good++;
      end
      lock_t[i] = (good >= 600) ? last_bad : MAX_CYC;
      steps[i]  = n_step;
      gs_len[i] = last_unsettled - last_boost + 1;
      done[i] = 1;
    end
  end

  initial begin
    int exp_steps;
    wait (done.and() == 1'b1);
    for (int i = 0; i < NCFG; i++) begin
      exp_steps = (11 + QL[i] - 1) / QL[i];
      $display("q = %0d, m = %0d, P = %0d/%0d: locking %0d cycles (%0.2f us), %0d gear-shift steps in %0d cycles after the last boost",
               1 << QL[i], MM[i], TH[i], MM[i], lock_t[i], real'(lock_t[i]) * 4.0e-3, steps[i], gs_len[i]);
      if (MUST_LOCK[i]) begin
        checks++;
        if (lock_t[i] > 1000) begin
          failures++; $display("FAIL config %0d: locking time %0d", i, lock_t[i]);
        end
      end
      if (lock_t[i] < MAX_CYC) begin
        checks++;
        if (steps[i] != exp_steps) begin
          failures++; $display("FAIL config %0d: %0d steps, expected %0d", i, steps[i], exp_steps);
        end
        checks++;
        if (gs_len[i] < MM[i] * exp_steps) begin
          failures++; $display("FAIL config %0d: gear shift took %0d cycles, fewer than m * N = %0d",
                               i, gs_len[i], MM[i] * exp_steps);
        end
      end
    end
    // q = 4 needs fewer steps and locks faster than q = 2; q = 8 scales so
    // abruptly that the loop overshoots and locks later than q = 2.
    checks++;
    if (!(lock_t[1] < lock_t[0])) begin failures++; $display("FAIL q = 4 not faster than q = 2"); end
    checks++;
    if (!(lock_t[2] > lock_t[0])) begin failures++; $display("FAIL q = 8 not slower than q = 2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
