// tb_bbpll_digital_core -- end-to-end closed-loop test of the BBPLL digital core.
//
// The core runs at its default parameters in closed loop with
// bbpll_analog_model (DCO with a nonlinear coarse curve, DTC, main and
// dead-zone BBPDs, DCO clock into the divider). Reference 250 MHz.
// Sequence:
//   1. acquisition from a DCO that starts 25 MHz below the 8.75 GHz channel;
//   2. +0.75 GHz channel switch with AFS and type-II gear shift;
//   3. -0.75 GHz switch with AFS off (type-II gear shift and aux loops only);
//   4. +0.75 GHz switch with AFS and the type-I gear shift;
//   5. -0.75 GHz switch with AFS and the loops frozen during the measurement;
//   6. a fractional channel (FCW 35.25) for the DTC LMS calibration.
// Each switch must settle within +/-650 kHz (80 ppm at 8.5 GHz) and end with
// the gear shift back at its steady-state gains; the locking time, in
// reference cycles, is printed (the reference chip reaches < 390 cycles).
// The AFS estimate of M must be within 15 % of the model's local coarse
// slope, and the LMS gain must converge to T0 / DTC_LSB within 3 %. The
// divider is checked by counting div edges against reference cycles.
// Every mechanism (fine and coarse auxiliary firing, gear-shift boost and
// steps, AFS measurement and coarse pre-set, freeze, fractional dithering,
// LMS adaptation) is counted and must occur at least once.
module tb_bbpll_digital_core;
  import bbpll_pkg::*;
  localparam real F_REF = 250.0e6;

  logic clk = 0, rst_n = 0;
  logic dco_clk;
  logic e_main;
  logic [1:0] e_fine, e_coarse;
  fcw_t fcw_target = fcw_t'(35) <<< FCW_FRAC;
  logic switch_req = 0;
  logic aux_en = 1, gs_en = 1, gs_type2 = 1, afs_en = 1, afs_freeze_en = 0;
  logic signed [9:0] dac_code;
  logic [6:0] fine_bank, coarse_bank, mmd_ratio;
  logic div;
  logic [9:0] dtc_code;
  fcw_t fcw_cur, afs_m_est;
  gexp_t beta_exp, alpha_exp;
  logic gs_settled, gs_boost, gs_step, afs_busy, afs_apply, afs_meas_done;
  logic signed [7:0] afs_dic;
  logic [21:0] dtc_gain;
  real freq, dt_pd;

  int checks = 0, failures = 0;

  bbpll_digital_core dut (.*);

  bbpll_analog_model #(.F_BASE(8.75e9 - 25.0e6)) model (
    .clk, .dac_code, .fine_bank, .coarse_bank, .mmd_ratio, .dtc_code,
    .e_main, .e_fine, .e_coarse, .dco_clk, .freq, .dt_pd
  );

  always #2 clk = ~clk;     // 4 ns reference period

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------ mechanism counters
  int n_fine = 0, n_coarse = 0, n_boost = 0, n_step = 0, n_meas = 0, n_preset = 0;
  int n_freeze = 0, n_ratio_toggle = 0, n_gain_move = 0, n_settle = 0, n_cycles = 0;
  logic [6:0] ratio_d = 0;
  logic [21:0] gain_d = 0;
  logic settled_d = 0;
  always @(posedge clk) if (rst_n) begin
    n_cycles++;
    if (e_fine[0])   n_fine++;
    if (e_coarse[0]) n_coarse++;
    if (gs_boost)    n_boost++;
    if (gs_step)     n_step++;
    if (afs_meas_done) n_meas++;
    if (afs_apply && afs_dic != 0) n_preset++;
    if (dut.freeze)  n_freeze++;
    if (!afs_busy && mmd_ratio != ratio_d) n_ratio_toggle++;
    if (dtc_gain != gain_d) n_gain_move++;
    if (gs_settled && !settled_d) n_settle++;
    ratio_d = mmd_ratio; gain_d = dtc_gain; settled_d = gs_settled;
  end

  int n_div = 0;
  always @(posedge div) n_div++;

  // ---------------------------------------------------------- helpers
  function automatic real ftarget();
    return real'(fcw_cur) / 1048576.0 * F_REF;
  endfunction

  // Wait until the loop has been within 650 kHz of the channel for HOLD
  // cycles with the gear shift settled; return the locking time measured
  // from t0 to the last cycle outside the band.
  task automatic settle(input int t0, input int max_cycles, output int lock_cyc);
    int good, cyc, last_bad;
    good = 0; cyc = t0; last_bad = t0;
    while (good < 600 && cyc < t0 + max_cycles) begin
      @(posedge clk); #2;
      cyc++;
      if (afs_busy || freq - ftarget() > 650.0e3 || freq - ftarget() < -650.0e3) begin
        good = 0; last_bad = cyc;
      end else good++;
    end
    lock_cyc = last_bad - t0;
    chk(good >= 600, $sformatf("settled within 650 kHz (F=%f GHz, target %f GHz)", freq / 1e9, ftarget() / 1e9));
    chk(gs_settled, "gear shift back at optimum gains");
  endtask

  task automatic do_switch(input fcw_t target, input string name, output int lock_cyc);
    int t0;
    real m_model;
    // local coarse slope of the model at the present coarse code
    m_model = (40.0e6 + 0.15e6 * (2.0 * real'(int'(coarse_bank) - 64) + 1.0)) / F_REF;
    fcw_target = target;
    @(negedge clk); switch_req = 1;
    @(negedge clk); switch_req = 0;
    t0 = n_cycles;
    settle(t0, 8000, lock_cyc);
    $display("%s: locking time %0d reference cycles (%0.2f us), M est %f (model %f), dIc %0d",
             name, lock_cyc, real'(lock_cyc) * 4.0e-3, real'(afs_m_est) / 1048576.0, m_model, afs_dic);
    if (afs_en) begin
      real r;
      r = real'(afs_m_est) / 1048576.0 / m_model;
      chk(r > 0.85 && r < 1.15, $sformatf("%s: AFS estimate of M", name));
    end
  endtask

  int t_acq, t_afs2, t_noafs2, t_gs1, t_frz;
  int div0, cyc0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // 1. acquisition
    settle(0, 8000, t_acq);
    $display("acquisition from -25 MHz: %0d cycles", t_acq);

    // 2. +0.75 GHz with AFS, GS-II
    do_switch(fcw_t'(38) <<< FCW_FRAC, "+0.75 GHz AFS+GS-II", t_afs2);

    // 3. -0.75 GHz without AFS
    afs_en = 0;
    do_switch(fcw_t'(35) <<< FCW_FRAC, "-0.75 GHz GS-II only", t_noafs2);
    afs_en = 1;

    // 4. +0.75 GHz with AFS and GS-I
    gs_type2 = 0;
    do_switch(fcw_t'(38) <<< FCW_FRAC, "+0.75 GHz AFS+GS-I", t_gs1);
    gs_type2 = 1;

    // 5. -0.75 GHz with AFS, loops frozen during the measurement
    afs_freeze_en = 1;
    do_switch(fcw_t'(35) <<< FCW_FRAC, "-0.75 GHz AFS(frozen loops)+GS-II", t_frz);
    afs_freeze_en = 0;

    chk(t_afs2 < 1000, "AFS + GS-II locks within 1000 cycles");

    // 6. fractional channel: LMS calibration of the DTC gain
    begin
      int tf;
      real g_true, g;
      fcw_target = (fcw_t'(35) <<< FCW_FRAC) + fcw_t'(262144);    // 35.25
      afs_en = 0;
      @(negedge clk); switch_req = 1;
      @(negedge clk); switch_req = 0;
      div0 = n_div; cyc0 = n_cycles;
      settle(n_cycles, 8000, tf);
      repeat (12000) @(posedge clk);
      g_true = 1.0 / freq / 0.46e-12;
      g = real'(dtc_gain) / 4096.0;
      $display("fractional channel 35.25: DTC gain %f, ideal %f, locking %0d cycles", g, g_true, tf);
      chk(g > 0.97 * g_true && g < 1.03 * g_true, "LMS DTC gain converged");
      // divider: one div edge per reference cycle in lock
      chk(n_div - div0 > (n_cycles - cyc0) - 3 && n_div - div0 < (n_cycles - cyc0) + 3,
          $sformatf("divider edges %0d vs reference cycles %0d", n_div - div0, n_cycles - cyc0));
    end

    $display("mechanisms: fine aux %0d, coarse aux %0d, GS boost %0d, GS steps %0d, GS settle %0d, AFS meas %0d, AFS preset %0d, freeze %0d, frac ratio toggles %0d, LMS moves %0d, div edges %0d",
             n_fine, n_coarse, n_boost, n_step, n_settle, n_meas, n_preset, n_freeze, n_ratio_toggle, n_gain_move, n_div);
    chk(n_fine > 0, "fine auxiliary BBPD fired");
    chk(n_coarse > 0, "coarse auxiliary BBPD fired");
    chk(n_boost > 0, "gear-shift boost");
    chk(n_step >= 11, "gear-shift steps");
    chk(n_settle > 0, "gear shift reached optimum");
    chk(n_meas >= 3, "AFS measurements");
    chk(n_preset >= 3, "AFS coarse pre-set");
    chk(n_freeze > 0, "AFS freeze");
    chk(n_ratio_toggle > 100, "fractional ratio dithering");
    chk(n_gain_move > 100, "LMS gain adaptation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
