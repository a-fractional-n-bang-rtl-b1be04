// tb_bbpll_jumps -- channel-switching sweep over the 8.5-10 GHz tuning range.
//
// Closed loop of bbpll_digital_core (default parameters, AFS and type-II
// gear shift on) with bbpll_analog_model, starting on the 8.75 GHz channel.
// The channel is switched through a list of positive and negative jumps of
// 0.25 to 1.5 GHz between 8.5 and 10 GHz. For each jump the locking time is
// taken as the last reference cycle at which the DCO frequency is outside
// +/-650 kHz (80 ppm) of the target, with the loop then staying inside for
// 600 cycles and the gear shift back at its steady-state gains. Every jump
// must lock within LOCK_LIMIT reference cycles; the times are printed next to
// the < 390 cycles (1.56 us) that the reference chip reaches.
module tb_bbpll_jumps;
  import bbpll_pkg::*;
  localparam real F_REF = 250.0e6;
  localparam int  LOCK_LIMIT = 600;

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
  bbpll_analog_model model (
    .clk, .dac_code, .fine_bank, .coarse_bank, .mmd_ratio, .dtc_code,
    .e_main, .e_fine, .e_coarse, .dco_clk, .freq, .dt_pd
  );

  always #2 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic go(input real fcw_new, output int lock_cyc);
    int good, cyc, last_bad;
    real ft;
    fcw_target = fcw_t'($rtoi(fcw_new * 1048576.0));
    @(negedge clk); switch_req = 1;
    @(negedge clk); switch_req = 0;
    ft = real'(fcw_target) / 1048576.0 * F_REF;
    good = 0; cyc = 0; last_bad = 0;
    while (good < 600 && cyc < 8000) begin
      @(posedge clk); #2;
      cyc++;
      if (afs_busy || freq - ft > 650.0e3 || freq - ft < -650.0e3) begin
        good = 0; last_bad = cyc;
      end else good++;
    end
    lock_cyc = last_bad;
    chk(good >= 600 && gs_settled, $sformatf("lock at %f GHz", ft / 1e9));
  endtask

  initial begin
    real chans[10] = '{34.0, 40.0, 34.0, 37.0, 38.0, 36.5, 40.0, 38.5, 35.0, 39.0};
    real prev;
    int t, worst;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (1500) @(posedge clk);
    prev = 35.0; worst = 0;
    foreach (chans[i]) begin
      go(chans[i], t);
      $display("jump %0.3f GHz to %0.3f GHz: %0d cycles (%0.2f us), dIc %0d",
               (chans[i] - prev) * 0.25, chans[i] * 0.25, t, real'(t) * 4.0e-3, afs_dic);
      chk(t <= LOCK_LIMIT, $sformatf("locking time %0d within %0d cycles", t, LOCK_LIMIT));
      if (t > worst) worst = t;
      prev = chans[i];
    end
    $display("worst-case locking time %0d cycles (%0.2f us)", worst, real'(worst) * 4.0e-3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
