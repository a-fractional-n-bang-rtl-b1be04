// tb_bbpll_modes -- locking-technique comparison on a -0.75 GHz channel jump.
//
// Closed loop of bbpll_digital_core (default parameters) with
// bbpll_analog_model. The same jump, 9.5 GHz -> 8.75 GHz, is made with five
// configurations of the fast-locking techniques:
//   A  auxiliary loops only (gear shift and AFS off)
//   B  type-II gear shift
//   C  AFS + type-II gear shift
//   D  type-I gear shift
//   E  AFS + type-I gear shift
// Before every jump the core is reset on the 9.5 GHz channel (FCW_RESET =
// 38, the model's banks centred there) and acquires it with all techniques
// on, so every configuration starts from centred capacitor banks. This
// matters: once a bank has drifted close to its limit during earlier jumps,
// a large jump without AFS can saturate the fine bank, and the fine
// feed-forward path then holds the time error between the two dead zones,
// so the coarse loop never fires again. The locking time is the last
// reference cycle outside
// +/-650 kHz (80 ppm) before the loop stays inside for 600 cycles. For A the
// number of times the fine auxiliary BBPD fires again after having been
// quiet for 32 cycles is counted: these re-triggerings are the limit cycle
// that the gear shift removes. The checks are the orderings that the
// techniques are meant to produce: A is the slowest and shows re-triggering,
// type II beats type I with and without AFS, and AFS shortens the time the
// auxiliary path stays active (last firing of either auxiliary BBPD after
// the request). With this model the total locking time of B and C is set
// mostly by the gear-shift tail (at least m = 32 cycles per step), so AFS
// is not required to shorten it.
module tb_bbpll_modes;
  import bbpll_pkg::*;
  localparam real F_REF = 250.0e6;
  localparam int  MAX_CYC = 30000;   // 120 us search window

  logic clk = 0, rst_n = 0;
  logic dco_clk;
  logic e_main;
  logic [1:0] e_fine, e_coarse;
  fcw_t fcw_target = fcw_t'(38) <<< FCW_FRAC;
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

  bbpll_digital_core #(.FCW_RESET(fcw_t'(38) <<< FCW_FRAC)) dut (.*);
  bbpll_analog_model #(.F_BASE(9.5e9)) model (
    .clk, .dac_code, .fine_bank, .coarse_bank, .mmd_ratio, .dtc_code,
    .e_main, .e_fine, .e_coarse, .dco_clk, .freq, .dt_pd
  );

  always #2 clk = ~clk;

  initial begin
    #1200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // Fine-BBPD re-triggerings: a firing after at least 32 quiet cycles.
  int quiet = 0, retrig = 0;
  bit seen = 0;
  always @(posedge clk) if (rst_n) begin
    if (e_fine[0]) begin
      if (seen && quiet >= 32) retrig++;
      seen = 1; quiet = 0;
    end else quiet++;
  end

  // Auxiliary-path locking time: cycles from the request to the last firing
  // of either auxiliary BBPD.
  int aux_last;
  task automatic jump(input int fcw_int, input int max_cyc, output int lock_cyc);
    int good, cyc, last_bad;
    real ft;
    fcw_target = fcw_t'(fcw_int) <<< FCW_FRAC;
    @(negedge clk); switch_req = 1;
    @(negedge clk); switch_req = 0;
    ft = real'(fcw_target) / 1048576.0 * F_REF;
    good = 0; cyc = 0; last_bad = 0; aux_last = 0;
    while (good < 600 && cyc < max_cyc) begin
      @(posedge clk); #2;
      cyc++;
      if (e_fine[0] || e_coarse[0]) aux_last = cyc;
      if (afs_busy || freq - ft > 650.0e3 || freq - ft < -650.0e3) begin
        good = 0; last_bad = cyc;
      end else good++;
    end
    lock_cyc = (good >= 600) ? last_bad : max_cyc;
  endtask

  task automatic run_mode(input string name, input bit gs, input bit t2, input bit afs,
                          output int lock_cyc, output int n_retrig, output int aux_cyc);
    // fresh start: reset and acquire 9.5 GHz with every technique on
    gs_en = 1; gs_type2 = 1; afs_en = 1;
    fcw_target = fcw_t'(38) <<< FCW_FRAC;
    @(negedge clk) rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (2000) @(posedge clk);
    #2;
    chk(gs_settled && freq - 9.5e9 < 650.0e3 && freq - 9.5e9 > -650.0e3,
        $sformatf("%s: locked at 9.5 GHz before the jump", name));
    // the jump under test
    gs_en = gs; gs_type2 = t2; afs_en = afs;
    seen = 0; retrig = 0;
    jump(35, MAX_CYC, lock_cyc);
    n_retrig = retrig;
    aux_cyc = aux_last;
    $display("%s: locking time %0d reference cycles (%0.2f us), auxiliary path idle after %0d, fine aux re-triggers %0d",
             name, lock_cyc, real'(lock_cyc) * 4.0e-3, aux_cyc, n_retrig);
  endtask

  int tA, tB, tC, tD, tE, rA, rB, rC, rD, rE, xA, xB, xC, xD, xE;

  initial begin
    repeat (3) @(posedge clk);
    run_mode("A aux loops only     ", 0, 0, 0, tA, rA, xA);
    run_mode("B GS-II              ", 1, 1, 0, tB, rB, xB);
    run_mode("C AFS + GS-II        ", 1, 1, 1, tC, rC, xC);
    run_mode("D GS-I               ", 1, 0, 0, tD, rD, xD);
    run_mode("E AFS + GS-I         ", 1, 0, 1, tE, rE, xE);

    chk(tB < MAX_CYC && tC < MAX_CYC && tD < MAX_CYC && tE < MAX_CYC,
        "every gear-shift configuration locks");
    chk(tA > 4 * tB, "without gear shift the lock is much slower");
    chk(rA > rB, "limit-cycle re-triggering without gear shift");
    chk(tB < tD, "type II faster than type I");
    chk(tC < tE, "type II faster than type I with AFS");
    chk(xC < xB, "AFS shortens the auxiliary path (GS-II)");
    chk(xE < xD, "AFS shortens the auxiliary path (GS-I)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
