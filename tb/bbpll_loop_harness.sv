// bbpll_loop_harness -- one closed PLL loop for testbenches that compare
// several configurations side by side (not synthesizable).
//
// Wraps bbpll_digital_core and bbpll_analog_model. The gear-shift parameters
// (q = 2^GS_Q_LOG2, running-average length GS_M, lock threshold GS_THRESH)
// and the reset channel are parameters; the auxiliary loops are always on and
// the AFS freeze is off. The stimulus ports are the channel request
// (fcw_target, switch_req), the gear-shift type and the AFS enable; the
// outputs are what a testbench needs to time a lock: the model's DCO
// frequency, the gear-shift status strobes and the auxiliary-BBPD activity,
// all valid one time unit after each rising edge of clk.
module bbpll_loop_harness
  import bbpll_pkg::*;
#(
  parameter int   GS_Q_LOG2 = 1,
  parameter int   GS_M      = LD_M,
  parameter int   GS_THRESH = LD_THRESH,
  parameter int   FCW_INT   = 38,       // reset channel, integer FCW
  parameter real  F_BASE    = 9.5e9     // model frequency with centred banks
) (
  input  logic clk,
  input  logic rst_n,
  input  fcw_t fcw_target,
  input  logic switch_req,
  input  logic gs_type2,
  input  logic afs_en,
  output real  freq,
  output logic gs_settled,
  output logic gs_boost,
  output logic gs_step,
  output logic afs_busy,
  output logic aux_fire     // either auxiliary BBPD beyond its dead zone
);
  logic dco_clk, e_main;
  logic [1:0] e_fine, e_coarse;
  logic signed [9:0] dac_code;
  logic [6:0] fine_bank, coarse_bank, mmd_ratio;
  logic div;
  logic [9:0] dtc_code;
  fcw_t fcw_cur, afs_m_est;
  gexp_t beta_exp, alpha_exp;
  logic afs_apply, afs_meas_done;
  logic signed [7:0] afs_dic;
  logic [21:0] dtc_gain;
  real dt_pd;

  assign aux_fire = e_fine[0] || e_coarse[0];

  bbpll_digital_core #(
    .GS_Q_LOG2 (GS_Q_LOG2),
    .GS_M      (GS_M),
    .GS_THRESH (GS_THRESH),
    .FCW_RESET (fcw_t'(FCW_INT) <<< FCW_FRAC)
  ) dut (
    .clk, .rst_n, .dco_clk, .e_main, .e_fine, .e_coarse,
    .fcw_target, .switch_req,
    .aux_en (1'b1), .gs_en (1'b1), .gs_type2, .afs_en, .afs_freeze_en (1'b0),
    .dac_code, .fine_bank, .coarse_bank, .mmd_ratio, .div, .dtc_code,
    .fcw_cur, .beta_exp, .alpha_exp, .gs_settled, .gs_boost, .gs_step,
    .afs_busy, .afs_apply, .afs_meas_done, .afs_m_est, .afs_dic, .dtc_gain
  );

  bbpll_analog_model #(.F_BASE(F_BASE)) model (
    .clk, .dac_code, .fine_bank, .coarse_bank, .mmd_ratio, .dtc_code,
    .e_main, .e_fine, .e_coarse, .dco_clk, .freq, .dt_pd
  );
endmodule
