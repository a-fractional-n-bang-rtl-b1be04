// bbpll_digital_core -- digital part of a fast-locking fractional-N bang-bang PLL.
//
// All the synthesized logic of the PLL, running once per reference cycle
// on `clk`, plus the multi-modulus divider on `dco_clk`:
//   * main loop: main BBPD bit -> PI loop filter (gains from the gear-shift
//     controller) -> first-order delta-sigma -> DAC code of the DCO fine bank;
//   * gear shift (type II or type I): boosts the loop gains while an
//     auxiliary BBPD fires and halves them on each lock-detector decision;
//   * two auxiliary (dead-zone) loops, fine and coarse: the integral paths
//     drive the fine and coarse DCO banks, the proportional paths
//     (gamma_f, gamma_c) shift the divider phase through the FCW;
//   * AFS: on a channel switch measures the coarse-bank step and pre-sets
//     the coarse bank by round(dFCW / M) when the new FCW is applied;
//   * divider path: FCW combiner -> first-order delta-sigma -> divider
//     ratio, and LMS-calibrated DTC code cancelling the divider
//     quantization error.
// The analog parts (DTC, the three BBPDs, DAC and loop RC, DCO) are outside:
// their digital signals are the ports of this module.
//
// Interface
//   e_main            main BBPD: 1 = divider edge late (time error > 0)
//   e_fine, e_coarse  auxiliary BBPDs, {sign, magnitude}: magnitude = 1
//                     when the time error exceeds the dead zone (200 ps /
//                     400 ps in the reference design), sign as e_main
//   fcw_target        wanted FCW (DCO periods per reference period, 20
//                     fractional bits); loaded on switch_req (through AFS)
//   aux_en, gs_en, gs_type2, afs_en, afs_freeze_en   configuration bits
//   dac_code          signed code of the fine (DAC-driven) DCO control
//   fine_bank, coarse_bank   unsigned capacitor-bank codes
//   mmd_ratio, div    divider ratio per reference cycle and divided clock
//   dtc_code          DTC delay code for the reference edge
// Timing: every output except div changes on the rising edge of clk; an
// error sample presented before edge k acts on the outputs after edge k.
// A switch request with AFS enabled takes one pulse cycle, AFS_WAIT wait
// cycles, the staircase, 10 divide cycles and one apply cycle before the new
// FCW reaches the divider path.
//
// The gear-shift parameters q, m and P * m are brought out as parameters
// (defaults 2, 32 and 4, as in the reference design) so that their effect on
// locking can be explored.
//
// What follows the reference design and what is this implementation's own
// choice is stated in each submodule. Own choices at this level: the AFS
// offset is a separate signed register added to the coarse integrator
// output, the channel-switch handshake, the FCW reset value (35.0, the
// 8.75 GHz channel at 250 MHz) and the forcing of all error inputs to zero
// while the AFS freezes the loops.
module bbpll_digital_core
  import bbpll_pkg::*;
#(
  parameter int   DAC_W    = 10,
  parameter int   BANK_W   = 7,
  parameter int   BANK_MID = 64,
  parameter int   N_W      = 7,
  parameter int   DTC_W    = 10,
  parameter int   G_INIT   = 256,
  parameter int   MU_SHIFT = 6,
  parameter int   GS_Q_LOG2 = 1,          // gear-shift scaling factor q = 2^GS_Q_LOG2
  parameter int   GS_M      = LD_M,       // lock-detector running-average length m
  parameter int   GS_THRESH = LD_THRESH,  // lock threshold on the sum, P * m
  parameter fcw_t FCW_RESET = fcw_t'(FCW_RESET_INT) <<< FCW_FRAC
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     dco_clk,
  // phase detectors
  input  logic                     e_main,
  input  logic [1:0]               e_fine,
  input  logic [1:0]               e_coarse,
  // channel control and configuration
  input  fcw_t                     fcw_target,
  input  logic                     switch_req,
  input  logic                     aux_en,
  input  logic                     gs_en,
  input  logic                     gs_type2,
  input  logic                     afs_en,
  input  logic                     afs_freeze_en,
  // DCO, divider and DTC controls
  output logic signed [DAC_W-1:0]  dac_code,
  output logic [BANK_W-1:0]        fine_bank,
  output logic [BANK_W-1:0]        coarse_bank,
  output logic [N_W-1:0]           mmd_ratio,
  output logic                     div,
  output logic [DTC_W-1:0]         dtc_code,
  // status
  output fcw_t                     fcw_cur,
  output gexp_t                    beta_exp,
  output gexp_t                    alpha_exp,
  output logic                     gs_settled,
  output logic                     gs_boost,
  output logic                     gs_step,
  output logic                     afs_busy,
  output logic                     afs_apply,
  output logic                     afs_meas_done,
  output fcw_t                     afs_m_est,
  output logic signed [7:0]        afs_dic,
  output logic [21:0]              dtc_gain
);
  // ------------------------------------------------------------ errors
  logic  freeze;
  terr_e ef, ec;
  always_comb begin
    ef = (aux_en && !freeze) ? aux_decode(e_fine)   : ERR_ZERO;
    ec = (aux_en && !freeze) ? aux_decode(e_coarse) : ERR_ZERO;
  end

  // -------------------------------------------------------- gear shift
  gear_shift_ctrl #(.M(GS_M), .THRESH(GS_THRESH), .Q_LOG2(GS_Q_LOG2)) u_gs (
    .clk        (clk),
    .rst_n      (rst_n),
    .enable     (gs_en),
    .type2      (gs_type2),
    .aux_active ((ef != ERR_ZERO) || (ec != ERR_ZERO)),
    .e_valid    (!freeze),
    .e_pos      (e_main),
    .beta_exp   (beta_exp),
    .alpha_exp  (alpha_exp),
    .boost      (gs_boost),
    .step       (gs_step),
    .settled    (gs_settled)
  );

  // ------------------------------------------------------- main loop
  lf_t lf_y, lf_integ_unused;
  main_loop_filter u_lf (
    .clk       (clk),
    .rst_n     (rst_n),
    .freeze    (freeze),
    .e_pos     (e_main),
    .beta_exp  (beta_exp),
    .alpha_exp (alpha_exp),
    .y         (lf_y),
    .integ     (lf_integ_unused)
  );

  dsm_dac #(.OUT_W(DAC_W)) u_dsm_dac (
    .clk   (clk),
    .rst_n (rst_n),
    .x     (lf_y),
    .out   (dac_code)
  );

  // ------------------------------------------- auxiliary integral paths
  logic [BANK_W-1:0] coarse_aux;
  aux_integrator #(.W(BANK_W), .INIT(BANK_MID)) u_aux_f (
    .clk    (clk),
    .rst_n  (rst_n),
    .freeze (freeze),
    .e_aux  (ef),
    .code   (fine_bank)
  );
  aux_integrator #(.W(BANK_W), .INIT(BANK_MID)) u_aux_c (
    .clk    (clk),
    .rst_n  (rst_n),
    .freeze (freeze),
    .e_aux  (ec),
    .code   (coarse_aux)
  );

  // --------------------------------------------------------------- AFS
  fcw_t cal;
  logic ic_pulse;
  afs_controller #(.DIC_W(8)) u_afs (
    .clk       (clk),
    .rst_n     (rst_n),
    .afs_en    (afs_en),
    .freeze_en (afs_freeze_en),
    .req       (switch_req),
    .dfcw      (fcw_target - fcw_cur),
    .e_pos     (e_main),
    .ic_pulse  (ic_pulse),
    .cal       (cal),
    .busy      (afs_busy),
    .freeze    (freeze),
    .apply     (afs_apply),
    .dic       (afs_dic),
    .m_est     (afs_m_est),
    .meas_done (afs_meas_done)
  );

  // Channel register and accumulated AFS coarse offset.
  fcw_t                  fcw_next;
  logic signed [BANK_W+1:0] ic_ofs;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fcw_cur  <= FCW_RESET;
      fcw_next <= FCW_RESET;
      ic_ofs   <= '0;
    end else begin
      if (switch_req && !afs_busy) fcw_next <= fcw_target;
      if (afs_apply) begin
        fcw_cur <= fcw_next;
        ic_ofs  <= ic_ofs + (BANK_W+2)'(afs_dic);
      end
    end
  end

  // Coarse bank = integrator + AFS offset + one-cycle estimation pulse.
  logic signed [BANK_W+2:0] ic_sum;
  always_comb begin
    ic_sum = (BANK_W+3)'(signed'({1'b0, coarse_aux})) + (BANK_W+3)'(ic_ofs)
           + (BANK_W+3)'(signed'({1'b0, ic_pulse}));
    if (ic_sum < 0)                          coarse_bank = '0;
    else if (ic_sum > (BANK_W+3)'((1 << BANK_W) - 1)) coarse_bank = '1;
    else                                     coarse_bank = BANK_W'(ic_sum);
  end

  // ------------------------------------------------------ divider path
  fcw_t fcw_tot, qacc;
  fcw_combiner u_fcw (
    .clk     (clk),
    .rst_n   (rst_n),
    .fcw     (fcw_cur),
    .e_f     (ef),
    .e_c     (ec),
    .cal     (cal),
    .fcw_tot (fcw_tot)
  );

  dsm_mmd #(.N_W(N_W)) u_dsm_mmd (
    .clk   (clk),
    .rst_n (rst_n),
    .x     (fcw_tot),
    .n     (mmd_ratio),
    .qacc  (qacc)
  );

  lms_calibration #(.DTC_W(DTC_W), .G_INIT(G_INIT), .MU_SHIFT(MU_SHIFT)) u_lms (
    .clk    (clk),
    .rst_n  (rst_n),
    .freeze (freeze),
    .e_pos  (e_main),
    .q      (qacc),
    .code   (dtc_code),
    .gain   (dtc_gain)
  );

  mmd_divider #(.N_W(N_W)) u_mmd (
    .dco_clk (dco_clk),
    .rst_n   (rst_n),
    .n       (mmd_ratio),
    .div     (div)
  );
endmodule
