// gear_shift_ctrl -- type-II / type-I gear-shift of the main loop-filter gains.
//
// The loop-filter gains are powers of two, beta = 2^beta_exp and
// alpha = 2^alpha_exp. Whenever either auxiliary BBPD reports a non-zero
// error (the PLL is out of lock and a limit cycle could start), both gains
// are loaded with their boosted values: beta_gs = 2^4 and, in type-II mode,
// alpha_gs = 2^-1 (R = alpha/beta = 2^-5); in type-I mode alpha_gs = 2^-4
// keeps the steady-state ratio R = 2^-8. Each time the lock detector finds
// the running average of the main BBPD error below P, both gains are divided
// by q = 2^Q_LOG2 (q = 2 by default: exponent minus one) and then clamped from below at their
// steady-state values beta_opt = 2^-4 and alpha_opt = 2^-12. In type-II mode
// beta reaches beta_opt after 8 steps while alpha keeps halving until step 11.
// With `enable` low the gains stay at beta_opt / alpha_opt.
//
// This follows the reference design's gear-shift diagram: a select by
// "aux error != 0" between the boosted value and the held value, a halving
// selected by the lock detector and a max() against the optimum. Treating a
// non-zero error of either auxiliary BBPD as the trigger is this
// implementation's choice (the diagram shows a single auxiliary BBPD).
//
// Interface: the exponents are registered outputs; `boost` pulses in the
// cycle after a trigger and `step` in the cycle after a halving; `settled`
// is high while both gains are at their steady-state values.
module gear_shift_ctrl
  import bbpll_pkg::*;
#(
  parameter int BETA_GS   = BETA_GS_EXP,
  parameter int BETA_OPT  = BETA_OPT_EXP,
  parameter int ALPHA_GS2 = ALPHA_GS2_EXP,
  parameter int ALPHA_GS1 = ALPHA_GS1_EXP,
  parameter int ALPHA_OPT = ALPHA_OPT_EXP,
  parameter int M         = LD_M,
  parameter int THRESH    = LD_THRESH,
  parameter int Q_LOG2    = 1            // gear-shift scaling factor q = 2^Q_LOG2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enable,      // gear shift on; off = steady-state gains only
  input  logic  type2,       // 1: type-II (boost R too), 0: type-I
  input  logic  aux_active,  // fine or coarse auxiliary BBPD error is non-zero
  input  logic  e_valid,     // main BBPD sample is meaningful this cycle
  input  logic  e_pos,       // main BBPD error, 1 = +1
  output gexp_t beta_exp,
  output gexp_t alpha_exp,
  output logic  boost,
  output logic  step,
  output logic  settled
);
  logic lock;
  logic restart;
  logic signed [$clog2(M)+1:0] avg_sum_unused;

  lock_detector #(.M(M), .THRESH(THRESH)) u_ld (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (e_valid),
    .restart (restart),
    .e_pos   (e_pos),
    .lock    (lock),
    .avg_sum (avg_sum_unused)
  );

  wire trigger = enable && aux_active;
  wire halve   = enable && lock && !settled;
  assign restart = trigger || !enable;   // the detector empties itself after a decision

  gexp_t beta_nxt, alpha_nxt;
  always_comb begin
    beta_nxt  = beta_exp;
    alpha_nxt = alpha_exp;
    if (!enable) begin
      beta_nxt  = gexp_t'(BETA_OPT);
      alpha_nxt = gexp_t'(ALPHA_OPT);
    end else if (trigger) begin
      beta_nxt  = gexp_t'(BETA_GS);
      alpha_nxt = type2 ? gexp_t'(ALPHA_GS2) : gexp_t'(ALPHA_GS1);
    end else if (halve) begin
      beta_nxt  = (beta_exp  - gexp_t'(Q_LOG2) > gexp_t'(BETA_OPT))
                ? beta_exp  - gexp_t'(Q_LOG2) : gexp_t'(BETA_OPT);
      alpha_nxt = (alpha_exp - gexp_t'(Q_LOG2) > gexp_t'(ALPHA_OPT))
                ? alpha_exp - gexp_t'(Q_LOG2) : gexp_t'(ALPHA_OPT);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beta_exp  <= gexp_t'(BETA_OPT);
      alpha_exp <= gexp_t'(ALPHA_OPT);
      boost     <= 1'b0;
      step      <= 1'b0;
    end else begin
      beta_exp  <= beta_nxt;
      alpha_exp <= alpha_nxt;
      boost     <= trigger;
      step      <= halve && !trigger;
    end
  end

  assign settled = (beta_exp == gexp_t'(BETA_OPT)) && (alpha_exp == gexp_t'(ALPHA_OPT));

  // The gains never leave the range between their optimum and boosted values.
  a_beta_range: assert property (@(posedge clk) disable iff (!rst_n)
    beta_exp >= gexp_t'(BETA_OPT) && beta_exp <= gexp_t'(BETA_GS));
  a_alpha_range: assert property (@(posedge clk) disable iff (!rst_n)
    alpha_exp >= gexp_t'(ALPHA_OPT) && alpha_exp <= gexp_t'(ALPHA_GS2));
endmodule
