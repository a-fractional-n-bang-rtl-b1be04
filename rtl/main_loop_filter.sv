// main_loop_filter -- proportional-integral digital loop filter of the main loop.
//
// With the main bang-bang error e[k] = +/-1 and the gains beta = 2^beta_exp,
// alpha = 2^alpha_exp supplied by the gear-shift controller, the filter
// computes
//     acc[k+1] = acc[k] + alpha[k] * e[k]          (integral path, "alpha * Acc.")
//     y[k]     = acc[k+1] + beta[k] * e[k]          (sum with proportional path)
// Because the gains are powers of two the products are shifts of a single
// LSB. The output is in LSBs of the DCO fine (DAC) bank with LF_FRAC
// fractional bits and drives the delta-sigma modulator in front of the DAC.
// `freeze` holds the integrator and drops the proportional term (error
// forced to zero), as used while the AFS measurement runs. The integrator
// saturates instead of wrapping.
//
// The structure follows the reference design; the word format, saturation
// and the registered output are this implementation's choices.
//
// Timing: y is registered, one cycle after the error sample.
module main_loop_filter
  import bbpll_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  freeze,
  input  logic  e_pos,
  input  gexp_t beta_exp,
  input  gexp_t alpha_exp,
  output lf_t   y,
  output lf_t   integ
);
  localparam int EW = LF_W + 2;
  localparam logic signed [EW-1:0] MAXV = (EW'(1) <<< (LF_W - 1)) - EW'(1);
  localparam logic signed [EW-1:0] MINV = -(EW'(1) <<< (LF_W - 1));

  // 2^exp in loop-filter fixed point (exp >= -LF_FRAC).
  function automatic logic signed [EW-1:0] pow2(input gexp_t ex);
    int sh;
    sh = int'(ex) + LF_FRAC;
    if (sh < 0) sh = 0;
    return EW'(1) <<< sh;
  endfunction

  function automatic logic signed [EW-1:0] sat(input logic signed [EW-1:0] v);
    if (v > MAXV)      return MAXV;
    else if (v < MINV) return MINV;
    else               return v;
  endfunction

  logic signed [EW-1:0] a_term, b_term, acc_nxt, y_nxt;
  always_comb begin
    a_term  = e_pos ? pow2(alpha_exp) : -pow2(alpha_exp);
    b_term  = e_pos ? pow2(beta_exp)  : -pow2(beta_exp);
    acc_nxt = freeze ? EW'(integ) : sat(EW'(integ) + a_term);
    y_nxt   = freeze ? acc_nxt : sat(acc_nxt + b_term);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ <= '0;
      y     <= '0;
    end else begin
      integ <= lf_t'(acc_nxt);
      y     <= lf_t'(y_nxt);
    end
  end
endmodule
