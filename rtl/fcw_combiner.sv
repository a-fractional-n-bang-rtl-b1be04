// fcw_combiner -- frequency control word of the divider path.
//
// Forms the word fed to the divider delta-sigma modulator:
//     fcw_tot[k] = FCW - gamma_f * e_f[k] - gamma_c * e_c[k] + (cal[k] - cal[k-1])
// The gamma terms are the proportional (feed-forward) paths of the two
// auxiliary loops: while the time error is beyond a dead zone, the divider
// period is changed for one cycle by gamma DCO periods, which takes the
// accumulated time error back by about one dead zone. With the error
// convention of this design (+1 = divider edge late) a late edge needs a
// shorter divider period, hence the minus signs; the reference design
// draws an addition with the opposite sign convention for the time error. The AFS calibration
// staircase cal[k] is differentiated (1 - z^-1) before being added, so the
// divider phase moves by cal[k] DCO periods in total without enlarging the
// DTC range. cal is a modular counter, so the difference is taken modulo
// 2^FCW_W and a counter wrap does not disturb the phase.
//
// Structure and gamma = F_out * dead zone follow the reference design; the
// fixed-point format and the registered output are this implementation's.
//
// Timing: fcw_tot is registered, one cycle after its inputs.
module fcw_combiner
  import bbpll_pkg::*;
#(
  parameter int GAMMA_FINE   = GAMMA_F,
  parameter int GAMMA_COARSE = GAMMA_C,
  parameter int FCW_INIT     = FCW_RESET_INT   // integer FCW output during reset
) (
  input  logic  clk,
  input  logic  rst_n,
  input  fcw_t  fcw,
  input  terr_e e_f,
  input  terr_e e_c,
  input  fcw_t  cal,
  output fcw_t  fcw_tot
);
  fcw_t cal_d;

  function automatic fcw_t gterm(input terr_e e, input int g);
    unique case (e)
      ERR_POS: return -fcw_t'(g);
      ERR_NEG: return fcw_t'(g);
      default: return '0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cal_d   <= '0;
      fcw_tot <= fcw_t'(FCW_INIT) <<< FCW_FRAC;
    end else begin
      cal_d   <= cal;
      fcw_tot <= fcw + gterm(e_f, GAMMA_FINE) + gterm(e_c, GAMMA_COARSE) + (cal - cal_d);
    end
  end
endmodule
