// bbpll_pkg -- number formats and shared constants of the BBPLL digital core.
//
// The digital core of the fractional-N bang-bang PLL runs at the reference
// rate (one update per reference cycle, 250 MHz in the reference design).
// All quantities that end up on the frequency control word (FCW), the
// auxiliary-path feed-forward gains and the AFS calibration staircase are
// expressed in DCO periods with FCW_FRAC fractional bits. The main loop filter
// works in LSBs of the DCO fine (DAC) bank with LF_FRAC fractional bits.
// Loop-filter gains alpha and beta are powers of two and are carried as signed
// base-2 exponents, so every gain is a shift (gear-shift factor q = 2).
//
// The gains, the lock-detector length and threshold, the dead-zone related
// feed-forward gains and the AFS step follow the reference design; the word
// widths, fractional bit counts and bit encodings are this implementation's
// own choices.
package bbpll_pkg;

  // ---------------------------------------------------------------- formats
  localparam int FCW_INT  = 8;                 // integer bits of an FCW word (signed)
  localparam int FCW_FRAC = 20;                // fractional bits of an FCW word
  localparam int FCW_W    = FCW_INT + FCW_FRAC;
  typedef logic signed [FCW_W-1:0] fcw_t;      // DCO periods, 2^-20 resolution

  localparam int LF_INT  = 10;                 // integer bits of the loop-filter word
  localparam int LF_FRAC = 16;                 // fractional bits of the loop-filter word
  localparam int LF_W    = LF_INT + LF_FRAC;
  typedef logic signed [LF_W-1:0] lf_t;        // DCO fine-bank LSBs

  typedef logic signed [5:0] gexp_t;           // gain exponent: gain = 2**gexp

  // Ternary bang-bang error: -1, 0 or +1.
  typedef enum logic [1:0] {
    ERR_ZERO = 2'b00,
    ERR_POS  = 2'b01,
    ERR_NEG  = 2'b11
  } terr_e;

  // ------------------------------------------------------ loop-filter gains
  localparam int BETA_GS_EXP    = 4;     // beta_gs  = 2^4
  localparam int BETA_OPT_EXP   = -4;    // beta_opt = 2^-4
  localparam int ALPHA_GS2_EXP  = -1;    // type-II gear shift: alpha_gs = 2^-1 (R = 2^-5)
  localparam int ALPHA_GS1_EXP  = -4;    // type-I gear shift:  alpha_gs = 2^-4 (R = 2^-8)
  localparam int ALPHA_OPT_EXP  = -12;   // alpha_opt = 2^-12 (R = 2^-8)

  // ------------------------------------------------------------ lock detector
  localparam int LD_M         = 32;      // running-average length m
  localparam int LD_THRESH    = 4;       // P * m with P = 1/8: lock when |sum| < 4

  // ---------------------------------------------- auxiliary feed-forward gains
  // gamma = F_out * dead-zone, in DCO periods:
  //   fine:   8.5 GHz * 140 ps (minimum-corner dead zone) = 1.19
  //   coarse: 8.5 GHz * 400 ps (nominal coarse dead zone) = 3.4
  localparam int GAMMA_F = 1247805;      // round(1.19 * 2^20)
  localparam int GAMMA_C = 3565158;      // round(3.40 * 2^20)

  // Channel selected after reset: FCW 35.0, the 8.75 GHz channel at 250 MHz.
  localparam int FCW_RESET_INT = 35;

  // ------------------------------------------------------------------ AFS
  localparam int AFS_STEP       = 6291;  // staircase step 0.006 DCO periods (1.5 MHz at 250 MHz ref)
  localparam int AFS_MAX_STEPS  = 50;    // cycles allotted to the staircase search
  localparam int AFS_WAIT       = 4;     // cycles between coarse pulse and staircase start

  // Convert a two-bit auxiliary BBPD code {sign, magnitude} to a ternary error.
  // Bit 1 (sign) = 1 means the divider edge arrived late (positive time error).
  function automatic terr_e aux_decode(input logic [1:0] code);
    if (!code[0])     return ERR_ZERO;
    else if (code[1]) return ERR_POS;
    else              return ERR_NEG;
  endfunction

  // Convert a one-bit main BBPD output (1 = divider late) to a ternary error.
  function automatic terr_e bb_decode(input logic e);
    return e ? ERR_POS : ERR_NEG;
  endfunction

endpackage
