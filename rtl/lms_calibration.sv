// lms_calibration -- background LMS calibration of the DTC gain.
//
// The DTC delays the reference edge by code * t_lsb, with
//     code[k] = g[k] * q[k]
// where q[k] is the accumulated divider quantization error in DCO periods
// (from dsm_mmd) and g is the DTC gain in codes per DCO period. The gain is
// adapted by correlating the main bang-bang error with the quantization
// error that produced it:
//     g[k+1] = g[k] - 2^-MU_SHIFT * e[k+1] * q[k]
// ("gamma * Acc." of e times z^-1 q). If g is too small the residual time
// error is negatively correlated with q, e*q averages below zero and g grows,
// so g converges to T0 / t_lsb and the divider quantization error is removed
// at the phase detector. The sign in front of the update reflects the
// negative DTC gain of the loop. `freeze` stops the adaptation.
//
// The LMS loop follows the reference design. The gain format, its reset
// value G_INIT, MU_SHIFT and the clamping of the code to the DTC range are
// this implementation's choices; the DTC range-reduction technique used in
// the reference chip is not modelled.
//
// Timing: code is combinational from the registered q and g, so it is
// aligned with the division ratio produced in the same cycle.
module lms_calibration
  import bbpll_pkg::*;
#(
  parameter int DTC_W    = 10,
  parameter int G_INT    = 10,
  parameter int G_FRAC   = 12,
  parameter int G_INIT   = 256,   // initial gain, codes per DCO period
  parameter int MU_SHIFT = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             freeze,
  input  logic             e_pos,
  input  fcw_t             q,
  output logic [DTC_W-1:0] code,
  output logic [G_INT+G_FRAC-1:0] gain
);
  localparam int GW = G_INT + G_FRAC;
  localparam int PW = GW + FCW_W + 1;

  // ---- DTC code = g * q, truncated to integer codes and clamped
  logic signed [PW-1:0] prod;
  logic signed [PW-1:0] pint;
  always_comb begin
    prod = PW'(signed'({1'b0, gain})) * PW'(q);
    pint = prod >>> (G_FRAC + FCW_FRAC);
    if (pint < 0)                         code = '0;
    else if (pint > PW'((1 << DTC_W) - 1)) code = '1;
    else                                  code = DTC_W'(pint);
  end

  // ---- gain update: g -= mu * e * q (q has FCW_FRAC fractional bits)
  localparam int UW = GW + 2;
  logic signed [UW-1:0] upd, gnxt;
  always_comb begin
    upd  = UW'(q >>> (FCW_FRAC - G_FRAC + MU_SHIFT));
    gnxt = e_pos ? UW'(signed'({2'b00, gain})) - upd
                 : UW'(signed'({2'b00, gain})) + upd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      gain <= GW'(G_INIT << G_FRAC);
    else if (!freeze) begin
      if (gnxt < 0)                   gain <= '0;
      else if (gnxt > UW'((1 << GW) - 1)) gain <= '1;
      else                            gain <= GW'(gnxt);
    end
  end
endmodule
