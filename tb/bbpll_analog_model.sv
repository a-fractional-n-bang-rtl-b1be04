// bbpll_analog_model -- behavioural model of the analog part of the BBPLL
// (not synthesizable; testbench use only).
//
// A phase-domain, one-step-per-reference-cycle model of the DCO, the DTC and
// the three bang-bang phase detectors, plus a DCO clock generator for the
// divider:
//   DCO frequency  F = F_BASE + coarse(Ic) + (If - 64) * KF_AUX + dac * KF
//                  coarse(Ic) = KC * d + KC2 * d^2 with d = Ic - 64 (a mildly
//                  nonlinear coarse tuning curve, slope about 40 MHz/LSB)
//   divider edge   each reference cycle the divider period is N / F, so the
//                  time error grows by N / F - T_REF
//   DTC            the BBPDs compare against the reference delayed by
//                  -code * DTC_LSB (negative DTC gain)
//   main BBPD      sign of the time error plus Gaussian-like input noise
//   aux BBPDs      {sign, |dt| > dead zone}, 200 ps (fine) and 400 ps (coarse)
// Sign convention: dt > 0 means the divider edge is late, which the loop
// corrects by raising the DCO frequency.
// The outputs change 1 time unit after each rising edge of clk, so the
// digital core samples them at the next edge.
module bbpll_analog_model #(
  parameter real F_BASE  = 8.75e9,
  parameter real KC      = 40.0e6,
  parameter real KC2     = 0.15e6,
  parameter real KF_AUX  = 6.0e6,
  parameter real KF      = 300.0e3,
  parameter real T_REF   = 4.0e-9,
  parameter real DTC_LSB = 0.46e-12,
  parameter real DZ_F    = 200.0e-12,
  parameter real DZ_C    = 400.0e-12,
  parameter real NOISE   = 210.0e-15
) (
  input  logic              clk,
  input  logic signed [9:0] dac_code,
  input  logic [6:0]        fine_bank,
  input  logic [6:0]        coarse_bank,
  input  logic [6:0]        mmd_ratio,
  input  logic [9:0]        dtc_code,
  output logic              e_main,
  output logic [1:0]        e_fine,
  output logic [1:0]        e_coarse,
  output logic              dco_clk,
  output real               freq,
  output real               dt_pd
);
  real dt_raw = 0.0;

  function automatic real fdco(input int ic, input int ifb, input int dac);
    real d;
    d = real'(ic - 64);
    return F_BASE + KC * d + KC2 * d * d + real'(ifb - 64) * KF_AUX + real'(dac) * KF;
  endfunction

  function automatic real noise();
    real s;
    s = 0.0;
    for (int i = 0; i < 4; i++) s += real'($urandom % 10000) / 10000.0 - 0.5;
    return s * NOISE * 1.732;   // four uniforms: unit variance scaled
  endfunction

  initial begin
    e_main = 0; e_fine = 2'b00; e_coarse = 2'b00;
    freq = F_BASE; dt_pd = 0.0;
  end

  always @(posedge clk) begin
    #1;
    freq   = fdco(int'(coarse_bank), int'(fine_bank), int'(dac_code));
    dt_raw = dt_raw + real'(mmd_ratio) / freq - T_REF;
    dt_pd  = dt_raw + real'(dtc_code) * DTC_LSB;
    e_main   = (dt_pd + noise()) > 0.0;
    e_fine   = {dt_pd > 0.0, (dt_pd > DZ_F) || (dt_pd < -DZ_F)};
    e_coarse = {dt_pd > 0.0, (dt_pd > DZ_C) || (dt_pd < -DZ_C)};
  end

  // DCO clock for the divider (time unit 1 ns). Edge times are accumulated
  // in real arithmetic so that rounding to the time precision does not
  // build up a frequency error.
  real t_next = 0.0;
  initial begin
    dco_clk = 0;
    forever begin
      t_next = t_next + 0.5e9 / freq;
      #(t_next - $realtime);
      dco_clk = ~dco_clk;
    end
  end
endmodule
