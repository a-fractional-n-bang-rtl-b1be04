// dsm_mmd -- first-order delta-sigma modulator driving the multi-modulus divider.
//
// The fractional frequency control word x (DCO periods, FCW_FRAC fractional
// bits) is turned into an integer division ratio n per reference cycle:
//     s = x + res;  n = floor(s);  res = s - n
// so the ratio averages to x. The modulator also keeps the running sum of
// its quantization error, qacc[k] = sum(x - n), which is the amount, in DCO
// periods, by which the divider edge leads the ideal edge. That sum is what
// the DTC cancels (through the LMS-calibrated DTC gain). For a first-order
// modulator qacc stays in [0, 1).
//
// A delta-sigma modulator between the FCW and the divider, and the
// accumulated difference between its input and output feeding the DTC path,
// follow the reference design; the first order and the formats are this
// implementation's choices. n saturates at the ratio range [N_MIN, 2^N_W-1]
// and is N_INIT (the integer part of the reset channel) during reset.
//
// Timing: n and qacc are registered together, one cycle after x.
module dsm_mmd
  import bbpll_pkg::*;
#(
  parameter int N_W   = 7,
  parameter int N_MIN = 8,
  parameter int N_INIT = FCW_RESET_INT   // ratio output during reset
) (
  input  logic           clk,
  input  logic           rst_n,
  input  fcw_t           x,
  output logic [N_W-1:0] n,
  output fcw_t           qacc
);
  localparam int IW = FCW_W + 1 - FCW_FRAC;

  logic [FCW_FRAC-1:0]        res;
  logic signed [FCW_W:0]      s;
  logic signed [IW-1:0]       ip;
  logic signed [IW-1:0]       n_sat;
  always_comb begin
    s  = (FCW_W+1)'(x) + (FCW_W+1)'(signed'({1'b0, res}));
    ip = s[FCW_W:FCW_FRAC];
    if (ip > IW'((1 << N_W) - 1)) n_sat = IW'((1 << N_W) - 1);
    else if (ip < IW'(N_MIN))     n_sat = IW'(N_MIN);
    else                          n_sat = ip;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res  <= '0;
      n    <= N_W'(N_INIT);
      qacc <= '0;
    end else begin
      res  <= s[FCW_FRAC-1:0];
      n    <= N_W'(n_sat);
      qacc <= qacc + x - (fcw_t'(n_sat) <<< FCW_FRAC);
    end
  end
endmodule
