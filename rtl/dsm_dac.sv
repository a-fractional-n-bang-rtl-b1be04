// dsm_dac -- first-order delta-sigma truncation of the loop-filter word for the DAC.
//
// The loop-filter output carries FRAC fractional bits of the DCO fine bank,
// while the DAC takes OUT_W integer bits. A first-order error-feedback
// modulator adds the fractional residue of the previous cycle to the input,
// outputs the integer part of the sum and keeps the new fractional part as
// residue, so the DAC code averages to the full-precision input and the
// truncation error is first-order high-pass shaped. The output saturates at
// the DAC range.
//
// The reference design places a delta-sigma modulator between the loop
// filter and the DAC; its order and word widths are not specified, and the
// first-order error-feedback form is this implementation's choice.
//
// Timing: out is registered, one cycle after x.
module dsm_dac #(
  parameter int IN_W  = bbpll_pkg::LF_W,
  parameter int FRAC  = bbpll_pkg::LF_FRAC,
  parameter int OUT_W = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] out
);
  localparam int SW = IN_W + 1;
  localparam int IW = SW - FRAC;
  localparam logic signed [IW-1:0] OMAX = IW'((1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [IW-1:0] OMIN = IW'(-(1 <<< (OUT_W - 1)));

  logic [FRAC-1:0]       res;
  logic signed [SW-1:0]  s;
  logic signed [IW-1:0]  ipart;
  always_comb begin
    s     = SW'(x) + SW'(signed'({1'b0, res}));
    ipart = s[SW-1:FRAC];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res <= '0;
      out <= '0;
    end else begin
      res <= s[FRAC-1:0];
      if (ipart > OMAX)      out <= OUT_W'(OMAX);
      else if (ipart < OMIN) out <= OUT_W'(OMIN);
      else                   out <= OUT_W'(ipart);
    end
  end
endmodule
