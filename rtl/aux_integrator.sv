// aux_integrator -- integral path of an auxiliary (dead-zone) BBPD loop.
//
// Each reference cycle the ternary auxiliary error e_aux (-1, 0, +1) is
// multiplied by ALPHA and accumulated into the control code of a DCO
// capacitor bank ("alpha_aid * Acc."). While the time error is inside the
// dead zone e_aux is 0 and the code holds; outside it the DCO frequency
// moves by one step of ALPHA bank LSBs per cycle, which produces the
// frequency staircase of the auxiliary loop. The code is unsigned, starts
// at INIT (mid-scale) after reset and saturates at both ends.
//
// Two instances exist: one drives the fine auxiliary bank (about 6 MHz per
// step in the reference design), the other the coarse bank (about 40 MHz per
// step). ALPHA = 1, the bank width and the mid-scale reset are this
// implementation's choices, since the bank LSB sizes are not given.
//
// Timing: code is registered, one cycle after the error sample.
module aux_integrator
  import bbpll_pkg::*;
#(
  parameter int W     = 7,
  parameter int ALPHA = 1,
  parameter int INIT  = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         freeze,
  input  terr_e        e_aux,
  output logic [W-1:0] code
);
  localparam int MAXC = (1 << W) - 1;

  logic signed [W+1:0] nxt;
  always_comb begin
    nxt = signed'({2'b00, code});
    if (!freeze) begin
      unique case (e_aux)
        ERR_POS: nxt = nxt + (W+2)'(ALPHA);
        ERR_NEG: nxt = nxt - (W+2)'(ALPHA);
        default: ;
      endcase
    end
    if (nxt > (W+2)'(MAXC)) nxt = (W+2)'(MAXC);
    if (nxt < 0)            nxt = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) code <= W'(INIT);
    else        code <= nxt[W-1:0];
  end
endmodule
