// lock_detector -- running average of the main bang-bang error over m cycles.
//
// The main BBPD error e[k] (+1/-1) is pushed into an M-deep shift register
// and a running sum of the last M samples is kept (add the new sample,
// subtract the one that leaves the window). When the window is full and the
// magnitude of the sum is below THRESH (= P*m, i.e. |<e>| < P), `lock` is
// asserted for one cycle. `restart` empties the window: the gear-shift
// controller pulses it at every coefficient change so that each gear-shift
// step is judged on M fresh samples. After a `lock` pulse the window is
// emptied as well, so consecutive lock pulses are at least M cycles apart.
//
// m = 32 and P = 1/8 follow the reference design, as does the comparison of
// the average magnitude against P. Emptying the window on every decision is
// this implementation's reading of "at least m new samples at each step".
//
// Interface: clk / rst_n (asynchronous active-low reset), en qualifies a
// sample, e_pos is the main BBPD bit (1 = +1). Timing: `lock` is registered
// and rises in the cycle after the M-th sample of the window was taken.
module lock_detector #(
  parameter int M      = bbpll_pkg::LD_M,
  parameter int THRESH = bbpll_pkg::LD_THRESH
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic restart,
  input  logic e_pos,
  output logic lock,
  output logic signed [$clog2(M)+1:0] avg_sum
);
  localparam int SW = $clog2(M) + 2;
  localparam int CW = $clog2(M + 1);

  logic [M-1:0]          win;
  logic signed [SW-1:0]  sum;
  logic [CW-1:0]         fill;

  function automatic logic signed [SW-1:0] pm1(input logic b);
    return b ? SW'(1) : -SW'(1);
  endfunction

  logic signed [SW-1:0] sum_nxt;
  logic                 full_nxt;
  always_comb begin
    sum_nxt  = sum + pm1(e_pos);
    if (fill == CW'(M)) sum_nxt = sum_nxt - pm1(win[M-1]);
    full_nxt = (fill >= CW'(M - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win  <= '0;
      sum  <= '0;
      fill <= '0;
      lock <= 1'b0;
    end else if (restart) begin
      sum  <= '0;
      fill <= '0;
      lock <= 1'b0;
    end else if (en) begin
      win <= {win[M-2:0], e_pos};
      if (full_nxt && (sum_nxt < SW'(THRESH)) && (sum_nxt > -SW'(THRESH))) begin
        lock <= 1'b1;
        sum  <= '0;
        fill <= '0;
      end else begin
        lock <= 1'b0;
        sum  <= sum_nxt;
        if (fill != CW'(M)) fill <= fill + 1'b1;
      end
    end else begin
      lock <= 1'b0;
    end
  end

  assign avg_sum = sum;
endmodule
