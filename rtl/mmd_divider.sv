// mmd_divider -- multi-modulus divider of the PLL feedback path.
//
// Divides the DCO clock by an integer ratio n that may change every output
// cycle. A down-counter is loaded with n-1 on the DCO edge at which it
// reaches zero; `div` is high for the first half of every output period
// (ceil(n/2) DCO cycles), so each rising edge of `div` starts a period of
// exactly n DCO cycles. The ratio is sampled when the counter reloads, which
// keeps it stable for a whole output period; the ratio is expected to come
// from logic clocked by the divider output or the retimed reference.
//
// The reference design shows this block only by name; the counter
// structure, the duty cycle and the sampling point are this implementation's
// choices. Ratios below N_MIN are raised to N_MIN.
//
// Interface: dco_clk is the clock to divide, rst_n an asynchronous active-low
// reset, n the ratio, div the divided clock.
module mmd_divider #(
  parameter int N_W   = 7,
  parameter int N_MIN = 4
) (
  input  logic           dco_clk,
  input  logic           rst_n,
  input  logic [N_W-1:0] n,
  output logic           div
);
  logic [N_W-1:0] cnt;
  logic [N_W-1:0] half;

  wire [N_W-1:0] n_eff = (n < N_W'(N_MIN)) ? N_W'(N_MIN) : n;

  always_ff @(posedge dco_clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      half <= '0;
      div  <= 1'b0;
    end else if (cnt == '0) begin
      cnt  <= n_eff - 1'b1;
      half <= n_eff >> 1;               // div stays high while the count is >= floor(n/2)
      div  <= 1'b1;
    end else begin
      cnt <= cnt - 1'b1;
      div <= ((cnt - 1'b1) >= half);
    end
  end
endmodule
