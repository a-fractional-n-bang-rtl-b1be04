// tb_mmd_divider -- self-checking test of the multi-modulus divider.
//
// Changes the ratio randomly right after each rising edge of div (as logic
// clocked by the divided clock would) and checks that every div period lasts
// exactly the ratio present at its starting edge, counted in DCO cycles, and
// that div is high for ceil(n/2) of them.
module tb_mmd_divider;
  logic dco_clk = 0, rst_n = 0;
  logic [6:0] n = 35;
  logic div;
  int checks = 0, failures = 0;

  mmd_divider dut (.*);
  always #1 dco_clk = ~dco_clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, hi = 0, exp_n = -1, periods = 0;
  logic div_d = 0;
  always @(posedge dco_clk) begin
    #0.1;
    if (div && !div_d) begin
      if (exp_n >= 0) begin
        checks++;
        if (cyc != exp_n || hi != (exp_n + 1) / 2) begin
          failures++;
          if (failures < 10) $display("period %0d high %0d expected %0d", cyc, hi, exp_n);
        end
        periods++;
      end
      exp_n = int'(n);
      n = 7'(30 + $urandom % 16);
      if (($urandom % 10) == 0) n = 7'(4 + $urandom % 4);
      cyc = 1; hi = 1;
    end else begin
      cyc++;
      if (div) hi++;
    end
    div_d = div;
  end

  initial begin
    repeat (3) @(posedge dco_clk);
    rst_n = 1;
    wait (periods == 3000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
