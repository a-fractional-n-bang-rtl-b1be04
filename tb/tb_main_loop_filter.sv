// tb_main_loop_filter -- self-checking test of the PI loop filter.
//
// Applies random errors and random power-of-two gains (including the
// gear-shift extremes 2^4 and 2^-12) and checks the integrator and the
// output against an integer model in units of 2^-16 LSB, including freeze.
module tb_main_loop_filter;
  import bbpll_pkg::*;
  logic clk = 0, rst_n = 0, freeze = 0, e_pos = 0;
  gexp_t beta_exp = -4, alpha_exp = -12;
  lf_t y, integ;
  int checks = 0, failures = 0;

  main_loop_filter dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint acc_m, y_m;
  initial begin
    acc_m = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      longint a, b;
      e_pos     = (i < 3000) ? (($urandom % 10) < 7) : $urandom % 2;
      freeze    = ($urandom % 20) == 0;
      beta_exp  = gexp_t'(-4 + int'($urandom % 9));
      alpha_exp = gexp_t'(-12 + int'($urandom % 12));
      a = longint'(1) << (alpha_exp + 16);
      b = longint'(1) << (beta_exp + 16);
      if (!freeze) acc_m += e_pos ? a : -a;
      y_m = freeze ? acc_m : acc_m + (e_pos ? b : -b);
      @(posedge clk); #1;
      checks++;
      if (longint'(integ) != acc_m || longint'(y) != y_m) begin
        failures++;
        if (failures < 10) $display("mismatch i=%0d integ=%0d exp=%0d y=%0d exp=%0d", i, integ, acc_m, y, y_m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
