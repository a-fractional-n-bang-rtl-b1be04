// tb_lms_calibration -- self-checking test of the LMS DTC-gain calibration.
//
// A behavioural phase detector sees the residual time error
//     dt = code / G_TRUE - q + noise        (DCO periods)
// where q is a first-order delta-sigma quantization error sequence and
// G_TRUE the true DTC codes per DCO period. The test checks every cycle that
// code = floor(g * q), and that the gain converges from 256 to G_TRUE within
// 2 codes, for G_TRUE below and above the start value, and that freeze holds
// the gain.
module tb_lms_calibration;
  import bbpll_pkg::*;
  logic clk = 0, rst_n = 0, freeze = 0, e_pos = 0;
  fcw_t q = '0;
  logic [9:0] code;
  logic [21:0] gain;
  int checks = 0, failures = 0;

  lms_calibration dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real g_true, input int cycles);
    real acc, dt, g;
    acc = 0;
    for (int i = 0; i < cycles; i++) begin
      longint expc;
      acc = acc + 0.3713;
      if (acc >= 1.0) acc -= 1.0;
      q = fcw_t'($rtoi(acc * 1048576.0));
      #1;
      expc = (longint'(gain) * longint'(q)) >>> 32;
      checks++;
      if (longint'(code) != expc) begin
        failures++;
        if (failures < 10) $display("code %0d expected %0d", code, expc);
      end
      dt = real'(code) / g_true - real'(q) / 1048576.0 + (real'($urandom % 1000) - 499.5) * 1e-5;
      e_pos = dt > 0;
      @(posedge clk);
    end
    g = real'(gain) / 4096.0;
    checks++;
    if (g < g_true - 2.0 || g > g_true + 2.0) begin
      failures++;
      $display("gain %f did not converge to %f", g, g_true);
    end else $display("gain %f for true %f", g, g_true);
  endtask

  initial begin
    logic [21:0] g0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(235.0, 20000);
    run(290.0, 20000);
    freeze = 1;
    g0 = gain;
    run(290.0 + 0.0, 50);
    checks++;
    if (gain != g0) begin failures++; $display("freeze did not hold the gain"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
