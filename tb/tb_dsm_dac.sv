// tb_dsm_dac -- self-checking test of the first-order delta-sigma truncator.
//
// Holds constant fractional inputs and checks that the DAC code stays
// within one LSB of the input and that its average over 2^16 cycles equals
// the input to within 2^-15 LSB; then drives random inputs and checks the
// accumulated error stays bounded by one LSB (first-order shaping).
module tb_dsm_dac;
  import bbpll_pkg::*;
  logic clk = 0, rst_n = 0;
  lf_t x = '0;
  logic signed [9:0] out;
  int checks = 0, failures = 0;

  dsm_dac #(.OUT_W(10)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real vals[4] = '{3.25, -7.8125, 0.0009765625, 100.5};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    foreach (vals[j]) begin
      longint sum;
      x = lf_t'($rtoi(vals[j] * 65536.0));
      @(posedge clk);
      sum = 0;
      for (int i = 0; i < 65536; i++) begin
        @(posedge clk); #1;
        sum += longint'(out);
        if (real'(out) < vals[j] - 1.0 || real'(out) > vals[j] + 1.0) begin
          failures++; checks++;
        end
      end
      checks++;
      if ((real'(sum) / 65536.0 - vals[j]) > 1.0/32768 || (real'(sum) / 65536.0 - vals[j]) < -1.0/32768) begin
        failures++;
        $display("mean %f expected %f", real'(sum) / 65536.0, vals[j]);
      end
    end
    begin
      real err;
      real xin;
      err = 0;
      for (int i = 0; i < 5000; i++) begin
        x = lf_t'(int'($urandom % 2000000) - 1000000);
        xin = real'(x) / 65536.0;
        @(posedge clk); #1;
        err += xin - real'(out);
        checks++;
        if (err > 1.0 || err < -1.0) begin
          failures++;
          if (failures < 10) $display("accumulated error %f", err);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
