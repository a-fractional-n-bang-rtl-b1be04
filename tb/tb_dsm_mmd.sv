// tb_dsm_mmd -- self-checking test of the divider delta-sigma modulator.
//
// For constant and random fractional FCWs checks, every cycle, that the
// ratio is floor(x) or floor(x)+1, that the accumulated quantization error
// stays in [0, 1) DCO period, and the exact identity
//     sum(n) = sum(x) - qacc
// which shows the ratios average to the FCW with no lost phase.
module tb_dsm_mmd;
  import bbpll_pkg::*;
  logic clk = 0, rst_n = 0;
  fcw_t x = '0, qacc;
  logic [6:0] n;
  int checks = 0, failures = 0;

  dsm_mmd dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sx, sn;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    sx = 0; sn = 0;
    for (int i = 0; i < 40000; i++) begin
      if (i < 10000)      x = fcw_t'(35 * 1048576 + 16);          // near-integer channel
      else if (i < 20000) x = fcw_t'(34 * 1048576 + 700000);
      else                x = fcw_t'(34 * 1048576 + int'($urandom % (6 * 1048576)));
      @(posedge clk); #1;
      sx += longint'(x);
      sn += longint'(n) * 1048576;
      checks++;
      if (int'(n) != (int'(x) >>> 20) && int'(n) != (int'(x) >>> 20) + 1) begin
        failures++;
        if (failures < 10) $display("ratio %0d for x=%0d", n, x);
      end
      checks++;
      if (qacc < 0 || qacc >= fcw_t'(1048576)) begin
        failures++;
        if (failures < 10) $display("qacc out of range %0d", qacc);
      end
      checks++;
      if (sn != sx - longint'(qacc)) begin
        failures++;
        if (failures < 10) $display("phase identity broken sn=%0d sx=%0d q=%0d", sn, sx, qacc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
