// tb_fcw_combiner -- self-checking test of the FCW combiner.
//
// Random FCW, auxiliary errors and calibration words (including a wrap of
// the modular calibration counter) are compared with
// FCW - gamma_f*e_f - gamma_c*e_c + cal[k] - cal[k-1], and the sum of the
// differentiated calibration over a run must equal the final cal value.
module tb_fcw_combiner;
  import bbpll_pkg::*;
  logic clk = 0, rst_n = 0;
  fcw_t fcw = '0, cal = '0, fcw_tot;
  terr_e e_f = ERR_ZERO, e_c = ERR_ZERO;
  int checks = 0, failures = 0;

  fcw_combiner dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint tv(terr_e e, longint g);
    return e == ERR_POS ? -g : e == ERR_NEG ? g : 0;
  endfunction

  initial begin
    fcw_t cal_prev, expv;
    longint sum_extra;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    cal_prev = '0;
    for (int i = 0; i < 5000; i++) begin
      fcw = fcw_t'((34 + $urandom % 7) * 1048576 + $urandom % 1048576);
      e_f = terr_e'($urandom % 4 == 2 ? 0 : $urandom % 4);
      e_c = terr_e'($urandom % 4 == 2 ? 0 : $urandom % 4);
      if (e_f == terr_e'(2'b10)) e_f = ERR_ZERO;
      if (e_c == terr_e'(2'b10)) e_c = ERR_ZERO;
      cal = (i > 4000) ? cal + fcw_t'(30000000) : cal + fcw_t'($urandom % 7000);
      expv = fcw_t'(longint'(fcw) + tv(e_f, 1247805) + tv(e_c, 3565158)) + (cal - cal_prev);
      cal_prev = cal;
      @(posedge clk); #1;
      checks++;
      if (fcw_tot != expv) begin
        failures++;
        if (failures < 10) $display("mismatch i=%0d got=%0d exp=%0d", i, fcw_tot, expv);
      end
    end
    // phase continuity: sum of differentiated staircase equals the staircase
    fcw = '0; e_f = ERR_ZERO; e_c = ERR_ZERO;
    @(posedge clk); #1;
    sum_extra = 0;
    for (int i = 0; i < 300; i++) begin
      cal = cal + fcw_t'(6291);
      @(posedge clk); #1;
      sum_extra += longint'(fcw_tot);
    end
    checks++;
    if (sum_extra != 300 * 6291) begin failures++; $display("staircase sum %0d", sum_extra); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
