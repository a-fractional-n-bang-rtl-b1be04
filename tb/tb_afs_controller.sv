// tb_afs_controller -- self-checking test of the adaptive frequency switching.
//
// A behavioural phase model stands in for the loop: the time error dt (in
// DCO periods) wanders randomly around zero; the coarse pulse subtracts the
// true coarse step M_TRUE from dt (the DCO runs faster for one period, so
// the divider edge comes early) two cycles later, and every increment of
// cal[k] adds back the same amount to dt. For several M_TRUE and FCW jumps
// the test checks: the pulse lasts one cycle, M is measured to within
// one step plus the dither, the staircase stays within 50 steps, dIc equals
// round(2*dFCW/M)/2 with sign, the total switch latency, and that with AFS
// disabled the request is applied at once with dIc = 0.
module tb_afs_controller;
  import bbpll_pkg::*;
  logic clk = 0, rst_n = 0, afs_en = 1, freeze_en = 0, req = 0, e_pos = 0;
  fcw_t dfcw = '0, cal, m_est;
  logic ic_pulse, busy, freeze, apply, meas_done;
  logic signed [7:0] dic;
  int checks = 0, failures = 0;

  afs_controller dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phase model
  real dt = 0.0, m_true = 0.16;
  fcw_t cal_prev = '0;
  int pulse_age = -1;
  always @(posedge clk) begin
    #1;
    dt = dt + real'(cal - cal_prev) / 1048576.0;
    cal_prev = cal;
    if (ic_pulse) pulse_age = 0;
    else if (pulse_age >= 0) pulse_age++;
    if (pulse_age == 1) dt = dt - m_true;
    if (!busy) dt = (real'($urandom % 100) - 49.5) * 1e-4;   // locked: dither around 0
    e_pos = dt > 0;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (m_true=%f)", what, m_true); end
  endtask

  task automatic do_switch(input real mt, input longint jump, input bit over = 0);
    int cyc, pulses, steps;
    longint q2, expd, mag;
    m_true = mt;
    dfcw = fcw_t'(jump);
    @(negedge clk); req = 1;
    @(negedge clk); req = 0;
    cyc = 1; pulses = 0; steps = 0;
    while (!apply && cyc < 200) begin
      if (ic_pulse) pulses++;
      @(negedge clk); cyc++;
    end
    chk(apply, "apply reached");
    chk(pulses == 1, "single coarse pulse");
    steps = int'(m_est / AFS_STEP);
    chk(m_est == fcw_t'(steps * AFS_STEP), "M multiple of step");
    if (over) chk(m_est == fcw_t'(AFS_MAX_STEPS * AFS_STEP), "search stops after 50 steps");
    else chk(real'(m_est) / 1048576.0 > mt - 0.005 && real'(m_est) / 1048576.0 <= mt + 0.005 + real'(AFS_STEP) / 1048576.0,
        $sformatf("M %f within one step above the true value", real'(m_est) / 1048576.0));
    chk(steps <= AFS_MAX_STEPS, "staircase within 50 steps");
    mag = jump < 0 ? -jump : jump;
    // the divide takes 9 cycles, or 1 when the quotient is out of range
    chk(cyc == 1 + 1 + AFS_WAIT + steps + 1 + ((2 * mag >= (longint'(m_est) << 9)) ? 1 : 9) + 1,
        "switch latency");
    q2 = (2 * mag) / longint'(m_est);
    expd = (q2 >> 1) + (q2 & 1);
    if (expd > 127) expd = 127;
    if (jump < 0) expd = -expd;
    chk(longint'(dic) == expd, $sformatf("dIc %0d expected %0d", dic, expd));
    repeat (5) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (5) @(negedge clk);
    do_switch(0.16, -3 * 1048576);          // 0.75 GHz down, 40 MHz coarse step
    do_switch(0.16, 6 * 1048576);           // 1.5 GHz up
    do_switch(0.3, -1048576 / 4);           // 75 MHz coarse step, small jump
    do_switch(0.05, 2 * 1048576 + 12345);
    do_switch(0.29, -6 * 1048576);          // 72.5 MHz coarse step
    do_switch(0.5, -6 * 1048576, 1);        // step beyond the 50-cycle search range
    do_switch(0.004, 6 * 1048576);          // quotient saturates
    // AFS disabled: immediate apply, no pulse
    afs_en = 0;
    dfcw = fcw_t'(3 * 1048576);
    @(negedge clk); req = 1;
    @(negedge clk); req = 0;
    chk(!ic_pulse, "no pulse when disabled");
    @(negedge clk);
    chk(apply && dic == 0, "disabled: apply with dIc = 0");
    // freeze output
    afs_en = 1; freeze_en = 1;
    @(negedge clk); req = 1;
    @(negedge clk); req = 0;
    chk(freeze, "freeze during estimation");
    while (busy) @(negedge clk);
    chk(!freeze, "freeze released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
