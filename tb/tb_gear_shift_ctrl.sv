// tb_gear_shift_ctrl -- self-checking test of the type-II / type-I gear shift.
//
// Scenario: reset gains are the optimum; an auxiliary error loads beta = 2^4
// and alpha = 2^-1 (type II) or 2^-4 (type I); a perfectly alternating main
// BBPD error then makes the lock detector fire every 32 cycles, and each
// firing halves both gains until beta = 2^-4 (8 steps) and alpha = 2^-12
// (11 steps in type II, 8 in type I). The test checks every gain value,
// the number of cycles per step (M = 32, eq. M_gs,min = m*N), that a
// constant error never steps, that an auxiliary error in the middle of the
// sequence re-boosts, and that disable forces the optimum gains.
module tb_gear_shift_ctrl;
  import bbpll_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0, type2 = 1, aux_active = 0, e_valid = 1, e_pos = 0;
  gexp_t beta_exp, alpha_exp;
  logic boost, step, settled;
  int checks = 0, failures = 0;

  gear_shift_ctrl dut (.*);

  // second instance with q = 4: checks the scaling factor parameter
  gexp_t b4, a4;
  logic bo4, st4, se4;
  gear_shift_ctrl #(.Q_LOG2(2)) dut4 (
    .clk, .rst_n, .enable, .type2, .aux_active, .e_valid, .e_pos,
    .beta_exp(b4), .alpha_exp(a4), .boost(bo4), .step(st4), .settled(se4));
  int n4 = 0;
  always @(posedge clk) if (st4) begin
    n4++;
    if (type2 && enable) begin
      checks++;
      if (!((b4 == gexp_t'(4 - 2 * n4) || (b4 == -4 && 4 - 2 * n4 <= -4)) &&
            (a4 == gexp_t'(-1 - 2 * n4) || (a4 == -12 && -1 - 2 * n4 <= -12)))) begin
        failures++;
        $display("FAIL q=4 step %0d beta=%0d alpha=%0d", n4, b4, a4);
      end
    end
  end
  always @(posedge clk) if (bo4) n4 = 0;
  always #5 clk = ~clk;

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s t=%0t beta=%0d alpha=%0d", what, $time, beta_exp, alpha_exp); end
  endtask

  // run the full sequence and check step values and spacing
  task automatic run_seq(input bit t2);
    int nsteps, cyc, last_cyc, eb, ea;
    type2 = t2;
    @(negedge clk); aux_active = 1;
    @(negedge clk); aux_active = 0;
    chk(beta_exp == 4 && alpha_exp == (t2 ? -1 : -4), "boost values");
    chk(!settled, "not settled after boost");
    eb = 4; ea = t2 ? -1 : -4;
    nsteps = 0; cyc = 0; last_cyc = 0;
    while (!settled && cyc < 2000) begin
      e_pos = cyc[0];
      @(negedge clk); cyc++;
      if (step) begin
        nsteps++;
        eb = (eb - 1 > -4) ? eb - 1 : -4;
        ea = (ea - 1 > -12) ? ea - 1 : -12;
        chk(beta_exp == eb && alpha_exp == ea, "halved values");
        chk(cyc - last_cyc == 32 + (nsteps == 1 ? 1 : 0), "32 samples per step");
        last_cyc = cyc;
      end
    end
    chk(nsteps == (t2 ? 11 : 8), "number of gear-shift steps");
    chk(beta_exp == -4 && alpha_exp == -12, "optimum reached");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    chk(beta_exp == -4 && alpha_exp == -12, "reset values");
    enable = 1;
    run_seq(1);
    chk(se4 && n4 == 6, "q = 4: settled after ceil(11/2) = 6 steps");
    run_seq(0);
    // constant error never steps
    type2 = 1;
    @(negedge clk); aux_active = 1;
    @(negedge clk); aux_active = 0;
    e_pos = 1;
    repeat (200) begin @(negedge clk); chk(!step, "constant error does not step"); end
    // re-boost in the middle of a sequence
    for (int i = 0; i < 70; i++) begin e_pos = i[0]; @(negedge clk); end
    chk(beta_exp == 3 || beta_exp == 2, "partially shifted");
    aux_active = 1; @(negedge clk); aux_active = 0;
    chk(beta_exp == 4 && alpha_exp == -1, "re-boost");
    // disable forces optimum
    enable = 0; @(negedge clk);
    chk(beta_exp == -4 && alpha_exp == -12, "disabled -> optimum");
    aux_active = 1; @(negedge clk); aux_active = 0;
    chk(beta_exp == -4 && alpha_exp == -12, "disabled ignores aux");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
