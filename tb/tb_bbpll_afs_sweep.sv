// tb_bbpll_afs_sweep -- auxiliary-path locking time with and without AFS.
//
// Twelve closed loops (bbpll_loop_harness, default gear shift, type II) run
// side by side. Each is reset on the 10 GHz channel (FCW 40, the model's
// banks centred there), acquires it, and then jumps down by 0.25, 0.5,
// 0.75, 1.0, 1.25 or 1.5 GHz, once with AFS and once without. Measured per
// loop: the auxiliary-path locking time (cycles from the request to the
// last firing of either auxiliary BBPD) and the PLL locking time (last cycle
// outside +/-650 kHz before 600 cycles inside).
// Checks: every AFS loop locks within 700 cycles; from 0.5 GHz upwards AFS
// shortens the auxiliary-path time; with AFS that time stays below 300
// cycles over the whole range, while without AFS it grows with the jump.
// Jumps without AFS are only required to lock up to 1.0 GHz: beyond that
// the fine bank can reach its limit (see the top-level notes).
module tb_bbpll_afs_sweep;
  import bbpll_pkg::*;
  localparam int NJ = 6;
  localparam int MAX_CYC = 8000;

  logic clk = 0;
  always #2 clk = ~clk;

  int checks = 0, failures = 0;
  int lock_t [2][NJ];
  int aux_t  [2][NJ];
  bit done   [2][NJ];

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar a = 0; a < 2; a++) begin : g_afs
    for (genvar j = 0; j < NJ; j++) begin : g_jump
      logic rst_n = 0, switch_req = 0, gs_type2 = 1, afs_en = (a == 1);
      fcw_t fcw_target = fcw_t'(40) <<< FCW_FRAC;
      real  freq, f_tgt;
      logic gs_settled, gs_boost, gs_step, afs_busy, aux_fire;

      bbpll_loop_harness #(.FCW_INT(40), .F_BASE(10.0e9)) u_loop (.*);

      initial begin
        int good, cyc, last_bad, last_aux;
        done[a][j] = 0;
        repeat (3) @(posedge clk);
        @(negedge clk) rst_n = 1;
        repeat (2000) @(posedge clk);
        // jump of (j + 1) * 0.25 GHz = (j + 1) FCW units downwards
        fcw_target = fcw_t'(40 - (j + 1)) <<< FCW_FRAC;
        f_tgt = real'(40 - (j + 1)) * 250.0e6;
        @(negedge clk) switch_req = 1;
        @(negedge clk) switch_req = 0;
        good = 0; cyc = 0; last_bad = 0; last_aux = 0;
        while (good < 600 && cyc < MAX_CYC) begin
          @(posedge clk); #2;
          cyc++;
          if (aux_fire) last_aux = cyc;
          if (afs_busy || freq - f_tgt > 650.0e3 || freq - f_tgt < -650.0e3) begin
            good = 0; last_bad = cyc;
          end else good++;
        end
        lock_t[a][j] = (good >= 600) ? last_bad : MAX_CYC;
        aux_t[a][j]  = last_aux;
        done[a][j] = 1;
      end
    end
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    bit all;
    do begin
      @(posedge clk);
      all = 1;
      for (int a = 0; a < 2; a++) for (int j = 0; j < NJ; j++) all &= done[a][j];
    end while (!all);
    for (int j = 0; j < NJ; j++) begin
      $display("jump -%0.2f GHz from 10 GHz: auxiliary path %0d cycles without AFS, %0d with AFS; locking %0d / %0d cycles",
               real'(j + 1) * 0.25, aux_t[0][j], aux_t[1][j], lock_t[0][j], lock_t[1][j]);
      chk(lock_t[1][j] <= 700, $sformatf("AFS lock for -%0.2f GHz", real'(j + 1) * 0.25));
      chk(aux_t[1][j] < 300, $sformatf("AFS auxiliary-path time for -%0.2f GHz", real'(j + 1) * 0.25));
      if (j >= 1)
        chk(aux_t[1][j] < aux_t[0][j], $sformatf("AFS shortens the auxiliary path for -%0.2f GHz", real'(j + 1) * 0.25));
      if (j <= 3)
        chk(lock_t[0][j] < MAX_CYC, $sformatf("lock without AFS for -%0.2f GHz", real'(j + 1) * 0.25));
    end
    chk(aux_t[0][NJ-1] > aux_t[0][0], "without AFS the auxiliary path grows with the jump");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
