// tb_aux_integrator -- self-checking test of the auxiliary integral path.
//
// Random ternary errors, freeze and saturation at both ends are compared
// with a saturating integer model; ALPHA = 2 is used to check the gain.
module tb_aux_integrator;
  import bbpll_pkg::*;
  logic clk = 0, rst_n = 0, freeze = 0;
  terr_e e_aux = ERR_ZERO;
  logic [6:0] code;
  int checks = 0, failures = 0;

  aux_integrator #(.W(7), .ALPHA(2), .INIT(64)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m, hits_top, hits_bot;
    m = 64; hits_top = 0; hits_bot = 0;
    repeat (2) @(posedge clk);
    #1 checks++; if (code != 64) failures++;
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      int r, d;
      r = $urandom % 10;
      d = (i / 1000) % 2 ? 7 : 3;     // drift up or down in phases
      e_aux  = (r < d) ? ERR_POS : (r < 8) ? ERR_NEG : ERR_ZERO;
      freeze = ($urandom % 16) == 0;
      if (!freeze) m += (e_aux == ERR_POS) ? 2 : (e_aux == ERR_NEG) ? -2 : 0;
      if (m > 127) m = 127;
      if (m < 0) m = 0;
      if (m == 127) hits_top++;
      if (m == 0) hits_bot++;
      @(posedge clk); #1;
      checks++;
      if (int'(code) != m) begin
        failures++;
        if (failures < 10) $display("mismatch i=%0d code=%0d exp=%0d", i, code, m);
      end
    end
    checks++;
    if (hits_top == 0 || hits_bot == 0) begin failures++; $display("saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
