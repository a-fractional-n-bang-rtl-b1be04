// tb_lock_detector -- self-checking test of the running-average lock detector.
//
// Drives random, biased and alternating BBPD sequences plus random restarts
// and compares `lock` every cycle with a reference model that keeps the
// samples taken since the last restart or decision and declares lock when
// the last M of them sum to less than THRESH in magnitude. Also checks that
// a perfectly alternating sequence locks exactly M cycles after a restart.
module tb_lock_detector;
  localparam int M = 32;
  localparam int THRESH = 4;
  logic clk = 0, rst_n = 0, en = 0, restart = 0, e_pos = 0;
  logic lock;
  logic signed [$clog2(M)+1:0] avg_sum;
  int checks = 0, failures = 0;

  lock_detector #(.M(M), .THRESH(THRESH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist[$];
  logic exp_lock;
  int locks = 0;

  task automatic step(input logic r, input logic v, input logic e);
    int s;
    restart = r; en = v; e_pos = e;
    @(posedge clk);
    // reference model
    exp_lock = 0;
    if (r) hist.delete();
    else if (v) begin
      hist.push_back(e ? 1 : -1);
      if (hist.size() > M) void'(hist.pop_front());
      if (hist.size() == M) begin
        s = 0;
        foreach (hist[i]) s += hist[i];
        if (s < THRESH && s > -THRESH) begin
          exp_lock = 1;
          hist.delete();
        end
      end
    end
    #1;
    checks++;
    if (lock !== exp_lock) begin
      failures++;
      if (failures < 10) $display("mismatch t=%0t lock=%b exp=%b", $time, lock, exp_lock);
    end
    if (lock) locks++;
  endtask

  initial begin
    int n0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // alternating: lock exactly after M samples
    step(1, 0, 0);
    for (int i = 0; i < M; i++) step(0, 1, i[0]);
    checks++;
    if (!lock) begin failures++; $display("alternating sequence did not lock after M samples"); end
    // constant +1: never locks
    n0 = locks;
    for (int i = 0; i < 3 * M; i++) step(0, 1, 1);
    checks++;
    if (locks != n0) begin failures++; $display("constant error locked"); end
    // random mixes with different biases, random restarts and gaps
    for (int i = 0; i < 20000; i++) begin
      int bias;
      bias = (i / 2000) % 4;
      step(($urandom % 200) == 0, ($urandom % 10) != 0,
           ($urandom % 8) < (bias == 0 ? 4 : bias == 1 ? 5 : bias == 2 ? 3 : 6));
    end
    checks++;
    if (locks < 10) begin failures++; $display("too few lock events: %0d", locks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
