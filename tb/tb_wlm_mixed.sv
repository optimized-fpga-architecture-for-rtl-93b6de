// Self-checking testbench for wlm_mixed.
//
// Two sizes: the default 64-bit modulus with a 17-bit q_h and a 32-bit
// modulus with a 15-bit q_h (word sizes 15 and 17).
// Each harness streams operands through its own instance, compares every
// result with an independently computed a * 2^-k mod q and checks the
// pipeline latency. A watchdog ends the run with a failure if the harnesses
// do not finish.
module tb_wlm_mixed;
  import modred_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  always #5 clk = ~clk;

  int   checks_0, failures_0;
  logic done_0;
  red_harness #(.KIND(RED_WLM_MIXED), .BETA(64), .LOGQH(17)) h0 (.clk, .rst_n, .checks(checks_0), .failures(failures_0), .done(done_0));

  int   checks_1, failures_1;
  logic done_1;
  red_harness #(.KIND(RED_WLM_MIXED), .BETA(32), .LOGQH(15)) h1 (.clk, .rst_n, .checks(checks_1), .failures(failures_1), .done(done_1));

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (done_0 && done_1 && 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks_0 + checks_1 + 0, failures_0 + failures_1 + 0);
    $finish;
  end

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: harnesses did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks_0 + checks_1 + 0, failures_0 + failures_1 + 0 + 1);
    $finish;
  end

endmodule
