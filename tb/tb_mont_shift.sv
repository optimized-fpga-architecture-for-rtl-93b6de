// Self-checking testbench for mont_shift.
//
// Both pipelines, Proth-3l and Proth-2l moduli, 64-bit (q_h 17 and 32
// bits) and 32-bit (q_h 15 bits) sizes.
// Each harness streams operands through its own instance, compares every
// result with an independently computed a * 2^-k mod q and checks the
// pipeline latency. A watchdog ends the run with a failure if the harnesses
// do not finish.
module tb_mont_shift;
  import modred_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  always #5 clk = ~clk;

  int   checks_0, failures_0;
  logic done_0;
  red_harness #(.KIND(RED_MONT_SHIFT), .BETA(64), .LOGQH(17), .L3_EN(1'b1), .PIPE(PIPE_B)) h0 (.clk, .rst_n, .checks(checks_0), .failures(failures_0), .done(done_0));

  int   checks_1, failures_1;
  logic done_1;
  red_harness #(.KIND(RED_MONT_SHIFT), .BETA(64), .LOGQH(17), .L3_EN(1'b1), .PIPE(PIPE_A)) h1 (.clk, .rst_n, .checks(checks_1), .failures(failures_1), .done(done_1));

  int   checks_2, failures_2;
  logic done_2;
  red_harness #(.KIND(RED_MONT_SHIFT), .BETA(64), .LOGQH(32), .L3_EN(1'b0), .PIPE(PIPE_B)) h2 (.clk, .rst_n, .checks(checks_2), .failures(failures_2), .done(done_2));

  int   checks_3, failures_3;
  logic done_3;
  red_harness #(.KIND(RED_MONT_SHIFT), .BETA(32), .LOGQH(15), .L3_EN(1'b0), .PIPE(PIPE_A)) h3 (.clk, .rst_n, .checks(checks_3), .failures(failures_3), .done(done_3));

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (done_0 && done_1 && done_2 && done_3 && 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks_0 + checks_1 + checks_2 + checks_3 + 0, failures_0 + failures_1 + failures_2 + failures_3 + 0);
    $finish;
  end

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: harnesses did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks_0 + checks_1 + checks_2 + checks_3 + 0, failures_0 + failures_1 + failures_2 + failures_3 + 0 + 1);
    $finish;
  end

endmodule
