// Self-checking testbench for ct_butterfly.
//
// Runs one butterfly per reduction method, each in its default 64-bit
// configuration (WLM-Mixed q_h 17, K^2-RED q_h 26, K^2-RED-Shift q_h 17 with
// pipeline A, Montgomery-Shift q_h 17 with pipeline B), and one 32-bit
// WLM-Mixed butterfly. Results and latencies are checked by bf_harness; the
// run also fails if the modular addition or subtraction never had to wrap.
// A watchdog ends the run with a failure if it does not finish.
module tb_ct_butterfly;
  import modred_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  always #5 clk = ~clk;

  localparam int N = 5;
  int   checks [N], failures [N], add_wraps [N], sub_wraps [N];
  logic done [N];

  bf_harness #(.RED(RED_WLM_MIXED), .BETA(64), .LOGQH(17)) h0 (
    .clk, .rst_n, .checks(checks[0]), .failures(failures[0]), .add_wraps(add_wraps[0]),
    .sub_wraps(sub_wraps[0]), .done(done[0]));
  bf_harness #(.RED(RED_K2RED), .BETA(64), .LOGQH(26)) h1 (
    .clk, .rst_n, .checks(checks[1]), .failures(failures[1]), .add_wraps(add_wraps[1]),
    .sub_wraps(sub_wraps[1]), .done(done[1]));
  bf_harness #(.RED(RED_K2RED_SHIFT), .BETA(64), .LOGQH(17), .PIPE(PIPE_A)) h2 (
    .clk, .rst_n, .checks(checks[2]), .failures(failures[2]), .add_wraps(add_wraps[2]),
    .sub_wraps(sub_wraps[2]), .done(done[2]));
  bf_harness #(.RED(RED_MONT_SHIFT), .BETA(64), .LOGQH(17), .PIPE(PIPE_B)) h3 (
    .clk, .rst_n, .checks(checks[3]), .failures(failures[3]), .add_wraps(add_wraps[3]),
    .sub_wraps(sub_wraps[3]), .done(done[3]));
  bf_harness #(.RED(RED_WLM_MIXED), .BETA(32), .LOGQH(15)) h4 (
    .clk, .rst_n, .checks(checks[4]), .failures(failures[4]), .add_wraps(add_wraps[4]),
    .sub_wraps(sub_wraps[4]), .done(done[4]));

  function automatic int total_checks();
    int s = 0;
    for (int i = 0; i < N; i++) s += checks[i] + 1;
    return s;
  endfunction

  function automatic int total_failures();
    int s = 0;
    for (int i = 0; i < N; i++) s += failures[i] + int'(add_wraps[i] == 0) + int'(sub_wraps[i] == 0);
    return s;
  endfunction

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    for (int i = 0; i < N; i++)
      $display("lane %0d: %0d checks, %0d add wraps, %0d sub wraps", i, checks[i], add_wraps[i], sub_wraps[i]);
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures());
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog: harnesses did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures() + 1);
    $finish;
  end

endmodule
