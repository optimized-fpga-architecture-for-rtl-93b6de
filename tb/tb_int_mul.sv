// Self-checking testbench for int_mul.
//
// Streams random and corner-case operand pairs (0, all ones, single bits)
// with random idle cycles through a 64-bit multiplier of latency 2 and a
// 32-bit one of latency 1, and checks every product and its latency against
// a plain 128-bit product computed here. A watchdog ends the run with a
// failure if it does not finish.
module tb_int_mul;

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // 64-bit, default latency
  logic         v0_in, v0_out;
  logic [63:0]  x0, y0;
  logic [127:0] p0;

  int_mul dut0 (.clk, .rst_n, .in_valid(v0_in), .x(x0), .y(y0), .out_valid(v0_out), .p(p0));

  // 32-bit, latency 1
  logic         v1_in, v1_out;
  logic [31:0]  x1, y1;
  logic [63:0]  p1;

  int_mul #(.BETA(32), .LAT(1)) dut1 (.clk, .rst_n, .in_valid(v1_in), .x(x1), .y(y1), .out_valid(v1_out), .p(p1));

  typedef struct { logic [127:0] exp; int cyc; } item_t;
  item_t q0[$], q1[$];

  always @(negedge clk) begin
    if (rst_n && v0_out) begin
      item_t it;
      checks++;
      it = q0.pop_front();
      if (p0 !== it.exp || cyc - it.cyc != 2) begin
        failures++;
        $display("dut0: got %h after %0d, expected %h", p0, cyc - it.cyc, it.exp);
      end
    end
    if (rst_n && v1_out) begin
      item_t it;
      checks++;
      it = q1.pop_front();
      if (128'(p1) !== it.exp || cyc - it.cyc != 1) begin
        failures++;
        $display("dut1: got %h after %0d, expected %h", p1, cyc - it.cyc, it.exp);
      end
    end
  end

  function automatic logic [63:0] pick(int unsigned sel);
    case (sel)
      0: return '0;
      1: return '1;
      2: return 64'(1) << ($urandom % 64);
      default: return {$urandom, $urandom};
    endcase
  endfunction

  int sent = 0;

  initial begin
    v0_in = 0; v1_in = 0; x0 = 0; y0 = 0; x1 = 0; y1 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      logic [63:0] a, b;
      @(negedge clk);
      a = pick($urandom % 6);
      b = pick($urandom % 6);
      v0_in = ($urandom % 4) != 0;
      v1_in = ($urandom % 4) != 0;
      x0 = a; y0 = b; x1 = a[63:32]; y1 = b[31:0];
      if (v0_in) q0.push_back('{exp: 128'(a) * 128'(b), cyc: cyc});
      if (v1_in) q1.push_back('{exp: 128'(a[63:32]) * 128'(b[31:0]), cyc: cyc});
      sent += int'(v0_in) + int'(v1_in);
    end
    @(negedge clk);
    v0_in = 0; v1_in = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (q0.size() != 0 || q1.size() != 0) begin
      failures++;
      $display("%0d products missing", q0.size() + q1.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog: run did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
