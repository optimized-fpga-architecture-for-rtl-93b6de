// INT_MUL: pipelined unsigned BETA x BETA integer multiplier.
//
// The integer-multiplication half of a modular multiplication: it forms
// the double-width product p = x * y that a reduction unit then brings back
// below the modulus. The operands are registered, multiplied, and the
// product passes through LAT-1 further registers, so p appears LAT cycles
// after x and y (LAT >= 1), one product per cycle. out_valid is in_valid
// delayed by LAT. The multiplier is written as a plain product and left to
// synthesis to map onto multiplier slices; its tiling and its latency are
// this design's choices. Only the valid pipeline is reset (asynchronous,
// active low).
module int_mul
  import modred_pkg::*;
#(
  parameter int unsigned BETA = BETA_DEFAULT,  // operand width
  parameter int unsigned LAT  = 2              // latency in cycles
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [BETA-1:0]   x,
  input  logic [BETA-1:0]   y,
  output logic              out_valid,
  output logic [2*BETA-1:0] p          // x * y
);
  logic [BETA-1:0]   x_r, y_r;
  logic [2*BETA-1:0] pipe [LAT];

  always_ff @(posedge clk) begin
    x_r <= x;
    y_r <= y;
  end

  always_comb pipe[0] = (2*BETA)'(x_r) * (2*BETA)'(y_r);

  for (genvar i = 1; i < LAT; i++) begin : g_stage
    always_ff @(posedge clk) pipe[i] <= pipe[i-1];
  end

  assign p = pipe[LAT-1];

  // valid pipeline: vld[i] is in_valid delayed by i+1 cycles
  logic [LAT-1:0] vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= LAT'({vld, in_valid});
  end

  assign out_valid = vld[LAT-1];

endmodule
