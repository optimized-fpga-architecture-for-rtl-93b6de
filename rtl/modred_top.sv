// MODRED_TOP: four NTT butterfly lanes, one per modular-reduction method.
//
// The design studies how the modular reduction inside an NTT butterfly
// should be built for 64-bit RNS moduli. This top places one Cooley-Tukey
// butterfly per reduction method side by side, each in the configuration
// the published evaluation uses for 64-bit moduli:
//   lane 0  WLM-Mixed        q_h 17 bits, 26x17 multiplier tiling   (latency 2+5+1)
//   lane 1  K^2-RED          q_h 26 bits, 26x17 multiplier tiling   (latency 2+5+1)
//   lane 2  K^2-RED-Shift    q_h 17 bits, Proth-3l, pipeline A      (latency 2+5+1)
//   lane 3  Montgomery-Shift q_h 17 bits, Proth-3l, pipeline B      (latency 2+4+1)
// Lane indices equal the red_kind_e values. The lanes are independent: each
// has its own valid, coefficients, pre-scaled twiddle (see ct_butterfly)
// and modulus, since each method needs a modulus of its own form; the two
// shift-add lanes also take the run-time exponents l1..l3 of their Proth-l
// modulus. The memories, address generation and twiddle storage of a full
// NTT core are not part of this design; a core would instantiate one of
// these lanes per processing element.
module modred_top
  import modred_pkg::*;
#(
  parameter int unsigned BETA        = BETA_DEFAULT,
  parameter int unsigned LOGQH_WLMM  = 17,
  parameter int unsigned LOGQH_K2RED = 26,
  parameter int unsigned LOGQH_K2RS  = 17,
  parameter int unsigned LOGQH_MSH   = 17,
  parameter int unsigned MUL_LAT     = 2,
  localparam int unsigned NL         = 4,
  localparam int unsigned LW_K2RS    = $clog2(LOGQH_K2RS - 1),
  localparam int unsigned LW_MSH     = $clog2(LOGQH_MSH - 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NL-1:0]            in_valid,
  input  logic [NL-1:0][BETA-1:0]  x,
  input  logic [NL-1:0][BETA-1:0]  y,
  input  logic [NL-1:0][BETA-1:0]  w,
  input  logic [NL-1:0][BETA-1:0]  q,
  input  logic [LW_K2RS-1:0]       k2rs_l1,
  input  logic [LW_K2RS-1:0]       k2rs_l2,
  input  logic [LW_K2RS-1:0]       k2rs_l3,
  input  logic [LW_MSH-1:0]        msh_l1,
  input  logic [LW_MSH-1:0]        msh_l2,
  input  logic [LW_MSH-1:0]        msh_l3,
  output logic [NL-1:0]            out_valid,
  output logic [NL-1:0][BETA-1:0]  xo,
  output logic [NL-1:0][BETA-1:0]  yo
);

  ct_butterfly #(
    .RED(RED_WLM_MIXED), .BETA(BETA), .LOGQH(LOGQH_WLMM), .MUL_LAT(MUL_LAT)
  ) u_bf_wlmm (
    .clk, .rst_n,
    .in_valid(in_valid[RED_WLM_MIXED]), .x(x[RED_WLM_MIXED]), .y(y[RED_WLM_MIXED]),
    .w(w[RED_WLM_MIXED]), .q(q[RED_WLM_MIXED]),
    .l1('0), .l2('0), .l3('0),
    .out_valid(out_valid[RED_WLM_MIXED]), .xo(xo[RED_WLM_MIXED]), .yo(yo[RED_WLM_MIXED])
  );

  ct_butterfly #(
    .RED(RED_K2RED), .BETA(BETA), .LOGQH(LOGQH_K2RED), .MUL_LAT(MUL_LAT)
  ) u_bf_k2red (
    .clk, .rst_n,
    .in_valid(in_valid[RED_K2RED]), .x(x[RED_K2RED]), .y(y[RED_K2RED]),
    .w(w[RED_K2RED]), .q(q[RED_K2RED]),
    .l1('0), .l2('0), .l3('0),
    .out_valid(out_valid[RED_K2RED]), .xo(xo[RED_K2RED]), .yo(yo[RED_K2RED])
  );

  ct_butterfly #(
    .RED(RED_K2RED_SHIFT), .BETA(BETA), .LOGQH(LOGQH_K2RS), .L3_EN(1'b1), .PIPE(PIPE_A),
    .MUL_LAT(MUL_LAT)
  ) u_bf_k2rs (
    .clk, .rst_n,
    .in_valid(in_valid[RED_K2RED_SHIFT]), .x(x[RED_K2RED_SHIFT]), .y(y[RED_K2RED_SHIFT]),
    .w(w[RED_K2RED_SHIFT]), .q(q[RED_K2RED_SHIFT]),
    .l1(k2rs_l1), .l2(k2rs_l2), .l3(k2rs_l3),
    .out_valid(out_valid[RED_K2RED_SHIFT]), .xo(xo[RED_K2RED_SHIFT]), .yo(yo[RED_K2RED_SHIFT])
  );

  ct_butterfly #(
    .RED(RED_MONT_SHIFT), .BETA(BETA), .LOGQH(LOGQH_MSH), .L3_EN(1'b1), .PIPE(PIPE_B),
    .MUL_LAT(MUL_LAT)
  ) u_bf_msh (
    .clk, .rst_n,
    .in_valid(in_valid[RED_MONT_SHIFT]), .x(x[RED_MONT_SHIFT]), .y(y[RED_MONT_SHIFT]),
    .w(w[RED_MONT_SHIFT]), .q(q[RED_MONT_SHIFT]),
    .l1(msh_l1), .l2(msh_l2), .l3(msh_l3),
    .out_valid(out_valid[RED_MONT_SHIFT]), .xo(xo[RED_MONT_SHIFT]), .yo(yo[RED_MONT_SHIFT])
  );

endmodule
