// CT_BUTTERFLY: Cooley-Tukey NTT butterfly with a selectable reduction unit.
//
// Computes (x', y') = (x + y*z, x - y*z) mod q for coefficients x, y < q and
// a twiddle factor z. The product y*z is formed by int_mul and reduced by
// one of the four reduction datapaths, chosen at design time by RED. Every
// reduction leaves a constant factor 2^-k in its result (k = BETA for
// WLM-Mixed and Montgomery-Shift, k = 2*OMEGA for the two K^2-RED units), so
// the twiddle input w must be given pre-scaled as w = z * 2^k mod q; the
// reduced product is then exactly y*z mod q. The final modular addition and
// subtraction each use one conditional correction by q.
//
// Interface: one butterfly per cycle; x and y enter with in_valid, and
// (x', y') leave with out_valid MUL_LAT + red_latency(RED, PIPE) + 1 cycles
// later. x travels alongside the multiplier and the reduction in a delay
// line. q (and l1..l3 for the shift-add reductions, ignored otherwise) are
// configuration inputs that must stay constant while butterflies are in
// flight. The butterfly equation and the choice of reductions follow the
// published design; the twiddle pre-scaling, the multiplier latency and
// the add/sub stage are this design's own choices.
module ct_butterfly
  import modred_pkg::*;
#(
  parameter red_kind_e   RED     = RED_WLM_MIXED,  // reduction datapath
  parameter int unsigned BETA    = BETA_DEFAULT,   // modulus width
  parameter int unsigned LOGQH   = 17,             // width of q_h = q >> (BETA - LOGQH)
  parameter bit          L3_EN   = 1'b1,           // shift-add reductions: Proth-3l moduli
  parameter pipe_cfg_e   PIPE    = PIPE_B,         // shift-add reductions: pipeline
  parameter int unsigned MUL_LAT = 2,              // integer multiplier latency
  localparam int unsigned LW     = $clog2(LOGQH - 1),
  localparam int unsigned LAT    = MUL_LAT + red_latency(RED, PIPE) + 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [BETA-1:0] x,          // coefficient a_i, < q
  input  logic [BETA-1:0] y,          // coefficient a_j, < q
  input  logic [BETA-1:0] w,          // twiddle z * 2^k mod q
  input  logic [BETA-1:0] q,          // modulus
  input  logic [LW-1:0]   l1,         // Proth-l exponents (shift-add reductions only)
  input  logic [LW-1:0]   l2,
  input  logic [LW-1:0]   l3,
  output logic            out_valid,
  output logic [BETA-1:0] xo,         // x + y*z mod q
  output logic [BETA-1:0] yo          // x - y*z mod q
);
  localparam int unsigned XD = LAT - 1;  // delay of x: multiplier plus reduction

  // ---------------- y * w ----------------
  logic              prod_valid;
  logic [2*BETA-1:0] prod;

  int_mul #(.BETA(BETA), .LAT(MUL_LAT)) u_mul (
    .clk, .rst_n, .in_valid,
    .x(y), .y(w),
    .out_valid(prod_valid), .p(prod)
  );

  // ---------------- reduction ----------------
  logic            red_valid;
  logic [BETA-1:0] red;

  if (RED == RED_WLM_MIXED) begin : g_wlmm
    wlm_mixed #(.BETA(BETA), .LOGQH(LOGQH)) u_red (
      .clk, .rst_n, .in_valid(prod_valid), .a(prod), .q,
      .out_valid(red_valid), .b(red)
    );
  end else if (RED == RED_K2RED) begin : g_k2red
    k2red #(.BETA(BETA), .LOGQH(LOGQH)) u_red (
      .clk, .rst_n, .in_valid(prod_valid), .a(prod), .q,
      .out_valid(red_valid), .b(red)
    );
  end else if (RED == RED_K2RED_SHIFT) begin : g_k2rs
    k2red_shift #(.BETA(BETA), .LOGQH(LOGQH), .L3_EN(L3_EN), .PIPE(PIPE)) u_red (
      .clk, .rst_n, .in_valid(prod_valid), .a(prod), .q, .l1, .l2, .l3,
      .out_valid(red_valid), .b(red)
    );
  end else begin : g_msh
    mont_shift #(.BETA(BETA), .LOGQH(LOGQH), .L3_EN(L3_EN), .PIPE(PIPE)) u_red (
      .clk, .rst_n, .in_valid(prod_valid), .a(prod), .q, .l1, .l2, .l3,
      .out_valid(red_valid), .b(red)
    );
  end

  // ---------------- x delay line ----------------
  logic [BETA-1:0] xd [XD];

  always_ff @(posedge clk) begin
    xd[0] <= x;
    for (int i = 1; i < XD; i++) xd[i] <= xd[i-1];
  end

  // ---------------- modular add and subtract ----------------
  logic [BETA:0] sum, sum_mq, dif;

  always_comb begin
    sum    = (BETA+1)'(xd[XD-1]) + (BETA+1)'(red);
    sum_mq = sum - (BETA+1)'(q);
    dif    = (BETA+1)'(xd[XD-1]) - (BETA+1)'(red);
  end

  always_ff @(posedge clk) begin
    xo <= sum_mq[BETA] ? sum[BETA-1:0] : sum_mq[BETA-1:0];  // wrap when x + p >= q
    yo <= dif[BETA] ? (dif[BETA-1:0] + q) : dif[BETA-1:0];   // wrap when x < p
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= red_valid;
  end

endmodule
