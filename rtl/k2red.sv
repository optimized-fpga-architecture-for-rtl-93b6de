// K2RED: K^2-RED modular reduction for Proth moduli, built on multipliers.
//
// For a modulus q = q_h * 2^OMEGA + 1 with OMEGA = BETA - LOGQH >= BETA/2,
// q_h * 2^OMEGA = -1 (mod q). Splitting a = a_h*2^OMEGA + a_l therefore gives
// q_h*a_l - a_h = q_h*a (mod q). Applying this twice,
//   t  = q_h*a_l - a_h,           t_l = t mod 2^OMEGA, t_h = t >>> OMEGA
//   t' = q_h*t_l - t_h,
// yields t' = q_h^2 * a = a * 2^-(2*OMEGA) (mod q), with -q < t' < 2q. A final
// step adds or subtracts q once, so b = a * 2^-(2*OMEGA) mod q in [0, q).
//
// The multiplications follow the published architecture for BETA = 64,
// LOGQH = 26 on a 26x17 multiplier: the OMEGA-bit low word is cut into
// GAMMA_B-bit pieces ([16:0], [33:17], [37:34]), each multiplied by the
// full q_h and shifted by 0, 17 and 34, and a_h (then t_h, sign-extended) is
// subtracted by adding its two's complement. t is 2*BETA-OMEGA+2 bits
// signed (92 bits at the default), t' is BETA+2 bits signed (66 bits).
// The figure of that architecture omits the final correction; it is
// included here as the text's pipeline places a register after it.
//
// Pipeline (5 cycles, one operand per cycle): partial products of q_h*a_l
// and -a_h | sum t | partial products of q_h*t_l and -t_h | sum t' |
// corrected b. out_valid is in_valid delayed by 5. q must stay constant
// while operands are in flight (this design's choice); only the valid
// pipeline is reset (asynchronous, active low).
module k2red
  import modred_pkg::*;
#(
  parameter int unsigned BETA    = BETA_DEFAULT,  // modulus width
  parameter int unsigned LOGQH   = 26,            // width of q_h = q >> OMEGA
  parameter int unsigned GAMMA_B = DSP_GAMMA_B    // narrow operand of a multiplier slice
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [2*BETA-1:0] a,         // operand, a <= (q-1)^2
  input  logic [BETA-1:0]   q,         // modulus q = q_h*2^OMEGA + 1
  output logic              out_valid,
  output logic [BETA-1:0]   b          // a * 2^-(2*OMEGA) mod q
);
  localparam int unsigned OMEGA = BETA - LOGQH;
  localparam int unsigned NT    = (OMEGA + GAMMA_B - 1) / GAMMA_B;  // pieces of the low word
  localparam int unsigned PPW   = LOGQH + GAMMA_B;     // partial product width
  localparam int unsigned TW    = 2*BETA - OMEGA + 2;  // signed width of t
  localparam int unsigned THW   = TW - OMEGA;          // signed width of t_h
  localparam int unsigned T2W   = BETA + 2;            // signed width of t'
  localparam int unsigned LAT   = 5;

  // Elaboration-time check of the modulus form.
  if (2 * OMEGA < BETA) begin : g_bad_omega
    $error("k2red: a Proth modulus needs OMEGA = BETA - LOGQH >= BETA/2");
  end

  logic [LOGQH-1:0] qh;
  assign qh = q[BETA-1:OMEGA];

  // ---------------- line 2: t = q_h*a_l - a_h ----------------
  logic [NT*GAMMA_B-1:0] al;
  logic [PPW-1:0]        ppa [NT];

  always_comb begin
    al = '0;
    al[OMEGA-1:0] = a[OMEGA-1:0];
    for (int j = 0; j < NT; j++) ppa[j] = PPW'(qh) * PPW'(al[j*GAMMA_B +: GAMMA_B]);
  end

  // stage 1
  logic [PPW-1:0] ppa_r [NT];
  logic [TW-1:0]  nah_r;         // -a_h, two's complement

  always_ff @(posedge clk) begin
    for (int j = 0; j < NT; j++) ppa_r[j] <= ppa[j];
    nah_r <= ~TW'(a[2*BETA-1:OMEGA]) + 1'b1;
  end

  // stage 2
  logic [TW-1:0] t_sum, t_r;

  always_comb begin
    t_sum = nah_r;
    for (int j = 0; j < NT; j++) t_sum = t_sum + (TW'(ppa_r[j]) << (j*GAMMA_B));
  end

  always_ff @(posedge clk) t_r <= t_sum;

  // ---------------- line 4: t' = q_h*t_l - t_h ----------------
  logic [NT*GAMMA_B-1:0] tl;
  logic [PPW-1:0]        ppt [NT];
  logic [THW-1:0]        th;

  always_comb begin
    tl = '0;
    tl[OMEGA-1:0] = t_r[OMEGA-1:0];
    for (int j = 0; j < NT; j++) ppt[j] = PPW'(qh) * PPW'(tl[j*GAMMA_B +: GAMMA_B]);
    th = t_r[TW-1:OMEGA];
  end

  // stage 3
  logic [PPW-1:0] ppt_r [NT];
  logic [T2W-1:0] nth_r;         // -t_h, t_h sign-extended first

  always_ff @(posedge clk) begin
    for (int j = 0; j < NT; j++) ppt_r[j] <= ppt[j];
    nth_r <= ~T2W'($signed(th)) + 1'b1;
  end

  // stage 4
  logic [T2W-1:0] t2_sum, t2_r;

  always_comb begin
    t2_sum = nth_r;
    for (int j = 0; j < NT; j++) t2_sum = t2_sum + (T2W'(ppt_r[j]) << (j*GAMMA_B));
  end

  always_ff @(posedge clk) t2_r <= t2_sum;

  // ---------------- lines 5-7: correction into [0, q) ----------------
  logic signed [T2W-1:0] tp, tp_minus_q;
  logic        [BETA-1:0] tp_plus_q;   // only used when -q < t' < 0, so BETA bits suffice

  always_comb begin
    tp         = $signed(t2_r);
    tp_minus_q = tp - $signed(T2W'(q));
    tp_plus_q  = t2_r[BETA-1:0] + q;
  end

  // stage 5
  always_ff @(posedge clk) begin
    if (!tp_minus_q[T2W-1])  b <= tp_minus_q[BETA-1:0];   // t' >= q
    else if (tp[T2W-1])      b <= tp_plus_q;    // t' < 0
    else                     b <= tp[BETA-1:0];
  end

  // valid pipeline
  logic [LAT-1:0] vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LAT-2:0], in_valid};
  end

  assign out_valid = vld[LAT-1];

endmodule
