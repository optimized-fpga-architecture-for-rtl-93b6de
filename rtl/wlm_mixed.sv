// WLM-Mixed: mixed-radix word-level Montgomery reduction for Proth moduli.
//
// Reduces a double-width operand a < q^2 to b = a * 2^-BETA mod q, for a
// modulus q = q_h * 2^OMEGA + 1 whose high part q_h = q >> OMEGA has at most
// LOGQH bits (OMEGA = BETA - LOGQH). Because q = 1 mod 2^OMEGA, the
// Montgomery factor of every word is -1, so no multiplication by a
// precomputed constant is needed. Two word-level iterations remove first
// W0 = BETA - W1 and then W1 = min(GAMMA_A, OMEGA) low bits; W1 is chosen so
// that the second product q_h * t1' fits one GAMMA_A x GAMMA_B multiplier
// slice. Each iteration computes t' = -t_l mod 2^w, the carry
// c = t'[w-1] | t_l[w-1] (which is 1 exactly when t_l != 0) and
// t <- (t >> w) + (q_h * t' << (OMEGA - w)) + c. A final conditional
// subtraction of q brings the result below q.
//
// The datapath follows the two-iteration architecture published for
// BETA = 64, LOGQH = 17 on a 26x17 multiplier: the first product is split
// into two partial products (t0'[37:26] and t0'[25:0], shifted by 35 and 9),
// the second is one product shifted by 21, and the final subtractor's sign
// bit picks between t2 and t2 - q. Like that architecture it multiplies
// q_h by the negated word t'. The first iteration's t0' is tiled into
// GAMMA_A-bit pieces, so other sizes give the same structure.
//
// Pipeline (5 cycles, one operand per cycle): partial products of the first
// iteration | sum t1 | product of the second iteration | sum t2 | corrected
// b. out_valid is in_valid delayed by 5. q is a run-time configuration
// input and must stay constant while operands are in flight (this design's
// choice). Only the valid pipeline is reset (asynchronous, active low).
module wlm_mixed
  import modred_pkg::*;
#(
  parameter int unsigned BETA    = BETA_DEFAULT,  // modulus width
  parameter int unsigned LOGQH   = 17,            // width of q_h = q >> OMEGA
  parameter int unsigned GAMMA_A = DSP_GAMMA_A,   // wide operand of a multiplier slice
  parameter int unsigned GAMMA_B = DSP_GAMMA_B    // narrow operand of a multiplier slice
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [2*BETA-1:0] a,         // operand, a < q^2
  input  logic [BETA-1:0]   q,         // modulus q = q_h*2^OMEGA + 1
  output logic              out_valid,
  output logic [BETA-1:0]   b          // a * 2^-BETA mod q
);
  localparam int unsigned OMEGA = BETA - LOGQH;
  localparam int unsigned W1    = (GAMMA_A < OMEGA) ? GAMMA_A : OMEGA;
  localparam int unsigned W0    = BETA - W1;
  localparam int unsigned D0    = OMEGA - W0;           // alignment shift, iteration 0
  localparam int unsigned D1    = OMEGA - W1;           // alignment shift, iteration 1
  localparam int unsigned NP0   = (W0 + GAMMA_A - 1) / GAMMA_A;  // partial products, iteration 0
  localparam int unsigned PPW   = LOGQH + GAMMA_A;      // partial product width
  localparam int unsigned AHW   = 2*BETA - W0;          // width of a >> W0
  localparam int unsigned T1W   = 2*BETA - W0 + 1;      // width of t1
  localparam int unsigned T2W   = BETA + 1;             // width of t2 (t2 < 2q)
  localparam int unsigned LAT   = 5;

  // Elaboration-time checks of the modulus form.
  if (2 * OMEGA < BETA) begin : g_bad_omega
    $error("wlm_mixed: a Proth modulus needs OMEGA = BETA - LOGQH >= BETA/2");
  end
  if (LOGQH > GAMMA_B) begin : g_bad_qh
    $error("wlm_mixed: q_h must fit the narrow multiplier operand (LOGQH <= GAMMA_B)");
  end
  if (W0 > OMEGA) begin : g_bad_w0
    $error("wlm_mixed: the first word (BETA - W1) must not exceed OMEGA");
  end

  logic [LOGQH-1:0] qh;
  assign qh = q[BETA-1:OMEGA];

  // ---------------- iteration 0: combinational part ----------------
  logic [NP0*GAMMA_A-1:0] t0n;      // t0' = -a[W0-1:0] mod 2^W0, zero-padded to whole tiles
  logic                   c0;
  logic [PPW-1:0]         pp0 [NP0];

  always_comb begin
    t0n = '0;
    t0n[W0-1:0] = ~a[W0-1:0] + 1'b1;
    c0 = t0n[W0-1] | a[W0-1];
    for (int j = 0; j < NP0; j++) begin
      pp0[j] = PPW'(qh) * PPW'(t0n[j*GAMMA_A +: GAMMA_A]);
    end
  end

  // stage 1: partial products, a >> W0 and carry
  logic [PPW-1:0] pp0_r [NP0];
  logic [AHW-1:0] ah_r;
  logic           c0_r;

  always_ff @(posedge clk) begin
    for (int j = 0; j < NP0; j++) pp0_r[j] <= pp0[j];
    ah_r <= a[2*BETA-1:W0];
    c0_r <= c0;
  end

  // stage 2: t1 = (a >> W0) + (q_h * t0' << D0) + c0
  logic [T1W-1:0] t1_sum, t1_r;

  always_comb begin
    t1_sum = T1W'(ah_r) + T1W'(c0_r);
    for (int j = 0; j < NP0; j++) begin
      t1_sum = t1_sum + (T1W'(pp0_r[j]) << (j*GAMMA_A + D0));
    end
  end

  always_ff @(posedge clk) t1_r <= t1_sum;

  // ---------------- iteration 1 ----------------
  logic [W1-1:0]  t1n;
  logic           c1;
  logic [LOGQH+W1-1:0] pp1;

  always_comb begin
    t1n = ~t1_r[W1-1:0] + 1'b1;
    c1  = t1n[W1-1] | t1_r[W1-1];
    pp1 = (LOGQH+W1)'(qh) * (LOGQH+W1)'(t1n);
  end

  // stage 3: product, t1 >> W1 and carry
  logic [LOGQH+W1-1:0] pp1_r;
  logic [T1W-W1-1:0]   t1h_r;
  logic                c1_r;

  always_ff @(posedge clk) begin
    pp1_r <= pp1;
    t1h_r <= t1_r[T1W-1:W1];
    c1_r  <= c1;
  end

  // stage 4: t2 = (t1 >> W1) + (q_h * t1' << D1) + c1
  logic [T2W-1:0] t2_r;

  always_ff @(posedge clk) begin
    t2_r <= T2W'(t1h_r) + (T2W'(pp1_r) << D1) + T2W'(c1_r);
  end

  // stage 5: b = t2 - q if that is not negative, else t2
  logic [T2W-1:0] diff;
  assign diff = t2_r - T2W'(q);

  always_ff @(posedge clk) begin
    b <= diff[T2W-1] ? t2_r[BETA-1:0] : diff[BETA-1:0];
  end

  // valid pipeline
  logic [LAT-1:0] vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LAT-2:0], in_valid};
  end

  assign out_valid = vld[LAT-1];

endmodule
