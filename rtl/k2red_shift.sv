// K2RED_SHIFT: multiplication-free K^2-RED reduction for Proth-l moduli.
//
// The modulus is a Proth-l prime
//   q = 2^(BETA-1) + (2^l1 - 2^l2 + 2^l3) * 2^OMEGA + 1,   OMEGA = BETA - LOGQH,
// so q_h = 2^(LOGQH-1) + 2^l1 - 2^l2 + 2^l3 has at most four signed non-zero
// digits and every product by q_h is a sum of shifted copies: one fixed
// shift by LOGQH-1 and three run-time barrel shifts by l1, l2 and l3. With
// L3_EN = 0 the l3 term is dropped (Proth-2l primes, four barrel shifters
// instead of six) and the l3 input is ignored. The steps are those of K^2-RED:
//   t  = (a_l<<(LOGQH-1)) + (a_l<<l1) + (a_l<<l3) - ((a_l<<l2) + a_h)
//   t' = (t_l<<(LOGQH-1)) + (t_l<<l1) + (t_l<<l3) - ((t_l<<l2) + t_h)
// with a = a_h*2^OMEGA + a_l and t = t_h*2^OMEGA + t_l (t_h arithmetic), and
// a final correction that adds or subtracts q once, giving
// b = a * 2^-(2*OMEGA) mod q. l1, l2, l3 are LW = clog2(LOGQH-1) bits wide
// and must satisfy 0 <= l2 <= l1 < LOGQH-1 and l3 < LOGQH-1; q must be the
// modulus these values and the design-time BETA, LOGQH describe.
//
// PIPE selects the pipeline. PIPE_A registers the shifted terms in one
// cycle and adds them in the next: 5 cycles (terms | t | terms | t' | b).
// PIPE_B shifts and adds in the same cycle: 3 cycles (t | t' | b). The
// register placement follows the published pipelines; the split of the
// correction and the reset of only the valid pipeline (asynchronous,
// active low) are this design's choices. q and l1..l3 are configuration
// inputs that must stay constant while operands are in flight.
module k2red_shift
  import modred_pkg::*;
#(
  parameter int unsigned BETA  = BETA_DEFAULT,  // modulus width
  parameter int unsigned LOGQH = 17,            // width of q_h = q >> OMEGA
  parameter bit          L3_EN = 1'b1,          // 1: Proth-3l moduli, 0: Proth-2l moduli
  parameter pipe_cfg_e   PIPE  = PIPE_A,        // pipeline configuration
  localparam int unsigned LW   = $clog2(LOGQH - 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [2*BETA-1:0] a,         // operand, a <= (q-1)^2
  input  logic [BETA-1:0]   q,         // modulus
  input  logic [LW-1:0]     l1,        // shift exponents of q_h
  input  logic [LW-1:0]     l2,
  input  logic [LW-1:0]     l3,
  output logic              out_valid,
  output logic [BETA-1:0]   b          // a * 2^-(2*OMEGA) mod q
);
  localparam int unsigned OMEGA = BETA - LOGQH;
  localparam int unsigned K     = LOGQH - 1;           // fixed shift of the leading digit
  localparam int unsigned AHW   = 2*BETA - OMEGA;      // width of a_h
  localparam int unsigned TW    = 2*BETA - OMEGA + 2;  // signed width of t
  localparam int unsigned THW   = TW - OMEGA;          // signed width of t_h
  localparam int unsigned T2W   = BETA + 2;            // signed width of t'
  localparam int unsigned LAT   = red_latency(RED_K2RED_SHIFT, PIPE);

  // Elaboration-time check of the modulus form.
  if (2 * OMEGA < BETA) begin : g_bad_omega
    $error("k2red_shift: a Proth modulus needs OMEGA = BETA - LOGQH >= BETA/2");
  end

  // ---------------- line 2: shifted copies of a_l ----------------
  logic [BETA-1:0] a0, a1, a2, a3;
  logic [AHW-1:0]  ah;

  always_comb begin
    a0 = BETA'(a[OMEGA-1:0]) << K;
    a1 = BETA'(a[OMEGA-1:0]) << l1;
    a2 = BETA'(a[OMEGA-1:0]) << l2;
    a3 = L3_EN ? (BETA'(a[OMEGA-1:0]) << l3) : '0;
    ah = a[2*BETA-1:OMEGA];
  end

  logic [BETA-1:0] a0_q, a1_q, a2_q, a3_q;
  logic [AHW-1:0]  ah_q;

  if (PIPE == PIPE_A) begin : g_terms1_reg
    always_ff @(posedge clk) begin
      a0_q <= a0; a1_q <= a1; a2_q <= a2; a3_q <= a3; ah_q <= ah;
    end
  end else begin : g_terms1_comb
    always_comb begin
      a0_q = a0; a1_q = a1; a2_q = a2; a3_q = a3; ah_q = ah;
    end
  end

  logic [TW-1:0] t_r;

  always_ff @(posedge clk) begin
    t_r <= TW'(a0_q) + TW'(a1_q) + TW'(a3_q) - (TW'(a2_q) + TW'(ah_q));
  end

  // ---------------- line 4: shifted copies of t_l ----------------
  logic [BETA-1:0] b0, b1, b2, b3;
  logic [THW-1:0]  th;

  always_comb begin
    b0 = BETA'(t_r[OMEGA-1:0]) << K;
    b1 = BETA'(t_r[OMEGA-1:0]) << l1;
    b2 = BETA'(t_r[OMEGA-1:0]) << l2;
    b3 = L3_EN ? (BETA'(t_r[OMEGA-1:0]) << l3) : '0;
    th = t_r[TW-1:OMEGA];
  end

  logic [BETA-1:0] b0_q, b1_q, b2_q, b3_q;
  logic [THW-1:0]  th_q;

  if (PIPE == PIPE_A) begin : g_terms2_reg
    always_ff @(posedge clk) begin
      b0_q <= b0; b1_q <= b1; b2_q <= b2; b3_q <= b3; th_q <= th;
    end
  end else begin : g_terms2_comb
    always_comb begin
      b0_q = b0; b1_q = b1; b2_q = b2; b3_q = b3; th_q = th;
    end
  end

  logic [T2W-1:0] t2_r;

  always_ff @(posedge clk) begin
    t2_r <= T2W'(b0_q) + T2W'(b1_q) + T2W'(b3_q) - (T2W'(b2_q) + T2W'($signed(th_q)));
  end

  // ---------------- lines 5-7: correction into [0, q) ----------------
  logic signed [T2W-1:0] tp, tp_minus_q;
  logic        [BETA-1:0] tp_plus_q;   // only used when -q < t' < 0, so BETA bits suffice

  always_comb begin
    tp         = $signed(t2_r);
    tp_minus_q = tp - $signed(T2W'(q));
    tp_plus_q  = t2_r[BETA-1:0] + q;
  end

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
