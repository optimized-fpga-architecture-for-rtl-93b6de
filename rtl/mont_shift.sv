// MONT_SHIFT: multiplication-free Montgomery reduction for Proth-l moduli.
//
// The modulus is a Proth-l prime
//   q = 2^(BETA-1) + (2^l1 - 2^l2 + 2^l3) * 2^OMEGA + 1,   OMEGA = BETA - LOGQH.
// Its Montgomery factor q' = -q^-1 mod 2^BETA equals q - 2, because
// (q_h*2^OMEGA + 1)(q_h*2^OMEGA - 1) = -1 mod 2^BETA when 2*OMEGA >= BETA.
// Both Montgomery products are therefore sums of shifted copies, with one
// fixed shift by BETA-1 and three run-time barrel shifts by l1+OMEGA,
// l2+OMEGA and l3+OMEGA:
//   t   = q' * a_l mod 2^BETA,     a = a_h*2^BETA + a_l
//   t'  = q * t                    (exact, 2*BETA bits)
//   c   = t'[BETA-1] | a_l[BETA-1] (carry of a_l + t' mod 2^BETA, 1 iff a_l != 0)
//   b'  = a_h + (t' >> BETA) + c   (< 2q)
//   b   = b' >= q ? b' - q : b'    = a * 2^-BETA mod q
// With L3_EN = 0 the l3 term is dropped (Proth-2l primes) and the l3 input is
// ignored. l1, l2, l3 are LW = clog2(LOGQH-1) bits wide and must satisfy
// 0 <= l2 <= l1 < LOGQH-1 and l3 < LOGQH-1; q must be the modulus they
// describe.
//
// PIPE_B (the default) shifts and adds in the same cycle: 4 cycles
// (t | t' | b' | b). PIPE_A registers the shifted terms before each sum:
// 6 cycles (terms | t | terms | t' | b' | b). a_h and a_l[BETA-1] travel
// along in delay registers. The register placement follows the published
// pipelines; resetting only the valid pipeline (asynchronous, active low)
// is this design's choice. q and l1..l3 are configuration inputs that
// must stay constant while operands are in flight.
module mont_shift
  import modred_pkg::*;
#(
  parameter int unsigned BETA  = BETA_DEFAULT,  // modulus width
  parameter int unsigned LOGQH = 17,            // width of q_h = q >> OMEGA
  parameter bit          L3_EN = 1'b1,          // 1: Proth-3l moduli, 0: Proth-2l moduli
  parameter pipe_cfg_e   PIPE  = PIPE_B,        // pipeline configuration
  localparam int unsigned LW   = $clog2(LOGQH - 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [2*BETA-1:0] a,         // operand, a < q^2
  input  logic [BETA-1:0]   q,         // modulus
  input  logic [LW-1:0]     l1,        // shift exponents of q_h
  input  logic [LW-1:0]     l2,
  input  logic [LW-1:0]     l3,
  output logic              out_valid,
  output logic [BETA-1:0]   b          // a * 2^-BETA mod q
);
  localparam int unsigned OMEGA = BETA - LOGQH;
  localparam int unsigned LAT   = red_latency(RED_MONT_SHIFT, PIPE);
  localparam int unsigned DH    = (PIPE == PIPE_A) ? 4 : 2;  // cycles from input to the b' stage

  // Elaboration-time check: q' = q - 2 holds only when 2*OMEGA >= BETA.
  if (2 * OMEGA < BETA) begin : g_bad_omega
    $error("mont_shift: the shift-add Montgomery factor needs OMEGA = BETA - LOGQH >= BETA/2");
  end

  // ---------------- line 2: t = q' * a_l mod 2^BETA ----------------
  logic [BETA-1:0] al;
  logic [BETA-1:0] u0, u1, u2, u3;

  always_comb begin
    al = a[BETA-1:0];
    u0 = al << (BETA - 1);
    u1 = al << (OMEGA + int'(l1));
    u2 = al << (OMEGA + int'(l2));
    u3 = L3_EN ? (al << (OMEGA + int'(l3))) : '0;
  end

  logic [BETA-1:0] u0_q, u1_q, u2_q, u3_q, al_q;

  if (PIPE == PIPE_A) begin : g_terms1_reg
    always_ff @(posedge clk) begin
      u0_q <= u0; u1_q <= u1; u2_q <= u2; u3_q <= u3; al_q <= al;
    end
  end else begin : g_terms1_comb
    always_comb begin
      u0_q = u0; u1_q = u1; u2_q = u2; u3_q = u3; al_q = al;
    end
  end

  logic [BETA-1:0] t_r;

  always_ff @(posedge clk) t_r <= u0_q + u1_q - u2_q + u3_q - al_q;

  // ---------------- line 3: t' = q * t ----------------
  logic [2*BETA-1:0] v0, v1, v2, v3;

  always_comb begin
    v0 = (2*BETA)'(t_r) << (BETA - 1);
    v1 = (2*BETA)'(t_r) << (OMEGA + int'(l1));
    v2 = (2*BETA)'(t_r) << (OMEGA + int'(l2));
    v3 = L3_EN ? ((2*BETA)'(t_r) << (OMEGA + int'(l3))) : '0;
  end

  logic [2*BETA-1:0] v0_q, v1_q, v2_q, v3_q;
  logic [BETA-1:0]   t_q;

  if (PIPE == PIPE_A) begin : g_terms2_reg
    always_ff @(posedge clk) begin
      v0_q <= v0; v1_q <= v1; v2_q <= v2; v3_q <= v3; t_q <= t_r;
    end
  end else begin : g_terms2_comb
    always_comb begin
      v0_q = v0; v1_q = v1; v2_q = v2; v3_q = v3; t_q = t_r;
    end
  end

  logic [2*BETA-1:0] tp_r;

  always_ff @(posedge clk) tp_r <= v0_q + v1_q - v2_q + v3_q + (2*BETA)'(t_q);

  // a_h and the top bit of a_l, delayed to the b' stage
  logic [BETA:0] hd [DH];   // {a_l[BETA-1], a_h}

  always_ff @(posedge clk) begin
    hd[0] <= {a[BETA-1], a[2*BETA-1:BETA]};
    for (int i = 1; i < DH; i++) hd[i] <= hd[i-1];
  end

  // ---------------- lines 4-5: b' = a_h + t'_h + c ----------------
  logic          c;
  logic [BETA:0] bp_r;

  assign c = tp_r[BETA-1] | hd[DH-1][BETA];

  always_ff @(posedge clk) begin
    bp_r <= (BETA+1)'(hd[DH-1][BETA-1:0]) + (BETA+1)'(tp_r[2*BETA-1:BETA]) + (BETA+1)'(c);
  end

  // ---------------- lines 6-7: final subtraction ----------------
  logic [BETA:0] diff;
  assign diff = bp_r - (BETA+1)'(q);

  always_ff @(posedge clk) b <= diff[BETA] ? bp_r[BETA-1:0] : diff[BETA-1:0];

  // valid pipeline
  logic [LAT-1:0] vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LAT-2:0], in_valid};
  end

  assign out_valid = vld[LAT-1];

endmodule
