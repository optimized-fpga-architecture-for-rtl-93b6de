// Stimulus and checking harness for one ct_butterfly configuration.
//
// For each of NQ moduli of the form the chosen reduction needs, streams NOPS
// butterflies (random coefficients x, y < q and twiddles z < q, plus the
// corner cases 0 and q-1) with random idle cycles, and checks
// (x + y*z, x - y*z) mod q and the latency MUL_LAT + red_latency + 1. The
// twiddle is passed pre-scaled, w = z * 2^k mod q. It also counts how often
// the modular addition and the subtraction had to wrap.
module bf_harness
  import modred_pkg::*;
  import modred_ref_pkg::*;
#(
  parameter red_kind_e   RED   = RED_WLM_MIXED,
  parameter int unsigned BETA  = 64,
  parameter int unsigned LOGQH = 17,
  parameter bit          L3_EN = 1'b1,
  parameter pipe_cfg_e   PIPE  = PIPE_B,
  parameter int unsigned NQ    = 4,
  parameter int unsigned NOPS  = 150
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   add_wraps,
  output int   sub_wraps,
  output logic done
);
  localparam int unsigned LW  = $clog2(LOGQH - 1);
  localparam int unsigned LAT = 2 + red_latency(RED, PIPE) + 1;
  localparam int unsigned K   = red_exponent(RED, BETA, LOGQH);

  logic            in_valid, out_valid;
  logic [BETA-1:0] x, y, w, q, xo, yo;
  logic [LW-1:0]   l1, l2, l3;

  ct_butterfly #(.RED(RED), .BETA(BETA), .LOGQH(LOGQH), .L3_EN(L3_EN), .PIPE(PIPE)) dut (.*);

  typedef struct { u128_t ex, ey; int cyc; } item_t;
  item_t exp_q[$];
  int cyc, sent, seen;

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      item_t it;
      seen++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("%m: unexpected output");
      end else begin
        it = exp_q.pop_front();
        if (u128_t'(xo) != it.ex || u128_t'(yo) != it.ey || cyc - it.cyc != LAT) begin
          failures++;
          $display("%m: q=%h got (%h,%h) after %0d, expected (%h,%h) after %0d",
                   q, xo, yo, cyc - it.cyc, it.ex, it.ey, LAT);
        end
      end
    end
  end

  function automatic u128_t pick(u128_t qq, int unsigned sel);
    case (sel)
      0:       return 0;
      1:       return qq - 1;
      default: return rand_below(qq);
    endcase
  endfunction

  initial begin
    cyc = 0; checks = 0; failures = 0; add_wraps = 0; sub_wraps = 0; done = 1'b0;
    sent = 0; seen = 0;
    in_valid = 1'b0; x = '0; y = '0; w = '0; q = '0; l1 = '0; l2 = '0; l3 = '0;
    wait (rst_n);
    for (int unsigned qi = 0; qi < NQ; qi++) begin
      u128_t r;
      @(negedge clk);
      if (RED == RED_K2RED_SHIFT || RED == RED_MONT_SHIFT) begin
        int unsigned v1, v2, v3;
        v1 = $urandom % (LOGQH - 1);
        v2 = $urandom % (v1 + 1);
        v3 = $urandom % (LOGQH - 1);
        l1 = LW'(v1); l2 = LW'(v2); l3 = LW'(v3);
        q  = BETA'(proth_l_modulus(BETA, LOGQH, v1, v2, v3, L3_EN));
      end else begin
        q  = BETA'(proth_modulus(BETA, LOGQH, 0));
      end
      r = ref_pow2(K, u128_t'(q));
      for (int unsigned n = 0; n < NOPS; n++) begin
        u128_t xv, yv, zv, p;
        @(negedge clk);
        while ($urandom % 4 == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
        xv = pick(u128_t'(q), $urandom % 8);
        yv = pick(u128_t'(q), $urandom % 8);
        zv = pick(u128_t'(q), $urandom % 8);
        p  = ref_mulmod(yv, zv, u128_t'(q));
        x = BETA'(xv); y = BETA'(yv); w = BETA'(ref_mulmod(zv, r, u128_t'(q)));
        in_valid = 1'b1;
        if (xv + p >= u128_t'(q)) add_wraps++;
        if (xv < p) sub_wraps++;
        exp_q.push_back('{ex: (xv + p) % u128_t'(q), ey: (xv + u128_t'(q) - p) % u128_t'(q), cyc: cyc});
        sent++;
      end
      @(negedge clk);
      in_valid = 1'b0;
      wait (exp_q.size() == 0);
      repeat (2) @(negedge clk);
    end
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (seen != sent) begin
      failures++;
      $display("%m: sent %0d butterflies, saw %0d results", sent, seen);
    end
    done = 1'b1;
  end

endmodule
