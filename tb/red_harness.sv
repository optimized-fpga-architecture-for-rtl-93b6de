// Stimulus and checking harness for one reduction unit.
//
// Instantiates the reduction unit chosen by KIND with the given sizes and
// runs NQ moduli through it. For each modulus it streams NOPS operands,
// with random idle cycles between them, and compares every result with
// a * 2^-k mod q from modred_ref_pkg, together with its latency, which
// must equal red_latency(KIND, PIPE) cycles exactly. The modulus only
// changes once the pipeline has drained. Operands mix products x*y of
// random residues with corner cases: 0, (q-1)^2, (q-1)*y, products whose low bits
// are cleared (so that word carries are 0) and, for K^2-RED, operands whose
// second step goes negative. checks and failures
// are running totals; done rises once all results have been seen.
module red_harness
  import modred_pkg::*;
  import modred_ref_pkg::*;
#(
  parameter red_kind_e   KIND  = RED_WLM_MIXED,
  parameter int unsigned BETA  = 64,
  parameter int unsigned LOGQH = 17,
  parameter bit          L3_EN = 1'b1,
  parameter pipe_cfg_e   PIPE  = PIPE_B,
  parameter int unsigned NQ    = 6,
  parameter int unsigned NOPS  = 200
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int unsigned LW  = $clog2(LOGQH - 1);
  localparam int unsigned LAT = red_latency(KIND, PIPE);
  localparam int unsigned K   = red_exponent(KIND, BETA, LOGQH);

  logic              in_valid, out_valid;
  logic [2*BETA-1:0] a;
  logic [BETA-1:0]   q, b;
  logic [LW-1:0]     l1, l2, l3;

  if (KIND == RED_WLM_MIXED) begin : g_dut
    wlm_mixed #(.BETA(BETA), .LOGQH(LOGQH)) dut (.*);
  end else if (KIND == RED_K2RED) begin : g_dut
    k2red #(.BETA(BETA), .LOGQH(LOGQH)) dut (.*);
  end else if (KIND == RED_K2RED_SHIFT) begin : g_dut
    k2red_shift #(.BETA(BETA), .LOGQH(LOGQH), .L3_EN(L3_EN), .PIPE(PIPE)) dut (.*);
  end else begin : g_dut
    mont_shift #(.BETA(BETA), .LOGQH(LOGQH), .L3_EN(L3_EN), .PIPE(PIPE)) dut (.*);
  end

  typedef struct {
    u128_t exp;
    int    cyc;
  } item_t;

  item_t exp_q[$];
  int    cyc;
  int    sent, seen;

  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- checker ----------------
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      item_t it;
      seen++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("%m: unexpected output b=%h", b);
      end else begin
        it = exp_q.pop_front();
        if (u128_t'(b) != it.exp || cyc - it.cyc != LAT) begin
          failures++;
          $display("%m: q=%h got b=%h after %0d cycles, expected %h after %0d",
                   q, b, cyc - it.cyc, it.exp, LAT);
        end
      end
    end
  end

  // ---------------- driver ----------------
  function automatic u128_t pick_operand(u128_t qq, int unsigned sel);
    u128_t x, y, r;
    x = rand_below(qq);
    y = rand_below(qq);
    case (sel)
      0:       r = 0;
      1:       r = (qq - 1) * (qq - 1);
      2:       r = (qq - 1) * y;
      5:       r = (KIND == RED_K2RED || KIND == RED_K2RED_SHIFT) ?
                   k2red_negative_operand(qq, BETA, LOGQH) * ((y % 3) + 1) : x * y;
      3:       r = ((x * y) >> ($urandom % (BETA + 1))) << 0;
      4: begin
        int unsigned m;
        m = $urandom % (BETA + 1);
        r = ((x * y) >> m) << m;
      end
      default: r = x * y;
    endcase
    return r;
  endfunction

  initial begin
    cyc = 0; checks = 0; failures = 0; done = 1'b0;
    sent = 0; seen = 0;
    in_valid = 1'b0; a = '0; q = '0; l1 = '0; l2 = '0; l3 = '0;
    wait (rst_n);
    for (int unsigned qi = 0; qi < NQ; qi++) begin
      @(negedge clk);
      if (KIND == RED_K2RED_SHIFT || KIND == RED_MONT_SHIFT) begin
        int unsigned v1, v2, v3;
        case (qi)
          0:       begin v1 = LOGQH - 2; v2 = 0;  v3 = LOGQH - 2; end  // largest q_h
          1:       begin v1 = 0;         v2 = 0;  v3 = 0;         end  // q_h = 2^(LOGQH-1) (+1)
          default: begin
            v1 = $urandom % (LOGQH - 1);
            v2 = $urandom % (v1 + 1);
            v3 = $urandom % (LOGQH - 1);
          end
        endcase
        l1 = LW'(v1); l2 = LW'(v2); l3 = LW'(v3);
        q  = BETA'(proth_l_modulus(BETA, LOGQH, v1, v2, v3, L3_EN));
      end else begin
        q  = BETA'(proth_modulus(BETA, LOGQH, (qi < 3) ? qi : 0));
      end
      for (int unsigned n = 0; n < NOPS; n++) begin
        u128_t av;
        @(negedge clk);
        while ($urandom % 4 == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
        av = pick_operand(u128_t'(q), (n < 6) ? n : ($urandom % 10));
        a = (2*BETA)'(av);
        in_valid = 1'b1;
        exp_q.push_back('{exp: ref_red(av, u128_t'(q), K), cyc: cyc});
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
      $display("%m: sent %0d operands, saw %0d results", sent, seen);
    end
    done = 1'b1;
  end

endmodule
