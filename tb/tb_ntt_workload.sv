// Workload testbench: complete negacyclic NTTs through every lane of
// modred_top at its default sizes.
//
// For each lane the testbench finds a 64-bit prime of the form that lane's
// reduction needs (Miller-Rabin with the twelve bases that are exact below
// 2^64), a primitive 2n-th root of unity psi, and then computes the forward
// NTT of a random polynomial of degree n-1 with the in-place Cooley-Tukey
// schedule: log2(n) stages of n/2 butterflies, the twiddle of butterfly
// group m+i being psi^bitrev(m+i). The testbench plays the part of the
// coefficient memory and the controller: it issues one butterfly per cycle
// and writes results back as they leave the lane. All four lanes run at
// once. Ring sizes n = 2^12, 2^14 and 2^16 are run in turn.
//
// Checks: each stage must take exactly n/2 - 1 + latency cycles (one
// butterfly per cycle, no stalls), and for 32 indices i per transform the
// output at position bitrev(i) must equal a(psi^(2i+1)) mod q, evaluated
// here by Horner's rule. A watchdog ends the run with a failure.
module tb_ntt_workload;
  import modred_pkg::*;
  import modred_ref_pkg::*;

  localparam int unsigned BETA    = 64;
  localparam int unsigned NL      = 4;
  localparam int unsigned MAXLOGN = 16;
  localparam int unsigned NSAMP   = 32;
  localparam int unsigned LOGQH [NL] = '{17, 26, 17, 17};
  localparam int unsigned LAT   [NL] = '{8, 8, 8, 7};
  localparam int unsigned LOGNS [3]  = '{12, 14, 16};

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  always #5 clk = ~clk;

  logic [NL-1:0]           in_valid, out_valid;
  logic [NL-1:0][BETA-1:0] x, y, w, q, xo, yo;
  logic [3:0]              k2rs_l1, k2rs_l2, k2rs_l3, msh_l1, msh_l2, msh_l3;

  modred_top dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- number theory helpers ----------------
  function automatic u128_t powmod(u128_t b, u128_t e, u128_t m);
    u128_t r;
    r = 1;
    b = b % m;
    while (e != 0) begin
      if (e[0]) r = (r * b) % m;
      b = (b * b) % m;
      e = e >> 1;
    end
    return r;
  endfunction

  function automatic bit is_prime(u128_t n);
    int unsigned bases [12] = '{2, 3, 5, 7, 11, 13, 17, 19, 23, 29, 31, 37};
    u128_t d;
    int unsigned s;
    if (n < 2) return 0;
    foreach (bases[i]) if (n % bases[i] == 0) return n == bases[i];
    d = n - 1;
    s = 0;
    while (!d[0]) begin d = d >> 1; s++; end
    foreach (bases[i]) begin
      u128_t xx;
      bit ok;
      xx = powmod(bases[i], d, n);
      ok = (xx == 1) || (xx == n - 1);
      for (int unsigned r = 1; r < s && !ok; r++) begin
        xx = (xx * xx) % n;
        ok = (xx == n - 1);
      end
      if (!ok) return 0;
    end
    return 1;
  endfunction

  function automatic int unsigned bitrev(int unsigned v, int unsigned bits);
    int unsigned r = 0;
    for (int unsigned i = 0; i < bits; i++) r |= ((v >> i) & 1) << (bits - 1 - i);
    return r;
  endfunction

  // ---------------- per-lane state ----------------
  u128_t       qv [NL];
  int unsigned lv [NL][3];
  logic [BETA-1:0] coef [NL][1 << MAXLOGN];
  logic [BETA-1:0] orig [NL][1 << MAXLOGN];
  logic [BETA-1:0] psirev [NL][1 << MAXLOGN];
  int unsigned idx_q [NL][$];
  int unsigned stage_first [NL], stage_last [NL];

  // collect butterfly results and write them back
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < NL; i++) begin
      if (out_valid[i]) begin
        int unsigned j, t;
        if (idx_q[i].size() < 2) begin
          failures++;
          $display("lane %0d: unexpected output", i);
        end else begin
          j = idx_q[i].pop_front();
          t = idx_q[i].pop_front();
          coef[i][j]     = xo[i];
          coef[i][j + t] = yo[i];
          stage_last[i]  = cyc;
        end
      end
    end
  end

  task automatic find_modulus(int i);
    bit found = 0;
    int unsigned tries = 0;
    while (!found) begin
      u128_t cand;
      tries++;
      if (i == RED_K2RED_SHIFT || i == RED_MONT_SHIFT) begin
        int unsigned v1, v2, v3;
        v1 = $urandom % (LOGQH[i] - 1);
        v2 = $urandom % (v1 + 1);
        v3 = $urandom % (LOGQH[i] - 1);
        cand = proth_l_modulus(BETA, LOGQH[i], v1, v2, v3, 1'b1);
        lv[i][0] = v1; lv[i][1] = v2; lv[i][2] = v3;
      end else begin
        cand = proth_modulus(BETA, LOGQH[i], 0);
      end
      if (is_prime(cand)) begin
        qv[i] = cand;
        found = 1;
      end
    end
    $display("lane %0d: prime q = %h after %0d candidates", i, qv[i], tries);
  endtask

  task automatic run_ntt(int i, int unsigned logn);
    int unsigned n, k, tt;
    u128_t psi, g, r, pw;
    n = 1 << logn;
    k = red_exponent(red_kind_e'(i), BETA, LOGQH[i]);
    r = ref_pow2(k, qv[i]);
    // primitive 2n-th root of unity
    g = 2;
    forever begin
      psi = powmod(g, (qv[i] - 1) / (2 * n), qv[i]);
      if (powmod(psi, n, qv[i]) == qv[i] - 1) break;
      g++;
    end
    // twiddles psi^bitrev(m), pre-scaled by 2^k for the reduction
    pw = 1;
    for (int unsigned e = 0; e < n; e++) begin
      psirev[i][bitrev(e, logn)] = BETA'((pw * r) % qv[i]);
      pw = (pw * psi) % qv[i];
    end
    for (int unsigned e = 0; e < n; e++) begin
      coef[i][e] = BETA'(rand_below(qv[i]));
      orig[i][e] = coef[i][e];
    end
    // stages
    tt = n;
    for (int unsigned m = 1; m < n; m *= 2) begin
      int unsigned first;
      tt = tt / 2;
      @(negedge clk);
      first = cyc;
      for (int unsigned g2 = 0; g2 < m; g2++) begin
        for (int unsigned j = 2 * g2 * tt; j < 2 * g2 * tt + tt; j++) begin
          x[i] = coef[i][j];
          y[i] = coef[i][j + tt];
          w[i] = psirev[i][m + g2];
          in_valid[i] = 1'b1;
          idx_q[i].push_back(j);
          idx_q[i].push_back(tt);
          @(negedge clk);
        end
      end
      in_valid[i] = 1'b0;
      wait (idx_q[i].size() == 0);
      checks++;
      if (stage_last[i] - first != n / 2 - 1 + LAT[i]) begin
        failures++;
        $display("lane %0d n=%0d stage m=%0d took %0d cycles, expected %0d",
                 i, n, m, stage_last[i] - first, n / 2 - 1 + LAT[i]);
      end
      repeat (2) @(negedge clk);
    end
    // compare sampled outputs with direct evaluation at psi^(2i+1)
    for (int unsigned s = 0; s < NSAMP; s++) begin
      int unsigned ii;
      u128_t pt, acc;
      ii = (s == 0) ? 0 : (s == 1) ? n - 1 : $urandom % n;
      pt = powmod(psi, 2 * ii + 1, qv[i]);
      acc = 0;
      for (int e = int'(n) - 1; e >= 0; e--) acc = (acc * pt + orig[i][e]) % qv[i];
      checks++;
      if (u128_t'(coef[i][bitrev(ii, logn)]) != acc) begin
        failures++;
        $display("lane %0d n=%0d: NTT output %0d is %h, expected %h", i, n, ii,
                 coef[i][bitrev(ii, logn)], acc);
      end
    end
    $display("lane %0d: NTT of n=%0d done (%0d stages)", i, n, logn);
  endtask

  task automatic run_lane(int i);
    find_modulus(i);
    @(negedge clk);
    q[i] = BETA'(qv[i]);
    if (i == RED_K2RED_SHIFT) begin
      k2rs_l1 = 4'(lv[i][0]); k2rs_l2 = 4'(lv[i][1]); k2rs_l3 = 4'(lv[i][2]);
    end else if (i == RED_MONT_SHIFT) begin
      msh_l1 = 4'(lv[i][0]); msh_l2 = 4'(lv[i][1]); msh_l3 = 4'(lv[i][2]);
    end
    foreach (LOGNS[s]) run_ntt(i, LOGNS[s]);
  endtask

  initial begin
    in_valid = '0; x = '0; y = '0; w = '0; q = '0;
    k2rs_l1 = '0; k2rs_l2 = '0; k2rs_l3 = '0; msh_l1 = '0; msh_l2 = '0; msh_l3 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      run_lane(0);
      run_lane(1);
      run_lane(2);
      run_lane(3);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog: run did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
