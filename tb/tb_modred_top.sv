// End-to-end testbench for modred_top at its default sizes.
//
// All four butterfly lanes run at once, each with its own modulus of the
// form its reduction needs (three moduli per lane, the lane drained between
// them) and a stream of random butterflies with random idle cycles.
// Every result is compared with (x + y*z, x - y*z) mod q computed here, and
// every latency with MUL_LAT + reduction latency + 1. The run also counts
// how often each mechanism of the datapath was exercised and fails if one
// never was: the final subtraction of q in each reduction (taken and not
// taken), the addition of q when a K^2-RED result is negative, and the
// wrap-around of the butterfly's modular addition and subtraction. The
// reduction-internal events are observed through hierarchical references
// to each reduction unit's last pipeline stage.
module tb_modred_top;
  import modred_pkg::*;
  import modred_ref_pkg::*;

  localparam int unsigned BETA = 64;
  localparam int unsigned NL   = 4;
  localparam int unsigned NQ   = 3;
  localparam int unsigned NOPS = 250;
  localparam int unsigned LOGQH [NL] = '{17, 26, 17, 17};
  localparam int unsigned LAT   [NL] = '{8, 8, 8, 7};

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  always #5 clk = ~clk;

  logic [NL-1:0]           in_valid, out_valid;
  logic [NL-1:0][BETA-1:0] x, y, w, q, xo, yo;
  logic [3:0]              k2rs_l1, k2rs_l2, k2rs_l3, msh_l1, msh_l2, msh_l3;

  modred_top dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- mechanism counters ----------------
  int sub_taken [NL], sub_skipped [NL], add_q [NL], add_wrap [NL], sub_wrap [NL];

  initial for (int i = 0; i < NL; i++) begin
    sub_taken[i] = 0; sub_skipped[i] = 0; add_q[i] = 0; add_wrap[i] = 0; sub_wrap[i] = 0;
  end

  always @(negedge clk) if (rst_n) begin
    // WLM-Mixed: t2 in stage 4, subtractor sign bit chooses t2 or t2 - q
    if (dut.u_bf_wlmm.g_wlmm.u_red.vld[3]) begin
      if (dut.u_bf_wlmm.g_wlmm.u_red.diff[BETA]) sub_skipped[0]++; else sub_taken[0]++;
    end
    // K^2-RED: t' in stage 4
    if (dut.u_bf_k2red.g_k2red.u_red.vld[3]) begin
      if (!dut.u_bf_k2red.g_k2red.u_red.tp_minus_q[BETA+1]) sub_taken[1]++;
      else if (dut.u_bf_k2red.g_k2red.u_red.tp[BETA+1])     add_q[1]++;
      else                                                sub_skipped[1]++;
    end
    // K^2-RED-Shift, pipeline A: t' in stage 4
    if (dut.u_bf_k2rs.g_k2rs.u_red.vld[3]) begin
      if (!dut.u_bf_k2rs.g_k2rs.u_red.tp_minus_q[BETA+1]) sub_taken[2]++;
      else if (dut.u_bf_k2rs.g_k2rs.u_red.tp[BETA+1])     add_q[2]++;
      else                                               sub_skipped[2]++;
    end
    // Montgomery-Shift, pipeline B: b' in stage 3
    if (dut.u_bf_msh.g_msh.u_red.vld[2]) begin
      if (dut.u_bf_msh.g_msh.u_red.diff[BETA]) sub_skipped[3]++; else sub_taken[3]++;
    end
  end

  // ---------------- per-lane driver and checker ----------------
  typedef struct { u128_t ex, ey; int cyc; } item_t;
  item_t exp_q [NL][$];
  int    sent [NL], seen [NL];
  bit    lane_done [NL];

  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < NL; i++) begin
      if (out_valid[i]) begin
        item_t it;
        seen[i]++;
        checks++;
        if (exp_q[i].size() == 0) begin
          failures++;
          $display("lane %0d: unexpected output", i);
        end else begin
          it = exp_q[i].pop_front();
          if (u128_t'(xo[i]) != it.ex || u128_t'(yo[i]) != it.ey || cyc - it.cyc != LAT[i]) begin
            failures++;
            $display("lane %0d: q=%h got (%h,%h) after %0d, expected (%h,%h) after %0d",
                     i, q[i], xo[i], yo[i], cyc - it.cyc, it.ex, it.ey, LAT[i]);
          end
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

  task automatic run_lane(int i);
    for (int unsigned qi = 0; qi < NQ; qi++) begin
      u128_t r, qq;
      int unsigned k;
      @(negedge clk);
      if (i == RED_K2RED_SHIFT || i == RED_MONT_SHIFT) begin
        int unsigned v1, v2, v3;
        v1 = $urandom % (LOGQH[i] - 1);
        v2 = $urandom % (v1 + 1);
        v3 = $urandom % (LOGQH[i] - 1);
        qq = proth_l_modulus(BETA, LOGQH[i], v1, v2, v3, 1'b1);
        if (i == RED_K2RED_SHIFT) begin
          k2rs_l1 = 4'(v1); k2rs_l2 = 4'(v2); k2rs_l3 = 4'(v3);
        end else begin
          msh_l1 = 4'(v1); msh_l2 = 4'(v2); msh_l3 = 4'(v3);
        end
      end else begin
        qq = proth_modulus(BETA, LOGQH[i], qi);
      end
      q[i] = BETA'(qq);
      k = red_exponent(red_kind_e'(i), BETA, LOGQH[i]);
      r = ref_pow2(k, qq);
      for (int unsigned n = 0; n < NOPS; n++) begin
          u128_t xv, yv, zv, p, wv;
        @(negedge clk);
        while ($urandom % 5 == 0) begin
          in_valid[i] = 1'b0;
          @(negedge clk);
        end
        xv = pick(qq, $urandom % 8);
        yv = pick(qq, $urandom % 8);
        zv = pick(qq, $urandom % 8);
        wv = ref_mulmod(zv, r, qq);
        if ((i == RED_K2RED || i == RED_K2RED_SHIFT) && ($urandom % 16 == 0)) begin
          // product whose K^2-RED second step is negative
          yv = 1;
          wv = k2red_negative_operand(qq, BETA, LOGQH[i]);
        end
        p  = ref_red(yv * wv, qq, k);
        x[i] = BETA'(xv); y[i] = BETA'(yv); w[i] = BETA'(wv);
        in_valid[i] = 1'b1;
        if (xv + p >= qq) add_wrap[i]++;
        if (xv < p) sub_wrap[i]++;
        exp_q[i].push_back('{ex: (xv + p) % qq, ey: (xv + qq - p) % qq, cyc: cyc});
        sent[i]++;
      end
      @(negedge clk);
      in_valid[i] = 1'b0;
      wait (exp_q[i].size() == 0);
      repeat (2) @(negedge clk);
    end
    lane_done[i] = 1'b1;
  endtask

  task automatic require(string what, int lane, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("lane %0d: mechanism never exercised: %s", lane, what);
    end
  endtask

  initial begin
    in_valid = '0; x = '0; y = '0; w = '0; q = '0;
    k2rs_l1 = '0; k2rs_l2 = '0; k2rs_l3 = '0; msh_l1 = '0; msh_l2 = '0; msh_l3 = '0;
    for (int i = 0; i < NL; i++) begin sent[i] = 0; seen[i] = 0; lane_done[i] = 1'b0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      run_lane(0);
      run_lane(1);
      run_lane(2);
      run_lane(3);
    join
    repeat (10) @(negedge clk);
    for (int i = 0; i < NL; i++) begin
      checks++;
      if (seen[i] != sent[i]) begin
        failures++;
        $display("lane %0d: sent %0d, saw %0d", i, sent[i], seen[i]);
      end
      $display("lane %0d: %0d butterflies; q subtracted %0d, not subtracted %0d, q added %0d; add wraps %0d, sub wraps %0d",
               i, seen[i], sub_taken[i], sub_skipped[i], add_q[i], add_wrap[i], sub_wrap[i]);
      require("final subtraction of q taken", i, sub_taken[i]);
      require("final subtraction of q skipped", i, sub_skipped[i]);
      if (i == RED_K2RED || i == RED_K2RED_SHIFT) require("negative result corrected by +q", i, add_q[i]);
      require("modular addition wrap", i, add_wrap[i]);
      require("modular subtraction wrap", i, sub_wrap[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog: run did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
