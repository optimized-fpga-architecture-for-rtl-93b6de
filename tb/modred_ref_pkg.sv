// Reference arithmetic for the reduction and butterfly testbenches.
//
// Everything here is computed the slow, obvious way and shares no structure
// with the hardware: a * 2^-k mod q is found by reducing a with the %
// operator and then halving k times modulo q (adding q first when the value
// is odd). Moduli of the required forms are drawn at random; they need not
// be prime, since every reduction is exact for any odd modulus of its form.
package modred_ref_pkg;

  typedef logic [127:0] u128_t;

  // a * 2^-k mod q, for odd q < 2^64
  function automatic u128_t ref_red(u128_t a, u128_t q, int unsigned k);
    u128_t x;
    x = a % q;
    for (int unsigned i = 0; i < k; i++) begin
      x = x[0] ? ((x + q) >> 1) : (x >> 1);
    end
    return x;
  endfunction

  // x * y mod q
  function automatic u128_t ref_mulmod(u128_t x, u128_t y, u128_t q);
    return (x * y) % q;
  endfunction

  // 2^k mod q
  function automatic u128_t ref_pow2(int unsigned k, u128_t q);
    u128_t x;
    x = 1;
    for (int unsigned i = 0; i < k; i++) x = (x << 1) % q;
    return x;
  endfunction

  function automatic u128_t rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // uniform-ish value in [0, q)
  function automatic u128_t rand_below(u128_t q);
    return rand128() % q;
  endfunction

  // Proth modulus q = q_h * 2^(beta-logqh) + 1 with q_h exactly logqh bits.
  // mode 0: random q_h, 1: smallest q_h, 2: largest q_h
  function automatic u128_t proth_modulus(int unsigned beta, int unsigned logqh, int unsigned mode);
    u128_t qh;
    case (mode)
      1:       qh = u128_t'(1) << (logqh - 1);
      2:       qh = (u128_t'(1) << logqh) - 1;
      default: qh = (u128_t'(1) << (logqh - 1)) | (rand128() & ((u128_t'(1) << (logqh - 1)) - 1));
    endcase
    return (qh << (beta - logqh)) + 1;
  endfunction

  // Proth-l modulus q = 2^(beta-1) + (2^l1 - 2^l2 + [l3_en] 2^l3) * 2^(beta-logqh) + 1
  function automatic u128_t proth_l_modulus(int unsigned beta, int unsigned logqh,
                                            int unsigned l1, int unsigned l2, int unsigned l3,
                                            bit l3_en);
    u128_t qh;
    qh = (u128_t'(1) << l1) - (u128_t'(1) << l2) + (l3_en ? (u128_t'(1) << l3) : u128_t'(0));
    return (u128_t'(1) << (beta - 1)) + (qh << (beta - logqh)) + 1;
  endfunction

  // An operand a < q for which the first K^2-RED step gives t = 2^omega
  // exactly (t_l = 0, t_h = 1), so the second step returns t' = -1 and the
  // final correction must add q: a_l = ceil(2^omega / q_h),
  // a_h = q_h * a_l - 2^omega.
  function automatic u128_t k2red_negative_operand(u128_t q, int unsigned beta, int unsigned logqh);
    int unsigned omega;
    u128_t qh, al, ah;
    omega = beta - logqh;
    qh = q >> omega;
    al = ((u128_t'(1) << omega) + qh - 1) / qh;
    ah = qh * al - (u128_t'(1) << omega);
    return (ah << omega) + al;
  endfunction

endpackage
