// gf_ref_pkg: reference arithmetic for the testbenches.
//
// Written independently of the RTL: GF(2^8) products are formed as a full
// 15-bit carry-less product followed by long division by
// x^8 + x^4 + x^3 + x^2 + 1; GF(2^4) products the same way with
// x^4 + x^3 + 1.  Inverses are found by search.  The composite field
// GF(2^4)^2 is modelled directly from its definition: an element is
// {x1, x0} = x0 + beta*x1 with beta^2 = beta + gamma and gamma = 4'b0010.
package gf_ref_pkg;

  function automatic logic [7:0] ref_mul256(logic [7:0] a, logic [7:0] b);
    logic [14:0] p = '0;
    for (int i = 0; i < 8; i++)
      if (b[i]) p ^= 15'(a) << i;
    for (int i = 14; i >= 8; i--)
      if (p[i]) p ^= 15'(9'h11D) << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [3:0] ref_mul16(logic [3:0] a, logic [3:0] b);
    logic [6:0] p = '0;
    for (int i = 0; i < 4; i++)
      if (b[i]) p ^= 7'(a) << i;
    for (int i = 6; i >= 4; i--)
      if (p[i]) p ^= 7'(5'h19) << (i - 4);
    return p[3:0];
  endfunction

  // alpha^e in GF(2^8), alpha = 8'h02.
  function automatic logic [7:0] ref_pow256(int e);
    logic [7:0] r = 8'h01;
    int ee = e % 255;
    if (ee < 0) ee += 255;
    for (int i = 0; i < ee; i++) r = ref_mul256(r, 8'h02);
    return r;
  endfunction

  // alpha^e in GF(2^4), alpha = gamma = 4'h2.
  function automatic logic [3:0] ref_pow16(int e);
    logic [3:0] r = 4'h1;
    int ee = e % 15;
    if (ee < 0) ee += 15;
    for (int i = 0; i < ee; i++) r = ref_mul16(r, 4'h2);
    return r;
  endfunction

  function automatic logic [7:0] ref_inv256(logic [7:0] a);
    for (int c = 1; c < 256; c++)
      if (ref_mul256(a, 8'(c)) == 8'h01) return 8'(c);
    return 8'h00;
  endfunction

  function automatic logic [3:0] ref_inv16(logic [3:0] a);
    for (int c = 1; c < 16; c++)
      if (ref_mul16(a, 4'(c)) == 4'h1) return 4'(c);
    return 4'h0;
  endfunction

  // Composite-field product straight from (a0 + beta a1)(b0 + beta b1)
  // with beta^2 = beta + gamma.
  function automatic logic [7:0] ref_mul16x2(logic [7:0] a, logic [7:0] b);
    logic [3:0] a0 = a[3:0], a1 = a[7:4], b0 = b[3:0], b1 = b[7:4];
    logic [3:0] t0, t1, t2;   // coefficients of 1, beta, beta^2
    t0 = ref_mul16(a0, b0);
    t1 = ref_mul16(a0, b1) ^ ref_mul16(a1, b0);
    t2 = ref_mul16(a1, b1);
    // beta^2 = beta + gamma
    return {t1 ^ t2, t0 ^ ref_mul16(t2, 4'h2)};
  endfunction

endpackage
