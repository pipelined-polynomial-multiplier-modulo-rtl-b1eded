// pmm_ref_pkg: reference arithmetic for the testbenches of the pipelined
// polynomial multiplier.
//
// The product is worked out the textbook way, independently of the pipeline's
// low-order-first algorithm: first the full carry-less product A*B (degree up
// to 2N-2), then long division by P(x) from the highest coefficient down.
// Polynomials are held in 64-bit vectors, bit i = coefficient of x^i.
package pmm_ref_pkg;

  // Carry-less (GF(2)) product of two polynomials of degree below n.
  function automatic logic [63:0] clmul(input logic [63:0] a, input logic [63:0] b,
                                        input int n);
    logic [63:0] prod = '0;
    for (int i = 0; i < n; i++)
      if (b[i]) prod ^= a << i;
    return prod;
  endfunction

  // Remainder of x modulo p, where p has degree n (p[n] = 1).
  function automatic logic [63:0] polymod(input logic [63:0] x, input logic [63:0] p,
                                          input int n);
    logic [63:0] rem = x;
    for (int d = 62; d >= n; d--)
      if (rem[d]) rem ^= p << (d - n);
    return rem;
  endfunction

  function automatic logic [63:0] mulmod(input logic [63:0] a, input logic [63:0] b,
                                         input logic [63:0] p, input int n);
    return polymod(clmul(a, b, n), p, n);
  endfunction

  // True if p (degree n) has no factor of degree 1..n/2, by trial division.
  function automatic bit irreducible(input logic [63:0] p, input int n);
    for (int d = 1; d <= n / 2; d++)
      for (longint q = (longint'(1) << d); q < (longint'(1) << (d + 1)); q++)
        if (polymod(p, 64'(q), d) == 0) return 1'b0;
    return 1'b1;
  endfunction

endpackage
