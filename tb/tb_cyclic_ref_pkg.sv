// tb_cyclic_ref_pkg: reference arithmetic for the cyclic-code testbenches.
//
// Plain long division of GF(2) polynomials, written independently of the
// shift-register circuits in the RTL. Polynomials are bit vectors, bit i
// being the coefficient of x^i; up to 64 coefficients.
package tb_cyclic_ref_pkg;

  // v(x) mod g(x); v has at most nbits coefficients, g has degree r.
  function automatic logic [63:0] ref_mod(input logic [63:0] v,
                                          input int unsigned nbits,
                                          input logic [63:0] g,
                                          input int unsigned r);
    logic [63:0] rem;
    rem = v;
    for (int i = int'(nbits) - 1; i >= int'(r); i--) begin
      if (rem[i]) rem = rem ^ (g << (i - int'(r)));
    end
    return rem & ((64'd1 << r) - 64'd1);
  endfunction

  // Systematic codeword x^r m(x) + (x^r m(x) mod g(x)).
  function automatic logic [63:0] ref_encode(input logic [63:0] m,
                                             input int unsigned k,
                                             input logic [63:0] g,
                                             input int unsigned r);
    logic [63:0] sh;
    sh = m << r;
    return sh | ref_mod(sh, k + r, g, r);
  endfunction

endpackage
