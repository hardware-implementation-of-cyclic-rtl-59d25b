// cyclic_pkg: constants and elaboration-time helpers shared by the cyclic
// encoder and decoders.
//
// The default code is the (7,3) cyclic code with generator polynomial
// g(x) = x^4 + x^2 + x + 1. A generator polynomial is held as a bit vector
// whose bit i is the coefficient of x^i (so the default is 5'b10111). A
// syndrome or remainder of degree < R is held the same way: bit i is S(i),
// the coefficient of x^i, and S(i) is the i-th register stage of the division
// circuit counted from its input.
//
// xpow_mod() computes x^j mod g(x). It is used at elaboration only: to build
// the syndrome-to-error-pattern ROM of the LUT decoder and the pattern that
// the Meggitt error detector looks for. The function works on up to 32-bit
// vectors, so codes with up to 31 check bits can be described.
package cyclic_pkg;

  // Default code: (7,3), g(x) = x^4 + x^2 + x + 1.
  localparam int unsigned DEF_N = 7;
  localparam int unsigned DEF_K = 3;
  localparam logic [DEF_N-DEF_K:0] DEF_G = 5'b10111;

  // Remainder of x^j divided by g(x), where g has degree r.
  function automatic logic [31:0] xpow_mod(input int unsigned j,
                                           input int unsigned r,
                                           input logic [31:0] g);
    logic [31:0] s;
    logic [31:0] mask;
    logic        msb;
    mask = (r >= 32) ? '1 : ((32'd1 << r) - 32'd1);
    s    = 32'd1;
    for (int unsigned i = 0; i < j; i++) begin
      msb = s[r-1];
      s   = (s << 1) & mask;
      if (msb) s = s ^ (g & mask);
    end
    return s;
  endfunction

endpackage
