// syndrome_calc: the syndrome calculator, a division circuit for g(x).
//
// An R-stage LFSR S(0)..S(R-1). The received bit enters at S(0) XORed with
// the feedback taken from S(R-1); the feedback is also XORed into the input
// of every stage i with g_i = 1. With the register cleared and the received
// polynomial shifted in highest-order coefficient first, after N shifts the
// register holds s(x) = r(x) mod g(x): syn[i] is the coefficient of x^i.
// For the default g(x) = x^4 + x^2 + x + 1 the feedback enters S(0), S(1)
// and S(2), as in the design's syndrome circuit.
//
// Timing: clr (synchronous, over en) empties the register; each clock with en
// high absorbs one bit of din. syn is the register itself.
module syndrome_calc #(
  parameter int unsigned         R = cyclic_pkg::DEF_N - cyclic_pkg::DEF_K,
  parameter logic        [R:0]   G = cyclic_pkg::DEF_G
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clr,
  input  logic         en,
  input  logic         din,
  output logic [R-1:0] syn
);

  logic         fb;
  logic [R-1:0] nxt;

  assign fb = syn[R-1];

  always_comb begin
    nxt = {syn[R-2:0], din};
    if (fb) nxt = nxt ^ G[R-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst || clr) syn <= '0;
    else if (en)    syn <= nxt;
  end

endmodule
