// spontaneous_calc: the Meggitt decoder's self-running syndrome register and
// its error-pattern detector.
//
// load copies a syndrome into the R-stage register. Each clock with shift
// high then steps the register with no input: S(0) takes the feedback from
// S(R-1), and every stage i with g_i = 1 XORs the feedback into its input.
// One step multiplies the register contents by x modulo g(x).
//
// err_here is high while the register holds x^(N-1) mod g(x), the syndrome of
// an error in the highest-order bit. If the received word has a single error
// in bit j, this pattern appears after N-1-j steps, exactly when bit j leaves
// the buffer register highest-order first; the decoder then inverts that bit.
// For the default (7,3) code the pattern is S(3)S(2)S(1)S(0) = 1011.
//
// load wins over shift; rst clears the register synchronously.
module spontaneous_calc #(
  parameter int unsigned         N = cyclic_pkg::DEF_N,
  parameter int unsigned         R = cyclic_pkg::DEF_N - cyclic_pkg::DEF_K,
  parameter logic        [R:0]   G = cyclic_pkg::DEF_G
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic         shift,
  input  logic [R-1:0] syn_in,
  output logic [R-1:0] s,
  output logic         err_here
);

  localparam logic [31:0]  PAT32   = cyclic_pkg::xpow_mod(N - 1, R, 32'(G));
  localparam logic [R-1:0] PATTERN = PAT32[R-1:0];

  logic [R-1:0] nxt;

  always_comb begin
    nxt = {s[R-2:0], 1'b0};
    if (s[R-1]) nxt = nxt ^ G[R-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst)        s <= '0;
    else if (load)  s <= syn_in;
    else if (shift) s <= nxt;
  end

  assign err_here = (s == PATTERN);

endmodule
