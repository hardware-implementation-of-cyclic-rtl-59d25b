// syndrome_rom: look-up table from syndrome to error pattern.
//
// Entry s holds the N-bit error pattern whose syndrome is s: for every bit
// position j of the codeword the entry x^j mod g(x) holds a single 1 in bit
// j. All other entries, the zero syndrome included, hold zero, so a syndrome
// that no single error produces leaves the word unchanged. For the default
// (7,3) code the table is:
//
//   error bit e6..e0   syndrome S(3)S(2)S(1)S(0)
//   1000000            1011
//   0100000            1110
//   0010000            0111
//   0001000            1000
//   0000100            0100
//   0000010            0010
//   0000001            0001
//
// The table is computed at elaboration from N and G instead of being listed,
// so the same module serves other single-error-correcting cyclic codes. The
// ROM is asynchronous: err follows syn combinationally.
module syndrome_rom #(
  parameter int unsigned           N = cyclic_pkg::DEF_N,
  parameter int unsigned           R = cyclic_pkg::DEF_N - cyclic_pkg::DEF_K,
  parameter logic        [R:0]     G = cyclic_pkg::DEF_G
) (
  input  logic [R-1:0] syn,
  output logic [N-1:0] err
);

  typedef logic [N-1:0] rom_t [2**R];

  function automatic rom_t build_rom();
    rom_t         t;
    logic [31:0]  s;
    logic [N-1:0] e;
    for (int unsigned a = 0; a < 2**R; a++) t[a] = '0;
    for (int unsigned j = 0; j < N; j++) begin
      s    = cyclic_pkg::xpow_mod(j, R, 32'(G));
      e    = t[s[R-1:0]];
      e[j] = 1'b1;
      t[s[R-1:0]] = e;
    end
    return t;
  endfunction

  localparam rom_t ROM = build_rom();

  assign err = ROM[syn];

endmodule
