# Cyclic-code error correction: encoder, LUT decoder and Meggitt decoder

This RTL encodes and decodes single-error-correcting binary cyclic codes. The
main configuration is the (7,3) code with generator polynomial
g(x) = x^4 + x^2 + x + 1. Three cores share the same arithmetic:

* **Encoder.** It computes a systematic codeword
  c(x) = x^(n-k) a(x) + (x^(n-k) a(x) mod g(x)) with a division shift register.
* **LUT decoder.** This is the fast decoder. It computes the syndrome
  s(x) = r(x) mod g(x), looks up the single-bit error pattern that produces
  that syndrome in a small ROM, and XORs the pattern onto the received word.
  It needs N+1 clock cycles.
* **Meggitt decoder.** This is the classic decoder, kept for comparison. It
  computes the same syndrome, then clocks it through a second shift register
  without input while the received word leaves a buffer bit by bit. A
  detector spots the moment the erroneous bit is at the buffer output and
  flips it. It needs 2N+2 clock cycles.

The LUT decoder trades a 2^(N-K)-entry table for half the latency and no
second pass over the word. The table has 16 entries for (7,3) and 32 for
(31,26).

The same RTL also builds the (15,11) and (31,26) codes through parameters.

## Conventions that everything depends on

* A polynomial is a bit vector, and **bit i is the coefficient of x^i**. The
  generator x^4 + x^2 + x + 1 is `5'b10111`.
* Words are shifted into every shift register **highest-order coefficient
  first**. `din[N-1]` (r_6 for the (7,3) code) enters first.
* The codeword is `{message, parity}`: `dout[N-1:N-K]` is the message and
  `dout[N-K-1:0]` is the remainder S(R-1)..S(0), where R = N-K. Message `101`
  encodes to `1011100`.
* A syndrome is written S(3)S(2)S(1)S(0), so its most significant bit is the
  coefficient of x^3. For the (7,3) code the single-bit errors map to:

  | error bit | pattern e6..e0 | syndrome S(3)..S(0) |
  |-----------|----------------|---------------------|
  | 6         | 1000000        | 1011                |
  | 5         | 0100000        | 1110                |
  | 4         | 0010000        | 0111                |
  | 3         | 0001000        | 1000                |
  | 2         | 0000100        | 0100                |
  | 1         | 0000010        | 0010                |
  | 0         | 0000001        | 0001                |

  Each row is x^j mod g(x). The RTL does not store this table as literals. It
  computes it at elaboration with `cyclic_pkg::xpow_mod`, so any N, K and G
  get the right ROM. `tb_syndrome_rom` checks it against the table above,
  typed in by hand.

Note that g(x) = (x+1)(x^3+x^2+1) divides x^7 - 1 and x has order 7 modulo
g(x). Both facts are what make the code cyclic and the Meggitt search below
unambiguous.

## The division register (`syndrome_calc`)

There are R stages S(0)..S(R-1). The incoming bit is XORed with the feedback
from S(R-1) into S(0). The same feedback is XORed into the input of every
stage i with g_i = 1. For the (7,3) code these are S(1) and S(2), and S(2)
feeds S(3) directly. One clock computes s <- x·s + bit (mod g). After the N
bits of r(x) have entered a cleared register, it holds r(x) mod g(x).

The encoder uses the premultiplied variant: the message bit is added to the
feedback, not to the input of S(0). After only K shifts this gives
x^(N-K) a(x) mod g(x).

## Encoder (`cyclic_encoder`)

1. A `we` pulse copies `din` into a parallel-load shift register and into a
   message register. It also clears the parity register.
2. For K cycles, one message bit (highest order first) drives the feedback
   `a ^ S(R-1)`.
3. On the K-th shift, `dout <= {message, next parity}` and `result` rises.

Latency: **K cycles** from the `we` edge to `result`, which is 3 for (7,3).
The serial output switch of the textbook encoder is not needed because the
codeword is delivered in parallel.

## LUT decoder (`lut_decoder`)

A `we` pulse starts three steps:

1. It captures the received word into a shift register and into a holding
   copy.
2. It clears the syndrome register, which then takes N shifts.
3. In one more cycle it registers `dout <= r ^ ROM[syndrome]` and raises
   `result`.

Latency: **N+1 cycles**, which is 8 for (7,3). The ROM (`syndrome_rom`) is
asynchronous. Every syndrome that no single error produces maps to zero,
including the zero syndrome itself. A word with two or more errors therefore
passes through unchanged, and nothing flags it. The (7,3) code has minimum
distance 4, so double errors are detectable in principle. This design does
not report them.

## Meggitt decoder (`meggitt_decoder`)

This is the part that is hardest to follow. Suppose the single error is in
bit j, so that s(x) = x^j mod g. The self-running register
(`spontaneous_calc`) multiplies its contents by x once per clock, so after t
steps it holds x^(j+t) mod g. The buffer outputs bit N-1-t at step t. Bit j
is at the output when t = N-1-j, and at exactly that step the register holds
x^(N-1) mod g. That value is the syndrome of an error in the top bit: 1011
for the (7,3) code.

So the detector is a single comparison with a constant, whatever the error
position. Because x has order N modulo g, the pattern appears at most once in
N steps, and it does not appear at all if there is no error.

Schedule after the `we` edge (cycle 0):

| cycles      | what happens                                                                |
|-------------|-----------------------------------------------------------------------------|
| 1 .. N      | received word shifted into the syndrome register, counter counts 0 → N      |
| N+1         | counter = N (0111 for N = 7): `load` copies the syndrome into the self-running register |
| N+2 .. 2N+1 | corrected bits on `dout_ser` (highest order first) with `dout_ser_valid`    |
| 2N+2        | last bit gathered into `dout`, `result` rises                               |

Latency: **2N+2 cycles**, which is 16 for (7,3). The buffer register is
loaded at `we` together with the input register, so `din` does not have to
be held. The syndrome is not cleared as bits are corrected, because only one
error is ever corrected.

## Top level (`cyclic_codec_top`)

The top holds the encoder and both decoders. The channel between encoding and
decoding is left to the user, so the encoder output (`enc_*`) and the decoder
input (`dec_*`) are separate ports. A word written with `dec_we` goes to both
decoders at once, and each reports on its own ports (`lut_*`, `meg_*`). All
three cores can run at the same time.

Handshake, common to all cores:

* Pulse `we` for one cycle with `din` valid.
* Wait for `result`.
* `dout` and `result` then hold until the next `we`.
* A `we` during a run restarts that core.

Reset `rst` is synchronous and active high.

## Parameters and other codes

| parameter | default    | meaning                                            |
|-----------|------------|----------------------------------------------------|
| `N`       | 7          | code length                                        |
| `K`       | 3          | message length; the number of check bits is N-K    |
| `G`       | `5'b10111` | generator polynomial of degree N-K, bit i = g_i    |

| code    | parameters                      | encoder | LUT decoder | Meggitt decoder |
|---------|---------------------------------|---------|-------------|-----------------|
| (7,3)   | default                         | 3       | 8           | 16              |
| (15,11) | N=15, K=11, G=`5'b10011` (x^4+x+1)  | 11  | 16          | 32              |
| (31,26) | N=31, K=26, G=`6'b100101` (x^5+x^2+1) | 26 | 32         | 64              |

The latencies in the table are in cycles, and the testbenches check all of
them. The generators for the two larger codes are the usual primitive
polynomials, which give Hamming codes. Any G that divides x^N - 1, and under
which x has order N, works with both decoders. `xpow_mod` handles up to 31
check bits. The ROM grows as 2^(N-K) × N bits.

## How far it can be trusted

Every module has a self-checking testbench. The reference values are computed
by plain polynomial long division in `tb/tb_cyclic_ref_pkg.sv`, which is
independent of the shift-register circuits. The testbenches cover:

* every (7,3) message;
* every (7,3) codeword with no error and with each single-bit error;
* every start state of the self-running register;
* the exact cycle counts.

`tb_cyclic_codec_top` runs the default configuration end to end. It encodes
messages, injects a single error at each bit position in turn, and decodes
with both decoders while the encoder works on the next message. It also
checks that every mechanism actually occurred:

* a zero syndrome;
* a LUT correction;
* a Meggitt detection;
* a correction of every bit position by each decoder.

`tb_codec_workloads` does the same for the (15,11) and (31,26) codes.

Not verified:

* behaviour with two or more errors, beyond the word passing unchanged
  through the LUT decoder;
* timing closure on any FPGA.

No FPGA resource counts or clock rates were measured for this RTL.

Choices made here rather than given by the architecture:

* the `we`/`result` handshake and the holding of results;
* synchronous reset;
* registering the corrected word, which sets the N+1 and 2N+2 latencies;
* the parallel `dout` of the Meggitt decoder next to its serial output;
* loading the Meggitt buffer at `we`;
* zero ROM entries for syndromes that no single error produces.

## Files

| file | contents |
|------|----------|
| `rtl/cyclic_pkg.sv` | default N, K, G and the `xpow_mod` elaboration function |
| `rtl/piso_shift_reg.sv` | parallel-load, MSB-first serial-out register (input registers and Meggitt buffer) |
| `rtl/syndrome_calc.sv` | division register, r(x) mod g(x) |
| `rtl/syndrome_rom.sv` | syndrome → error pattern table |
| `rtl/spontaneous_calc.sv` | self-running syndrome register and error-pattern detector |
| `rtl/cyclic_encoder.sv` | systematic encoder |
| `rtl/lut_decoder.sv` | LUT decoder |
| `rtl/meggitt_decoder.sv` | Meggitt decoder |
| `rtl/cyclic_codec_top.sv` | top: encoder and both decoders |
| `tb/tb_*.sv` | one testbench per module, plus `tb_codec_driver` (end-to-end stimulus and checker), `tb_codec_workloads` and `tb_cyclic_ref_pkg` |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and finishes. It
has a watchdog that counts a failure if the run hangs. To run the end-to-end
test with Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb \
  rtl/cyclic_pkg.sv tb/tb_cyclic_ref_pkg.sv tb/tb_cyclic_codec_top.sv \
  --top-module tb_cyclic_codec_top
./obj_dir/Vtb_cyclic_codec_top
```

Replace the last file and the top module name to run another testbench, for
example `tb_codec_workloads` or `tb_meggitt_decoder`. All of them finish in
well under a second. To lint a module:

```sh
verilator --lint-only -Wall -Irtl rtl/cyclic_pkg.sv rtl/cyclic_codec_top.sv
```

To try another code, set `N`, `K` and `G` on `cyclic_codec_top`. Every
submodule derives its widths, ROM contents and detector pattern from these
three parameters.
