// piso_shift_reg: parallel-load, serial-out shift register ("Shift-reg" in
// front of every LFSR of the codec, and the N-bit buffer register of the
// Meggitt decoder).
//
// load copies d into the register; shift moves it one place towards the most
// significant end. q is always the most significant bit, so a word leaves
// highest-order coefficient first, which is the order the division circuits
// expect. load wins over shift. Both act on the rising clock edge; rst clears
// the register synchronously.
//
// The block's function (turn the parallel input word into a serial stream)
// is the design's; the bit order and the load/shift controls are this
// implementation's choice.
module piso_shift_reg #(
  parameter int unsigned W = 7
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic         shift,
  input  logic [W-1:0] d,
  output logic         q
);

  logic [W-1:0] r;

  always_ff @(posedge clk) begin
    if (rst)        r <= '0;
    else if (load)  r <= d;
    else if (shift) r <= r << 1;
  end

  assign q = r[W-1];

endmodule
