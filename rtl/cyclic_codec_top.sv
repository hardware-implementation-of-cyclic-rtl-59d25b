// cyclic_codec_top: the cyclic-code codec, encoder and two decoders.
//
// The encoder turns K-bit messages into N-bit systematic codewords. The
// channel between encoder and decoders is outside this block, so the encoder
// output and the decoder input are separate ports. A received word written
// with dec_we goes to both decoders at once: the LUT decoder (the design's
// proposed one, N+1 cycles) and the Meggitt decoder (2N+2 cycles, serial
// output). Both correct any single bit error.
//
// Timing: enc_result rises K cycles after enc_we, lut_result N+1 cycles and
// meg_result 2N+2 cycles after dec_we; all results and words hold until the
// next write. The default is the (7,3) code with g(x) = x^4 + x^2 + x + 1;
// the (15,11) and (31,26) codes are obtained through N, K and G. Placing
// both decoders behind one input port is this implementation's choice.
module cyclic_codec_top #(
  parameter int unsigned         N = cyclic_pkg::DEF_N,
  parameter int unsigned         K = cyclic_pkg::DEF_K,
  parameter logic        [N-K:0] G = cyclic_pkg::DEF_G
) (
  input  logic           clk,
  input  logic           rst,
  // encoder
  input  logic           enc_we,
  input  logic [K-1:0]   enc_din,
  output logic           enc_result,
  output logic [N-1:0]   enc_dout,
  // decoders
  input  logic           dec_we,
  input  logic [N-1:0]   dec_din,
  output logic           lut_result,
  output logic [N-1:0]   lut_dout,
  output logic [N-K-1:0] lut_syndrome,
  output logic           meg_result,
  output logic [N-1:0]   meg_dout,
  output logic           meg_dout_ser,
  output logic           meg_dout_ser_valid,
  output logic [N-K-1:0] meg_syndrome
);

  cyclic_encoder #(.N(N), .K(K), .G(G)) u_enc (
    .clk   (clk),
    .rst   (rst),
    .we    (enc_we),
    .din   (enc_din),
    .result(enc_result),
    .dout  (enc_dout)
  );

  lut_decoder #(.N(N), .K(K), .G(G)) u_lut (
    .clk     (clk),
    .rst     (rst),
    .we      (dec_we),
    .din     (dec_din),
    .result  (lut_result),
    .dout    (lut_dout),
    .syndrome(lut_syndrome)
  );

  meggitt_decoder #(.N(N), .K(K), .G(G)) u_meg (
    .clk           (clk),
    .rst           (rst),
    .we            (dec_we),
    .din           (dec_din),
    .result        (meg_result),
    .dout          (meg_dout),
    .dout_ser      (meg_dout_ser),
    .dout_ser_valid(meg_dout_ser_valid),
    .syndrome      (meg_syndrome)
  );

endmodule
