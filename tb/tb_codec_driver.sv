// tb_codec_driver: end-to-end stimulus and checker for cyclic_codec_top.
//
// For NWORDS random messages it encodes the message, flips no bit or one bit
// of the codeword (cycling through every position), and decodes the result
// with both decoders while the encoder already works on the next message.
// It checks the codeword against long division, both corrected words and
// syndromes, the serial Meggitt stream and the latencies K (encoder), N+1
// (LUT decoder) and 2N+2 (Meggitt decoder). It counts how often each
// mechanism happened (encoding, zero syndrome, LUT correction, Meggitt
// detection and correction, every bit position corrected by both decoders)
// and counts a failure for any that never happened. done rises at the end.
module tb_codec_driver #(
  parameter int unsigned         N      = 7,
  parameter int unsigned         K      = 3,
  parameter logic        [N-K:0] G      = 5'b10111,
  parameter int unsigned         NWORDS = 200
) (
  input  logic           clk,
  output logic           rst,
  output logic           enc_we,
  output logic [K-1:0]   enc_din,
  input  logic           enc_result,
  input  logic [N-1:0]   enc_dout,
  output logic           dec_we,
  output logic [N-1:0]   dec_din,
  input  logic           lut_result,
  input  logic [N-1:0]   lut_dout,
  input  logic [N-K-1:0] lut_syndrome,
  input  logic           meg_result,
  input  logic [N-1:0]   meg_dout,
  input  logic           meg_dout_ser,
  input  logic           meg_dout_ser_valid,
  input  logic [N-K-1:0] meg_syndrome,
  output logic           done,
  output int             checks,
  output int             failures
);
  import tb_cyclic_ref_pkg::*;

  localparam int unsigned R = N - K;

  int n_enc = 0, n_clean = 0, n_lut_fix = 0, n_meg_fix = 0, n_meg_stream = 0;
  int lut_pos [N];
  int meg_pos [N];

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL (%0d,%0d) %s: got %0h expected %0h", N, K, what, got, exp);
    end
  endtask

  // Encode m, starting at the next falling edge.
  task automatic encode(input logic [K-1:0] m, output logic [N-1:0] c);
    int cyc;
    @(negedge clk);
    enc_we = 1'b1; enc_din = m;
    @(negedge clk);
    enc_we = 1'b0; enc_din = '0;
    cyc = 0;
    while (!enc_result && cyc < 4 * N) begin
      @(negedge clk);
      cyc++;
    end
    c = enc_dout;
    n_enc++;
    check(64'(c), ref_encode(64'(m), K, 64'(G), R), "codeword");
    check(64'(cyc), 64'(K), "encoder latency");
  endtask

  // Decode r with both decoders, expecting codeword c.
  task automatic decode(input logic [N-1:0] r, input logic [N-1:0] c);
    int           cyc, lut_cyc, nbits, nflip, exp_cyc;
    logic [N-1:0] ser;
    @(negedge clk);
    dec_we = 1'b1; dec_din = r;
    @(negedge clk);
    dec_we = 1'b0; dec_din = '0;
    cyc = 0; lut_cyc = -1; nbits = 0; nflip = 0; ser = '0;
    while (!meg_result && cyc < 8 * N) begin
      @(negedge clk);
      cyc++;
      if (lut_result && lut_cyc < 0) lut_cyc = cyc;
      if (meg_dout_ser_valid) begin
        ser = {ser[N-2:0], meg_dout_ser};
        exp_cyc = int'(N) + 2 + nbits;
        check(64'(cyc), 64'(exp_cyc), "Meggitt serial timing");
        if (meg_dout_ser != r[N-1-nbits]) nflip++;
        nbits++;
      end
    end
    check(64'(lut_cyc), 64'(N + 1), "LUT latency");
    check(64'(cyc), 64'(2 * N + 2), "Meggitt latency");
    check(64'(nbits), 64'(N), "Meggitt serial bit count");
    check(64'(lut_dout), 64'(c), "LUT corrected word");
    check(64'(meg_dout), 64'(c), "Meggitt corrected word");
    check(64'(ser), 64'(c), "Meggitt serial word");
    check(64'(lut_syndrome), ref_mod(64'(r), N, 64'(G), R), "LUT syndrome");
    check(64'(meg_syndrome), ref_mod(64'(r), N, 64'(G), R), "Meggitt syndrome");
    if (nbits == int'(N)) n_meg_stream++;
    if (lut_syndrome == '0) n_clean++;
    if (lut_dout != r) begin
      n_lut_fix++;
      for (int j = 0; j < int'(N); j++) if (lut_dout[j] != r[j]) lut_pos[j]++;
    end
    if (nflip > 0) begin
      n_meg_fix++;
      for (int j = 0; j < int'(N); j++) if (meg_dout[j] != r[j]) meg_pos[j]++;
    end
  endtask

  task automatic mech(input int count, input string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL (%0d,%0d): %s never happened", N, K, what);
    end
  endtask

  initial begin
    logic [K-1:0] m;
    logic [N-1:0] c, c_next, r;
    int           e;
    checks = 0; failures = 0; done = 1'b0;
    foreach (lut_pos[j]) begin lut_pos[j] = 0; meg_pos[j] = 0; end
    rst = 1'b1; enc_we = 1'b0; enc_din = '0; dec_we = 1'b0; dec_din = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    encode('0, c);
    for (int i = 0; i < int'(NWORDS); i++) begin
      // error position: none, then each bit in turn
      e = (i % int'(N + 1)) - 1;
      r = (e < 0) ? c : c ^ (N'(1) << e);
      m = (i % 7 == 3) ? '1 : K'($urandom);
      fork
        decode(r, c);
        encode(m, c_next);
      join
      c = c_next;
    end

    $display("(%0d,%0d) encodings=%0d clean=%0d lut_corrections=%0d meggitt_streams=%0d meggitt_corrections=%0d",
             N, K, n_enc, n_clean, n_lut_fix, n_meg_stream, n_meg_fix);
    mech(n_enc, "encoding");
    mech(n_clean, "zero syndrome");
    mech(n_lut_fix, "LUT correction");
    mech(n_meg_stream, "Meggitt load and serial output");
    mech(n_meg_fix, "Meggitt error detection");
    for (int j = 0; j < int'(N); j++) begin
      mech(lut_pos[j], $sformatf("LUT correction of bit %0d", j));
      mech(meg_pos[j], $sformatf("Meggitt correction of bit %0d", j));
    end
    done = 1'b1;
  end
endmodule
