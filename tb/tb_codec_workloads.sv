// tb_codec_workloads: runs the codec end to end for the two larger codes of
// the evaluation, the (15,11) code with g(x) = x^4 + x + 1 and the (31,26)
// code with g(x) = x^5 + x^2 + 1, checking corrections and the latencies
// K (11 and 26), N+1 (16 and 32) and 2N+2 (32 and 64) cycles. Both run at
// the same time, each with its own tb_codec_driver.
module tb_codec_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  // (15,11)
  logic         a_rst, a_enc_we, a_enc_result, a_dec_we;
  logic         a_lut_result, a_meg_result, a_meg_dout_ser, a_meg_dout_ser_valid;
  logic [10:0]  a_enc_din;
  logic [14:0]  a_enc_dout, a_dec_din, a_lut_dout, a_meg_dout;
  logic [3:0]   a_lut_syndrome, a_meg_syndrome;
  logic         a_done;
  int           a_checks, a_failures;

  // (31,26)
  logic         b_rst, b_enc_we, b_enc_result, b_dec_we;
  logic         b_lut_result, b_meg_result, b_meg_dout_ser, b_meg_dout_ser_valid;
  logic [25:0]  b_enc_din;
  logic [30:0]  b_enc_dout, b_dec_din, b_lut_dout, b_meg_dout;
  logic [4:0]   b_lut_syndrome, b_meg_syndrome;
  logic         b_done;
  int           b_checks, b_failures;

  cyclic_codec_top #(.N(15), .K(11), .G(5'b10011)) dut_a (
    .clk(clk), .rst(a_rst),
    .enc_we(a_enc_we), .enc_din(a_enc_din), .enc_result(a_enc_result), .enc_dout(a_enc_dout),
    .dec_we(a_dec_we), .dec_din(a_dec_din),
    .lut_result(a_lut_result), .lut_dout(a_lut_dout), .lut_syndrome(a_lut_syndrome),
    .meg_result(a_meg_result), .meg_dout(a_meg_dout), .meg_dout_ser(a_meg_dout_ser),
    .meg_dout_ser_valid(a_meg_dout_ser_valid), .meg_syndrome(a_meg_syndrome)
  );

  tb_codec_driver #(.N(15), .K(11), .G(5'b10011), .NWORDS(400)) drv_a (
    .clk(clk), .rst(a_rst),
    .enc_we(a_enc_we), .enc_din(a_enc_din), .enc_result(a_enc_result), .enc_dout(a_enc_dout),
    .dec_we(a_dec_we), .dec_din(a_dec_din),
    .lut_result(a_lut_result), .lut_dout(a_lut_dout), .lut_syndrome(a_lut_syndrome),
    .meg_result(a_meg_result), .meg_dout(a_meg_dout), .meg_dout_ser(a_meg_dout_ser),
    .meg_dout_ser_valid(a_meg_dout_ser_valid), .meg_syndrome(a_meg_syndrome),
    .done(a_done), .checks(a_checks), .failures(a_failures)
  );

  cyclic_codec_top #(.N(31), .K(26), .G(6'b100101)) dut_b (
    .clk(clk), .rst(b_rst),
    .enc_we(b_enc_we), .enc_din(b_enc_din), .enc_result(b_enc_result), .enc_dout(b_enc_dout),
    .dec_we(b_dec_we), .dec_din(b_dec_din),
    .lut_result(b_lut_result), .lut_dout(b_lut_dout), .lut_syndrome(b_lut_syndrome),
    .meg_result(b_meg_result), .meg_dout(b_meg_dout), .meg_dout_ser(b_meg_dout_ser),
    .meg_dout_ser_valid(b_meg_dout_ser_valid), .meg_syndrome(b_meg_syndrome)
  );

  tb_codec_driver #(.N(31), .K(26), .G(6'b100101), .NWORDS(400)) drv_b (
    .clk(clk), .rst(b_rst),
    .enc_we(b_enc_we), .enc_din(b_enc_din), .enc_result(b_enc_result), .enc_dout(b_enc_dout),
    .dec_we(b_dec_we), .dec_din(b_dec_din),
    .lut_result(b_lut_result), .lut_dout(b_lut_dout), .lut_syndrome(b_lut_syndrome),
    .meg_result(b_meg_result), .meg_dout(b_meg_dout), .meg_dout_ser(b_meg_dout_ser),
    .meg_dout_ser_valid(b_meg_dout_ser_valid), .meg_syndrome(b_meg_syndrome),
    .done(b_done), .checks(b_checks), .failures(b_failures)
  );

  initial begin
    repeat (500000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks, a_failures + b_failures + 1);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    wait (a_done === 1'b1 && b_done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks, a_failures + b_failures);
    $finish;
  end
endmodule
