// tb_cyclic_codec_top: end-to-end test of the codec at its default (7,3)
// configuration: messages are encoded, single-bit errors are injected into
// the codewords and both decoders must restore them, with the latencies of
// the design. The checks are done by tb_codec_driver.
module tb_cyclic_codec_top;
  localparam int unsigned N = 7;
  localparam int unsigned K = 3;

  logic           clk = 1'b0;
  logic           rst, enc_we, enc_result, dec_we;
  logic           lut_result, meg_result, meg_dout_ser, meg_dout_ser_valid;
  logic [K-1:0]   enc_din;
  logic [N-1:0]   enc_dout, dec_din, lut_dout, meg_dout;
  logic [N-K-1:0] lut_syndrome, meg_syndrome;
  logic           done;
  int             checks, failures;

  always #5 clk = ~clk;

  cyclic_codec_top dut (.*);

  tb_codec_driver #(.N(N), .K(K), .G(5'b10111), .NWORDS(400)) drv (.*);

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
