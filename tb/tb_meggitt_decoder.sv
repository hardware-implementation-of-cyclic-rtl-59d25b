// tb_meggitt_decoder: feeds the (7,3) Meggitt decoder every codeword, without
// error and with each single-bit error. Checks the serial output bit by bit
// (highest-order first, on consecutive cycles N+2 .. 2N+1 after the we edge),
// the gathered word, the 2N+2 = 16 cycle latency and the syndrome.
// Codewords come from long division, not from the RTL encoder.
module tb_meggitt_decoder;
  import tb_cyclic_ref_pkg::*;

  localparam int unsigned N = 7;
  localparam int unsigned K = 3;
  localparam int unsigned R = N - K;
  localparam logic [R:0]  G = 5'b10111;

  logic         clk = 1'b0;
  logic         rst, we, result, dout_ser, dout_ser_valid;
  logic [N-1:0] din, dout;
  logic [R-1:0] syndrome;
  int           checks = 0, failures = 0;

  meggitt_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] got, input logic [N-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %07b expected %07b", what, got, exp);
    end
  endtask

  // Decode r; returns the cycles to result and the serial bits with the
  // cycle on which each appeared.
  task automatic decode(input logic [N-1:0] r, input logic [N-1:0] c, output int cyc);
    int nbits;
    @(negedge clk);
    we = 1'b1; din = r;
    @(negedge clk);
    we = 1'b0; din = '0;
    cyc = 0;
    nbits = 0;
    while (!result && cyc < 100) begin
      @(negedge clk);
      cyc++;
      if (dout_ser_valid) begin
        check(N'(dout_ser), N'(c[N-1-nbits]), "serial bit");
        check(N'(cyc), N'(N + 2 + nbits), "serial bit timing");
        nbits++;
      end
    end
    check(N'(nbits), N'(N), "number of serial bits");
  endtask

  initial begin
    int           cyc;
    logic [N-1:0] c, r;
    rst = 1'b1; we = 1'b0; din = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;

    decode(7'b1011110, 7'b1011100, cyc);
    check(dout, 7'b1011100, "received 1011110");
    check(N'(syndrome), 7'b0000010, "syndrome of 1011110");

    for (int m = 0; m < 2**K; m++) begin
      c = N'(ref_encode(64'(m), K, 64'(G), R));
      for (int e = -1; e < int'(N); e++) begin
        r = (e < 0) ? c : c ^ (N'(1) << e);
        decode(r, c, cyc);
        check(dout, c, "corrected word");
        check(N'(cyc), N'(2 * N + 2), "latency");
        check(N'(syndrome), N'(ref_mod(64'(r), N, 64'(G), R)), "syndrome");
        @(negedge clk);
        check(dout, c, "hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
