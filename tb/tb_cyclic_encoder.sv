// tb_cyclic_encoder: encodes every 3-bit message with the (7,3) encoder and
// compares the codeword with x^4 m(x) + (x^4 m(x) mod g(x)) from long
// division, plus the known pair 101 -> 1011100. Each encoding must take
// exactly K = 3 cycles from the we edge to result, and result and dout must
// hold afterwards. A we in the middle of an encoding must restart it.
module tb_cyclic_encoder;
  import tb_cyclic_ref_pkg::*;

  localparam int unsigned N = 7;
  localparam int unsigned K = 3;
  localparam int unsigned R = N - K;
  localparam logic [R:0]  G = 5'b10111;

  logic         clk = 1'b0;
  logic         rst, we, result;
  logic [K-1:0] din;
  logic [N-1:0] dout;
  int           checks = 0, failures = 0;

  cyclic_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic encode(input logic [K-1:0] m, output int cyc);
    @(negedge clk);
    we = 1'b1; din = m;
    @(negedge clk);
    we = 1'b0; din = ~m;  // din need not be held
    cyc = 0;
    while (!result && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
  endtask

  initial begin
    int cyc;
    rst = 1'b1; we = 1'b0; din = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;

    encode(3'b101, cyc);
    check(dout, 7'b1011100, "message 101");

    for (int rep = 0; rep < 3; rep++) begin
      for (int m = 0; m < 2**K; m++) begin
        encode(K'(m), cyc);
        check(dout, N'(ref_encode(64'(m), K, 64'(G), R)), "codeword");
        check(N'(cyc), N'(K), "latency");
        repeat ($urandom_range(0, 3)) @(negedge clk);
        check(dout, N'(ref_encode(64'(m), K, 64'(G), R)), "hold");
        check(N'(result), 7'd1, "result held");
      end
    end

    // Restart: a second we one cycle into an encoding.
    @(negedge clk);
    we = 1'b1; din = 3'b111;
    @(negedge clk);
    din = 3'b010;
    @(negedge clk);
    we = 1'b0;
    cyc = 0;
    while (!result && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    check(dout, N'(ref_encode(64'd2, K, 64'(G), R)), "restart");
    check(N'(cyc), N'(K), "restart latency");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
