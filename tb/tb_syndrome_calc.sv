// tb_syndrome_calc: shifts every 7-bit word, highest-order bit first, into the
// (7,3) syndrome calculator and compares the register with r(x) mod g(x)
// from plain long division. Also checks that clr empties the register and
// that it holds while en is low.
module tb_syndrome_calc;
  import tb_cyclic_ref_pkg::*;

  localparam int unsigned N = 7;
  localparam int unsigned R = 4;
  localparam logic [R:0]  G = 5'b10111;

  logic         clk = 1'b0;
  logic         rst, clr, en, din;
  logic [R-1:0] syn;
  int           checks = 0, failures = 0;

  syndrome_calc #(.R(R), .G(G)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [R-1:0] exp;
    logic [R-1:0] held;
    rst = 1'b1; clr = 1'b0; en = 1'b0; din = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int w = 0; w < 2**N; w++) begin
      clr = 1'b1;
      @(negedge clk);
      clr = 1'b0;
      checks++;
      if (syn !== '0) begin failures++; $display("FAIL clr"); end
      for (int i = N - 1; i >= 0; i--) begin
        din = w[i]; en = 1'b1;
        @(negedge clk);
        en = 1'b0;
        if (i == 3) begin  // a pause in the middle must not disturb anything
          held = syn; din = 1'b1;
          @(negedge clk);
          checks++;
          if (syn !== held) begin failures++; $display("FAIL hold"); end
        end
      end
      exp = R'(ref_mod(64'(w), N, 64'(G), R));
      checks++;
      if (syn !== exp) begin
        failures++;
        $display("FAIL word %07b: syndrome %04b expected %04b", w[N-1:0], syn, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
