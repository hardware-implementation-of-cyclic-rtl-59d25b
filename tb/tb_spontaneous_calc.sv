// tb_spontaneous_calc: loads every 4-bit syndrome into the self-running
// register of the (7,3) Meggitt decoder, steps it 8 times and compares each
// state with x^t s(x) mod g(x) from long division. err_here must be high
// exactly when the register holds 1011 (S(3)..S(0)), the syndrome of an error
// in bit 6. Also checks that the register holds while shift is low.
module tb_spontaneous_calc;
  import tb_cyclic_ref_pkg::*;

  localparam int unsigned N = 7;
  localparam int unsigned R = 4;
  localparam logic [R:0]  G = 5'b10111;

  logic         clk = 1'b0;
  logic         rst, load, shift, err_here;
  logic [R-1:0] syn_in, s;
  int           checks = 0, failures = 0;
  int           hits = 0;

  spontaneous_calc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0]  v;
    logic [R-1:0] exp;
    rst = 1'b1; load = 1'b0; shift = 1'b0; syn_in = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int a = 0; a < 2**R; a++) begin
      syn_in = R'(a); load = 1'b1; shift = 1'b1;  // load wins over shift
      @(negedge clk);
      load = 1'b0; shift = 1'b0;
      v = 64'(a);
      for (int t = 0; t <= N; t++) begin
        exp = R'(ref_mod(v << t, R + t, 64'(G), R));
        checks++;
        if (s !== exp) begin
          failures++;
          $display("FAIL start %04b step %0d: %04b expected %04b", R'(a), t, s, exp);
        end
        checks++;
        if (err_here !== (exp == 4'b1011)) begin
          failures++;
          $display("FAIL detector at %04b: %0b", exp, err_here);
        end
        if (err_here) hits++;
        shift = 1'b1;
        @(negedge clk);
        shift = 1'b0;
        if (t == 2) begin
          @(negedge clk);  // idle cycle
        end
      end
    end
    checks++;
    if (hits == 0) begin failures++; $display("FAIL detector never fired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
