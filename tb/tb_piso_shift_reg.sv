// tb_piso_shift_reg: loads random words into the parallel-load shift
// register and checks that they leave most significant bit first, one bit per
// shift, that the register holds while shift is low and that load wins over
// shift.
module tb_piso_shift_reg;
  localparam int unsigned W = 7;

  logic         clk = 1'b0;
  logic         rst, load, shift, q;
  logic [W-1:0] d;
  int           checks = 0, failures = 0;

  piso_shift_reg #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    logic [W-1:0] w;
    rst = 1'b1; load = 1'b0; shift = 1'b0; d = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 200; t++) begin
      w = W'($urandom);
      d = w; load = 1'b1; shift = (t % 2 == 0);  // load must win over shift
      @(negedge clk);
      load = 1'b0; shift = 1'b0; d = ~w;
      for (int i = W - 1; i >= 0; i--) begin
        check(q, w[i], "serial bit");
        if ($urandom_range(0, 3) == 0) begin  // idle cycle: must hold
          @(negedge clk);
          check(q, w[i], "hold");
        end
        shift = 1'b1;
        @(negedge clk);
        shift = 1'b0;
      end
      check(q, 1'b0, "empty after W shifts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
