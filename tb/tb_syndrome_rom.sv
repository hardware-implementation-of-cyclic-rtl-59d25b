// tb_syndrome_rom: compares every entry of the (7,3) syndrome ROM with the
// syndrome/error-pattern table of the code, typed in here as constants
// (syndrome written S(3)S(2)S(1)S(0)). Syndromes outside the table must give
// an all-zero pattern.
module tb_syndrome_rom;
  localparam int unsigned N = 7;
  localparam int unsigned R = 4;

  logic [R-1:0] syn;
  logic [N-1:0] err;
  int           checks = 0, failures = 0;

  syndrome_rom dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] table_entry(input logic [R-1:0] s);
    case (s)
      4'b1011: return 7'b1000000;
      4'b1110: return 7'b0100000;
      4'b0111: return 7'b0010000;
      4'b1000: return 7'b0001000;
      4'b0100: return 7'b0000100;
      4'b0010: return 7'b0000010;
      4'b0001: return 7'b0000001;
      default: return 7'b0000000;
    endcase
  endfunction

  initial begin
    for (int s = 0; s < 2**R; s++) begin
      syn = R'(s);
      #1;
      checks++;
      if (err !== table_entry(R'(s))) begin
        failures++;
        $display("FAIL syndrome %04b: pattern %07b expected %07b", R'(s), err, table_entry(R'(s)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
