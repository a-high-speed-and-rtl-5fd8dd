// tb_vsm4: exhaustive self-checking test of the 4x4 signed multiplier.
//
// Applies all 256 operand pairs, interpreted as two's-complement values
// -8..7, and compares the 8-bit product with the integer product. A watchdog
// ends the run with a failure if it stalls.
module tb_vsm4;
  logic [3:0] x, y;
  logic [7:0] p;
  int checks = 0, failures = 0;

  vsm4 dut (.x(x), .y(y), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -8; i < 8; i++) begin
      for (int j = -8; j < 8; j++) begin
        int prod;
        x = 4'(i);
        y = 4'(j);
        #1;
        prod = i * j;
        checks++;
        if ($signed(p) != prod) begin
          failures++;
          $display("FAIL %0d * %0d = %0d, expected %0d", i, j, $signed(p), prod);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
