// tb_sat_unit: exhaustive self-checking test of the saturation unit.
//
// Applies all 65536 16-bit two's-complement inputs and compares the output
// with the input clamped to -128..127, computed here with integer compares.
// A watchdog ends the run with a failure if it stalls.
module tb_sat_unit;
  import mac_pkg::*;
  logic [15:0] in;
  logic [7:0]  out;
  int checks = 0, failures = 0;

  sat_unit dut (.in(in), .out(out));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -32768; v < 32768; v++) begin
      int expected;
      in = 16'(v);
      #1;
      expected = (v > SAT_MAX) ? SAT_MAX : (v < SAT_MIN) ? SAT_MIN : v;
      checks++;
      if ($signed(out) != expected) begin
        failures++;
        if (failures < 10) $display("FAIL in=%0d out=%0d expected %0d", v, $signed(out), expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
