// tb_rca16_comp: self-checking test of the 16-bit compressor ripple adder.
//
// Drives corner cases (all-ones carry ripple, zero, alternating patterns)
// and 4000 random operand pairs with both carry-in values, and compares
// {cout, sum} with a 17-bit integer addition. A watchdog ends the run with a
// failure if it stalls.
module tb_rca16_comp;
  localparam int N = 16;
  logic [N-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  rca16_comp dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check_one(input logic [N-1:0] va, input logic [N-1:0] vb, input logic vc);
    logic [N:0] expected;
    a = va; b = vb; cin = vc;
    #1;
    expected = {1'b0, va} + {1'b0, vb} + (N+1)'(vc);
    checks++;
    if ({cout, sum} !== expected) begin
      failures++;
      $display("FAIL %h + %h + %b = %b_%h, expected %h", va, vb, vc, cout, sum, expected);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one('0, '0, 1'b0);
    check_one('0, '0, 1'b1);
    check_one('1, '0, 1'b1);   // carry ripples through all 16 cells
    check_one('1, '1, 1'b1);
    check_one(16'h5555, 16'hAAAA, 1'b1);
    check_one(16'h7FFF, 16'h0001, 1'b0);
    check_one(16'h8000, 16'h8000, 1'b0);
    for (int i = 0; i < N; i++) check_one(N'(1) << i, '1 >> (N - i), 1'b1);
    for (int i = 0; i < 4000; i++)
      check_one(N'($urandom), N'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
