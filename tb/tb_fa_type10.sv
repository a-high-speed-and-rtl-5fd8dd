// tb_fa_type10: exhaustive self-checking test of the Type 1-0 full adder (inverted carry in, true carry out).
//
// Applies all eight input combinations, twice and in two orders, and compares
// sum and carry with the arithmetic sum a + b + carry_in computed here from
// integers. A watchdog ends the run with a failure if it stalls.
module tb_fa_type10;
  logic a, b, cin_n, sum, cout;
  int checks = 0, failures = 0;

  fa_type10 dut (.a(a), .b(b), .cin_n(cin_n), .sum(sum), .cout(cout));

  task automatic check_one(input logic [2:0] v);
    int total;
    logic exp_sum, exp_c;
    {a, b, cin_n} = v;
    #1;
    total   = int'(a) + int'(b) + int'(!cin_n);
    exp_sum = total[0];
    exp_c   = total[1];
    checks++;
    if (sum !== exp_sum || cout !== exp_c) begin
      failures++;
      $display("FAIL a=%b b=%b cin_n=%b: sum=%b cout=%b (expected sum %b carry %b)",
               a, b, cin_n, sum, cout, exp_sum, exp_c);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) check_one(3'(i));
    for (int i = 7; i >= 0; i--) check_one(3'(i ^ 5));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
