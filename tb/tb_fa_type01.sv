// tb_fa_type01: exhaustive self-checking test of the Type 0-1 full adder (true carry in, inverted carry out).
//
// Applies all eight input combinations, twice and in two orders, and compares
// sum and carry with the arithmetic sum a + b + carry_in computed here from
// integers. A watchdog ends the run with a failure if it stalls.
module tb_fa_type01;
  logic a, b, cin, sum, cout_n;
  int checks = 0, failures = 0;

  fa_type01 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout_n(cout_n));

  task automatic check_one(input logic [2:0] v);
    int total;
    logic exp_sum, exp_c;
    {a, b, cin} = v;
    #1;
    total   = int'(a) + int'(b) + int'(cin);
    exp_sum = total[0];
    exp_c   = total[1];
    checks++;
    if (sum !== exp_sum || cout_n !== ~exp_c) begin
      failures++;
      $display("FAIL a=%b b=%b cin=%b: sum=%b cout_n=%b (expected sum %b carry %b)",
               a, b, cin, sum, cout_n, exp_sum, exp_c);
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
