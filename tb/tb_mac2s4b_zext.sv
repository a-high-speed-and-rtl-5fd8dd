// tb_mac2s4b_zext: self-checking test of the MAC with SIGN_EXTEND = 0, the
// variant whose eight guard bits are tied to 0.
//
// In that variant the 8-bit product register is added to the accumulator as
// an unsigned number 0..255, so a product of -1 adds 255. The test resets,
// applies 300 random operand pairs and checks the accumulator (mod 2^16)
// and the saturated output against that reference every cycle. A watchdog
// ends the run with a failure if it stalls.
module tb_mac2s4b_zext;
  import mac_pkg::*;

  logic             clk = 1'b0, set_n = 1'b1, reset_n = 1'b1;
  logic [IN_W-1:0]  x = '0, y = '0;
  logic [OUT_W-1:0] out;
  logic [ACC_W-1:0] acc;
  logic             cout;
  int checks = 0, failures = 0, n_neg = 0;
  logic [7:0]  prod_m;
  logic [15:0] acc_m;

  mac2s4b #(.SIGN_EXTEND(1'b0)) dut (
    .clk(clk), .set_n(set_n), .reset_n(reset_n), .x(x), .y(y),
    .out(out), .acc(acc), .cout(cout)
  );

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a_s, exp_out;
    @(negedge clk);
    reset_n = 1'b0;
    #2 reset_n = 1'b1;
    prod_m = '0; acc_m = '0;
    for (int i = 0; i < 300; i++) begin
      int xv, yv;
      xv = int'($urandom_range(15)) - 8;
      yv = int'($urandom_range(15)) - 8;
      x = IN_W'(xv); y = IN_W'(yv);
      @(posedge clk);
      acc_m  = acc_m + {8'h00, prod_m};
      prod_m = 8'(xv * yv);
      if (xv * yv < 0) n_neg++;
      @(negedge clk);
      a_s = int'($signed(acc_m));
      exp_out = (a_s > SAT_MAX) ? SAT_MAX : (a_s < SAT_MIN) ? SAT_MIN : a_s;
      checks++;
      if (acc !== acc_m || $signed(out) != exp_out) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: acc=%h out=%0d expected %h %0d", i, acc, $signed(out), acc_m, exp_out);
      end
    end
    checks++;
    if (n_neg == 0) begin failures++; $display("FAIL no negative product applied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
