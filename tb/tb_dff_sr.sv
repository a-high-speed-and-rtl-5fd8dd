// tb_dff_sr: self-checking test of the set/reset D flip-flop.
//
// Checks that Q follows D only at rising clock edges (not while the clock is
// high or low), that set_n and reset_n act immediately without a clock edge,
// that they hold Q while asserted (also across a clock edge), and that set
// wins when both are low. A
// watchdog ends the run with a failure if it stalls.
module tb_dff_sr;
  logic clk = 1'b0, set_n, reset_n, d, q;
  int checks = 0, failures = 0;

  dff_sr dut (.clk(clk), .set_n(set_n), .reset_n(reset_n), .d(d), .q(q));

  task automatic expect_q(input logic v, input string what);
    checks++;
    if (q !== v) begin
      failures++;
      $display("FAIL %s: q=%b expected %b", what, q, v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic model;
    set_n = 1; reset_n = 1; d = 0;
    #1 reset_n = 0;
    #1 expect_q(0, "async reset");
    d = 1; clk = 1; #1 expect_q(0, "reset holds over clock edge");
    clk = 0; #1 reset_n = 1;
    #1 expect_q(0, "release of reset does not load");
    set_n = 0;
    #1 expect_q(1, "async set");
    reset_n = 0;
    #1 expect_q(1, "set wins over reset");
    reset_n = 1;
    #1 expect_q(1, "set still held after reset released");
    set_n = 1;
    #1 expect_q(1, "release of set does not load");
    model = q;
    for (int i = 0; i < 200; i++) begin
      d = 1'($urandom);
      #1 clk = 1;
      model = d;
      #1 expect_q(model, "load at rising edge");
      d = ~d;
      #1 expect_q(model, "no load while clock high");
      clk = 0;
      #1 expect_q(model, "no load at falling edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
