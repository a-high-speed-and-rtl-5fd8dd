// tb_pipo_reg: self-checking test of the parallel-in parallel-out register at
// both widths the MAC uses (8 and 17 bits).
//
// Loads random words on rising clock edges and checks they appear only after
// the edge, and checks that the shared active-low set and reset force all
// bits to ones or zeros without a clock. A watchdog ends the run with a
// failure if it stalls.
module tb_pipo_reg;
  logic clk = 1'b0, set_n, reset_n;
  logic [7:0]  d8, q8, m8;
  logic [16:0] d17, q17, m17;
  int checks = 0, failures = 0;

  pipo_reg                u8  (.clk(clk), .set_n(set_n), .reset_n(reset_n), .d(d8),  .q(q8));
  pipo_reg #(.WIDTH(17))  u17 (.clk(clk), .set_n(set_n), .reset_n(reset_n), .d(d17), .q(q17));

  task automatic expect_q(input logic [7:0] e8, input logic [16:0] e17, input string what);
    checks++;
    if (q8 !== e8 || q17 !== e17) begin
      failures++;
      $display("FAIL %s: q8=%h q17=%h expected %h %h", what, q8, q17, e8, e17);
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
    set_n = 1; reset_n = 0; d8 = '1; d17 = '1;
    #1 expect_q('0, '0, "reset");
    set_n = 0; reset_n = 1;
    #1 expect_q('1, '1, "set");
    set_n = 1;
    m8 = '1; m17 = '1;
    for (int i = 0; i < 300; i++) begin
      d8 = 8'($urandom); d17 = 17'($urandom);
      #1 expect_q(m8, m17, "before edge");
      clk = 1;
      m8 = d8; m17 = d17;
      #1 expect_q(m8, m17, "after edge");
      d8 = ~d8; d17 = ~d17;
      #1 clk = 0;
      #1 expect_q(m8, m17, "falling edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
