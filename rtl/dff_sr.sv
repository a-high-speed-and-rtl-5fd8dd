// dff_sr: 1-bit edge-triggered D flip-flop with asynchronous active-low set
// and reset: the storage element the pipeline registers are built from.
//
// Q takes D on the rising edge of clk. set_n = 0 forces Q to 1 and
// reset_n = 0 forces Q to 0 at once, without a clock. The specified cell is a
// six-gate network with inputs Set_bar, Reset_bar, CLK and D; this is its
// behaviour written as a register, not its gate netlist. Which clock edge is
// active and which of set/reset wins when both are low are choices made
// here: rising edge, and set wins (in the cell's network the Set_bar input
// enters the gate that drives Q directly). If set_n is released while
// reset_n is still low, Q stays 1 until the next rising clock edge, which
// then clears it.
module dff_sr (
  input  logic clk,
  input  logic set_n,
  input  logic reset_n,
  input  logic d,
  output logic q
);
  always_ff @(posedge clk or negedge set_n or negedge reset_n) begin
    if (!set_n)        q <= 1'b1;
    else if (!reset_n) q <= 1'b0;
    else               q <= d;
  end
endmodule
