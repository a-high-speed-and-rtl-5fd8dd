// pipo_reg: WIDTH-bit parallel-in parallel-out register, one dff_sr per bit.
//
// All bits load d on the rising clock edge. set_n (active low) sets every bit
// to 1 and reset_n (active low) clears every bit, asynchronously; both are
// shared by all bits. The MAC uses an 8-bit instance for the product
// (pipeline stage 1) and a 17-bit instance for the accumulated sum and its
// carry (stage 2). The default width is the product register's 8 bits.
module pipo_reg #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             set_n,
  input  logic             reset_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    dff_sr u_ff (.clk(clk), .set_n(set_n), .reset_n(reset_n), .d(d[i]), .q(q[i]));
  end
endmodule
