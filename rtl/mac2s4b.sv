// mac2s4b: 2-stage pipelined 4-bit signed multiply-accumulate unit.
//
// Every clock cycle one product x*y of two 4-bit two's-complement operands is
// added to a running 16-bit sum, and the sum is presented clamped to 8 bits.
//   stage 1: vsm4 forms the 8-bit product; an 8-bit register (preg) holds it.
//   stage 2: the product, widened to 16 bits with 8 guard bits, is added to
//            the accumulator by the 16-bit compressor ripple adder (cin = 0);
//            a 17-bit register (areg) holds {sum, carry out}.
//   output:  sat_unit clamps the registered sum to -128..127.
// Timing: operands present before rising edge k are in preg after edge k and
// included in acc/out after edge k+1 (latency 2 cycles, one MAC per cycle).
// Both registers share the active-low asynchronous set_n and reset_n; the
// accumulator is cleared with reset_n and there is no other clear or enable.
// The 16-bit accumulator wraps modulo 2^16; only the output saturates.
//
// The specified datapath ties the adder's upper eight operand bits to 0.
// That treats every negative product as positive, so by default
// (SIGN_EXTEND = 1) the guard bits here are copies of the product's sign bit,
// which makes the sum a true signed sum. SIGN_EXTEND = 0 grounds them as
// drawn. The carry out of the adder is stored (cout) but not used further.
module mac2s4b
  import mac_pkg::*;
#(
  parameter bit SIGN_EXTEND = 1'b1
) (
  input  logic              clk,
  input  logic              set_n,    // active-low asynchronous set of both registers
  input  logic              reset_n,  // active-low asynchronous reset of both registers
  input  logic [IN_W-1:0]   x,        // multiplicand, two's complement
  input  logic [IN_W-1:0]   y,        // multiplier, two's complement
  output logic [OUT_W-1:0]  out,      // saturated accumulator, two's complement
  output logic [ACC_W-1:0]  acc,      // registered 16-bit accumulator
  output logic              cout      // registered adder carry out
);
  logic [PROD_W-1:0] prod, prod_q;
  logic [ACC_W-1:0]  addend, sum;
  logic              sum_c;
  acc_reg_t          areg_d, areg_q;

  // Stage 1: multiply and register the product.
  vsm4 u_vsm (.x(x), .y(y), .p(prod));

  pipo_reg #(.WIDTH(PROD_W)) u_preg (
    .clk(clk), .set_n(set_n), .reset_n(reset_n), .d(prod), .q(prod_q)
  );

  // Stage 2: accumulate.
  always_comb addend = {{GUARD_W{SIGN_EXTEND & prod_q[PROD_W-1]}}, prod_q};

  rca16_comp #(.N(ACC_W)) u_rca (
    .a(addend), .b(areg_q.sum), .cin(1'b0), .sum(sum), .cout(sum_c)
  );

  always_comb begin
    areg_d.sum  = sum;
    areg_d.cout = sum_c;
  end

  pipo_reg #(.WIDTH(ACC_W + 1)) u_areg (
    .clk(clk), .set_n(set_n), .reset_n(reset_n), .d(areg_d), .q(areg_q)
  );

  // Output: saturate.
  sat_unit u_sat (.in(areg_q.sum), .out(out));

  assign acc  = areg_q.sum;
  assign cout = areg_q.cout;
endmodule
