// rca16_comp: N-bit ripple carry adder in the "compressor" arrangement.
//
// Bits alternate between fa_type01 (even bits: true carry in, inverted carry
// out) and fa_type10 (odd bits: inverted carry in, true carry out). The carry
// therefore travels inverted across every even->odd boundary and true across
// every odd->even boundary, and no carry-path inverters or buffers are
// needed; the chain still computes {cout, sum} = a + b + cin.
// N = 16 is the size of the specified adder; N must be even so that the
// chain starts with a Type 0-1 cell and ends with a Type 1-0 cell (true
// carry out). Combinational, with an N-cell ripple path.
module rca16_comp #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  // c[i] is the signal on the carry wire entering bit i: true carry for even
  // i, inverted carry for odd i. c[N] is the (true) final carry.
  logic [N:0] c;

  initial assert (N % 2 == 0) else $error("rca16_comp: N must be even");

  assign c[0] = cin;

  for (genvar i = 0; i < N; i += 2) begin : g_pair
    fa_type01 u_fa01 (.a(a[i]),   .b(b[i]),   .cin(c[i]),     .sum(sum[i]),   .cout_n(c[i+1]));
    fa_type10 u_fa10 (.a(a[i+1]), .b(b[i+1]), .cin_n(c[i+1]), .sum(sum[i+1]), .cout(c[i+2]));
  end

  assign cout = c[N];
endmodule
