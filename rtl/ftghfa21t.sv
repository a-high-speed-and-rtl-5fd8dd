// ftghfa21t: hybrid 1-bit full adder, in the three carry-polarity forms the
// MAC's adders and multiplier are built from.
//
// Four parts: an XOR/XNOR stage (xor_xnor11t), an inverter that makes the
// complement of the signal on the carry pin, and two transmission-gate
// multiplexers (tg_mux2) selected by the XOR/XNOR pair. With the default
// parameters (both carries true) it computes
//   Sum  = (A xor B) & ~Cin | (A xnor B) & Cin
//   Cout = (A xor B) &  Cin | (A xnor B) & B
// i.e. when A and B differ the carry out is the carry in, otherwise it is B.
// The two other forms change only which signals feed the multiplexers:
//   INV_COUT = 1 ("Type 0-1"): the Cout multiplexer takes ~Cin and ~B, so
//     cout delivers the complement of the carry;
//   INV_CIN = 1 ("Type 1-0"): the carry pin holds the complement of the
//     carry, so the Sum multiplexer inputs are swapped and the Cout
//     multiplexer takes the pin's complement.
// fa_type01 and fa_type10 fix these parameters. The structure and the three
// sets of equations follow the specification; transistor sizing has no RTL
// counterpart. Combinational.
module ftghfa21t #(
  parameter bit INV_CIN  = 1'b0,  // carry pin carries the inverted carry
  parameter bit INV_COUT = 1'b0   // cout delivers the inverted carry
) (
  input  logic a,
  input  logic b,
  input  logic cin,   // carry pin (inverted carry if INV_CIN)
  output logic sum,
  output logic cout   // carry out (inverted if INV_COUT)
);
  logic x, xn, cin_n, b_n;
  logic sum_on_x, sum_on_xn, cout_on_x, cout_on_xn;

  xor_xnor11t u_xx (.a(a), .b(b), .a_xor_b(x), .a_xnor_b(xn));

  always_comb begin
    cin_n = ~cin;  // inverter module
    b_n   = ~b;
    // Sum: select the pin or its complement so that the true carry is
    // inverted when A and B differ.
    sum_on_x   = INV_CIN ? cin   : cin_n;
    sum_on_xn  = INV_CIN ? cin_n : cin;
    // Cout: propagate the carry (in the output polarity) when A and B
    // differ, otherwise pass B (in the output polarity).
    cout_on_x  = (INV_CIN ^ INV_COUT) ? cin_n : cin;
    cout_on_xn = INV_COUT ? b_n : b;
  end

  tg_mux2 u_sum  (.sel(x), .sel_n(xn), .d_sel(sum_on_x),  .d_seln(sum_on_xn),  .y(sum));
  tg_mux2 u_cout (.sel(x), .sel_n(xn), .d_sel(cout_on_x), .d_seln(cout_on_xn), .y(cout));
endmodule
