// fa_type10: full adder "Type 1-0": inverted carry in, true carry out.
//
// The carry pin carries the complement of the carry (cin_n), as delivered by
// a preceding Type 0-1 cell. The hybrid full-adder cell's multiplexers are
// fed so that
//   Sum  = (A xor B) & cin_n | (A xnor B) & ~cin_n
//   Cout = (A xor B) & ~cin_n | (A xnor B) & B
// which is the ordinary full-adder result of A + B + ~cin_n. Equations follow
// the specification; the cell is ftghfa21t with INV_CIN set. Combinational.
module fa_type10 (
  input  logic a,
  input  logic b,
  input  logic cin_n,
  output logic sum,
  output logic cout
);
  ftghfa21t #(.INV_CIN(1'b1), .INV_COUT(1'b0)) u_cell (
    .a(a), .b(b), .cin(cin_n), .sum(sum), .cout(cout)
  );
endmodule
