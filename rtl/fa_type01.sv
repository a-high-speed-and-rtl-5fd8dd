// fa_type01: full adder "Type 0-1": true carry in, inverted carry out.
//
// The hybrid full-adder cell with its Cout multiplexer fed by the complements
// of Cin and B, so it delivers the complement of the carry:
//   Sum    = (A xor B) & ~Cin | (A xnor B) & Cin
//   Cout_n = (A xor B) & ~Cin | (A xnor B) & ~B
// A Type 0-1 cell is always followed by a Type 1-0 cell, which takes the
// inverted carry directly, so the carry chain needs no inverter or buffer
// between the two. Equations follow the specification; the cell is
// ftghfa21t with INV_COUT set. Combinational.
module fa_type01 (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout_n
);
  ftghfa21t #(.INV_CIN(1'b0), .INV_COUT(1'b1)) u_cell (
    .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout_n)
  );
endmodule
