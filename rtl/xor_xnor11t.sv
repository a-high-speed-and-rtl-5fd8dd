// xor_xnor11t: the XOR/XNOR stage of the hybrid full adder ("Module 1").
//
// Produces A xor B and A xnor B together, as the 11-transistor dual-rail gate
// at the head of the adder does. Both rails are needed: they are the
// complementary select lines of the transmission-gate multiplexers that
// follow. Purely combinational; at gate level the two outputs are exact
// complements, which is all the multiplexers rely on.
module xor_xnor11t (
  input  logic a,
  input  logic b,
  output logic a_xor_b,
  output logic a_xnor_b
);
  always_comb begin
    a_xor_b  = a ^ b;
    a_xnor_b = ~(a ^ b);
  end
endmodule
