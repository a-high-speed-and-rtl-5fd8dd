// tg_mux2: 2:1 multiplexer built from two transmission gates driven by a
// complementary select pair (the Sum and Cout modules of the hybrid adder).
//
// When sel is 1 (sel_n 0) d_sel is passed, when sel_n is 1 d_seln is passed:
//   y = sel & d_sel | sel_n & d_seln.
// In the adder sel is the XOR rail and sel_n the XNOR rail, which are always
// complementary, so exactly one gate conducts. Combinational.
module tg_mux2 (
  input  logic sel,
  input  logic sel_n,
  input  logic d_sel,
  input  logic d_seln,
  output logic y
);
  always_comb y = (sel & d_sel) | (sel_n & d_seln);
endmodule
