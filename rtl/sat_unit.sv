// sat_unit: saturates the 16-bit two's-complement accumulator value to the
// 8-bit range -128..127.
//
// in[15] is the sign. A positive value with any of bits 14..7 set is too
// large (op_5) and gives 127; a negative value whose bits 14..7 are not all
// ones is too small and gives -128; otherwise the low 8 bits pass through.
// Output bits 6..0 are (op_6 & in[i]) | op_5, where op_6 enables the
// pass-through (non-negative, or negative and in range) and op_5 forces ones;
// bit 7 is the sign bit. The net names op_1..op_6 and the grouping of the
// input bits into op_1..op_4 follow the specified saturation schematic; the
// logic behind each net is written from the function it must have.
// Combinational.
module sat_unit
  import mac_pkg::*;
(
  input  logic [ACC_W-1:0] in,
  output logic [OUT_W-1:0] out
);
  logic op_1, op_2, op_3, op_4, op_5, op_6;

  always_comb begin
    op_1 = in[7] | in[14] | in[13] | in[12];  // any upper bit set (part 1)
    op_2 = in[11] | in[10] | in[9] | in[8];   // any upper bit set (part 2)
    op_3 = in[9] & in[8] & in[7] & in[14];    // all upper bits set (part 1)
    op_4 = in[13] & in[12] & in[11] & in[10]; // all upper bits set (part 2)
    op_5 = (~in[15] & op_2) | (~in[15] & op_1); // positive overflow
    op_6 = ~in[15] | (op_3 & op_4);             // pass the low bits
    for (int i = 0; i < OUT_W - 1; i++)
      out[i] = (op_6 & in[i]) | op_5;
    out[OUT_W-1] = in[15];
  end

  // A value inside the output range must pass through unchanged.
  always_comb
    if (int'($signed(in)) <= SAT_MAX && int'($signed(in)) >= SAT_MIN)
      assert (out == in[OUT_W-1:0])
        else $error("sat_unit: in-range value %0d not passed through", $signed(in));
endmodule
