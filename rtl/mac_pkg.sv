// mac_pkg: widths and limits shared by the 2-stage pipelined 4-bit signed
// multiply-accumulate unit (MAC).
//
// Operands are 4-bit two's-complement numbers, their product is 8 bits, the
// accumulator is 16 bits (the 8-bit product plus 8 guard bits) and the
// saturated output is 8 bits, clamped to -128..127. All of these numbers are
// the ones the design is specified with; nothing here is tunable.
package mac_pkg;

  localparam int unsigned IN_W    = 4;              // operand width
  localparam int unsigned PROD_W  = 2 * IN_W;       // product width (8)
  localparam int unsigned GUARD_W = 8;              // guard bits above the product
  localparam int unsigned ACC_W   = PROD_W + GUARD_W; // accumulator width (16)
  localparam int unsigned OUT_W   = 8;              // saturated output width

  localparam int SAT_MAX = 2 ** (OUT_W - 1) - 1;  // 127
  localparam int SAT_MIN = -(2 ** (OUT_W - 1));  // -128

  // Accumulator register contents: 16-bit sum above the stored carry-out.
  typedef struct packed {
    logic [ACC_W-1:0] sum;   // register bits Q16..Q1
    logic             cout;  // register bit Q0
  } acc_reg_t;

endpackage
