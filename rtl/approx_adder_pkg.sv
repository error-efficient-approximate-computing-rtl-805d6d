// approx_adder_pkg: constants and types shared by the adders of the
// selectable accurate / error-efficient 32-bit ripple-carry adder.
//
// ADDER_WIDTH is the operand width of both adders (32 bits). ADDER_APPROX_BITS is
// the number of least significant bit positions that the error-efficient
// adder computes with a two-input OR instead of a full adder (8 bits); the
// remaining ADDER_WIDTH-ADDER_APPROX_BITS positions (24) are an exact ripple chain.
// sum_sel_e encodes the user's select line of the output multiplexer:
// 0 picks the accurate sum, 1 the error-efficient approximate sum.
package approx_adder_pkg;

  localparam int unsigned ADDER_WIDTH = 32;
  localparam int unsigned ADDER_APPROX_BITS = 8;

  typedef enum logic {
    SEL_ACCURATE       = 1'b0,
    SEL_ERROR_EFFICIENT = 1'b1
  } sum_sel_e;

endpackage
