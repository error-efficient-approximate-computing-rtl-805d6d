// approx_rca_top: user-selectable accurate / error-efficient 32-bit adder.
//
// Both adders see the same operands a, b and carry input c_in and work in
// parallel. rca_accurate yields the exact sum S1 and carry C_acc;
// rca_error_efficient yields S2, whose low APPROX_BITS bits are a | b, and
// its carry C_erreff. A 2:1 multiplexer driven by the select line s
// puts S1 (s = 0) or S2 (s = 1) on y. Both carry outputs are brought out
// separately; the multiplexer selects only the sum, as in the source design.
//
// Purely combinational: y follows the inputs after the delay of the
// selected adder's carry chain plus one multiplexer. Port names follow the
// source design's block diagram; the parameters are this design's own
// generalisation, with the source design's sizes as defaults.
module approx_rca_top
  import approx_adder_pkg::*;
#(
  parameter int unsigned WIDTH       = ADDER_WIDTH,
  parameter int unsigned APPROX_BITS = ADDER_APPROX_BITS
) (
  input  logic [WIDTH-1:0] a,         // first operand
  input  logic [WIDTH-1:0] b,         // second operand
  input  logic             c_in,      // carry input of both adders
  input  logic             s,         // 0: accurate sum, 1: approximate sum
  output logic [WIDTH-1:0] y,         // selected sum
  output logic             c_acc,     // carry out of the accurate adder
  output logic             c_erreff   // carry out of the error-efficient adder
);

  logic [WIDTH-1:0] s1;  // accurate sum
  logic [WIDTH-1:0] s2;  // error-efficient sum

  rca_accurate #(
    .WIDTH(WIDTH)
  ) u_acc (
    .a   (a),
    .b   (b),
    .cin (c_in),
    .sum (s1),
    .cout(c_acc)
  );

  rca_error_efficient #(
    .WIDTH      (WIDTH),
    .APPROX_BITS(APPROX_BITS)
  ) u_erreff (
    .a   (a),
    .b   (b),
    .cin (c_in),
    .sum (s2),
    .cout(c_erreff)
  );

  sum_mux #(
    .WIDTH(WIDTH)
  ) u_mux (
    .in_accurate(s1),
    .in_approx  (s2),
    .sel        (sum_sel_e'(s)),
    .y          (y)
  );

endmodule
