// rca_error_efficient: error-efficient approximate ripple-carry adder
// ("method 3").
//
// The APPROX_BITS least significant positions are no adders at all: each sum
// bit is the OR of the two operand bits, and this part produces no carry.
// The upper WIDTH-APPROX_BITS positions are an exact ripple chain of
// full_adder cells whose first cell takes the external carry input cin.
// Hence
//   sum[APPROX_BITS-1:0]      = a_lo | b_lo
//   {cout, sum[WIDTH-1:APPROX_BITS]} = a_hi + b_hi + cin
// and the result differs from the exact a + b + cin by
//   cin * (2**APPROX_BITS - 1) - (a_lo & b_lo),
// so its magnitude never exceeds 2**APPROX_BITS - 1 (255 for 8 bits).
//
// Purely combinational; the critical path is the (WIDTH-APPROX_BITS)-cell
// carry chain. The OR cells in the low 8 bits, the 24 exact cells above and
// the carry input entering the first exact cell follow the source design;
// the parameterisation is this design's own.
module rca_error_efficient #(
  parameter int unsigned WIDTH       = approx_adder_pkg::ADDER_WIDTH,
  parameter int unsigned APPROX_BITS = approx_adder_pkg::ADDER_APPROX_BITS
) (
  input  logic [WIDTH-1:0] a,    // first operand
  input  logic [WIDTH-1:0] b,    // second operand
  input  logic             cin,  // carry into the first exact position
  output logic [WIDTH-1:0] sum,  // approximate sum
  output logic             cout  // carry out of bit WIDTH-1
);

  // Approximate part: one two-input OR per position, no carry.
  always_comb begin
    for (int i = 0; i < int'(APPROX_BITS); i++) begin
      sum[i] = a[i] | b[i];
    end
  end

  // Exact part: ripple chain starting at position APPROX_BITS.
  logic [WIDTH:APPROX_BITS] c;  // c[i] is the carry into position i

  assign c[APPROX_BITS] = cin;

  for (genvar i = APPROX_BITS; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[WIDTH];

endmodule
