// rca_accurate: exact WIDTH-bit ripple-carry adder ("method 1").
//
// WIDTH full_adder cells are chained: the carry out of position i is the
// carry in of position i+1, position 0 takes the external carry input and
// the carry out of the top position is the adder's carry output (overflow of
// an unsigned add). The result is exact: {cout, sum} = a + b + cin.
//
// Purely combinational; the critical path is the WIDTH-cell carry chain.
// The cell count and chaining follow the source design. The external carry
// input follows its figures, which draw a carry input on the first cell
// (its text says the initial carry is 0; tie cin low for that use).
module rca_accurate #(
  parameter int unsigned WIDTH = approx_adder_pkg::ADDER_WIDTH
) (
  input  logic [WIDTH-1:0] a,    // first operand
  input  logic [WIDTH-1:0] b,    // second operand
  input  logic             cin,  // carry into bit 0
  output logic [WIDTH-1:0] sum,  // exact sum
  output logic             cout  // carry out of bit WIDTH-1
);

  logic [WIDTH:0] c;  // c[i] is the carry into position i

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
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
