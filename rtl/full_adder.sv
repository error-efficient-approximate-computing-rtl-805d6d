// full_adder: one-bit exact full adder, the cell that both ripple-carry
// adders are chained from.
//
// sum  = a xor b xor cin
// cout = majority(a, b, cin), written as (a and b) or (cin and (a xor b))
//
// Purely combinational, no clock. The cell in the source design is a
// transistor-level hybrid-CMOS full adder; only its logic function carries
// over to RTL, so this is the plain gate-level form.
module full_adder (
  input  logic a,    // operand bit
  input  logic b,    // operand bit
  input  logic cin,  // carry from the next less significant position
  output logic sum,  // sum bit of this position
  output logic cout  // carry into the next more significant position
);

  logic p;  // propagate

  always_comb begin
    p    = a ^ b;
    sum  = p ^ cin;
    cout = (a & b) | (cin & p);
  end

endmodule
