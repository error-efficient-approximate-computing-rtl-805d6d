// sum_mux: WIDTH-bit 2:1 multiplexer that hands the user either the
// accurate or the error-efficient sum.
//
// sel = 0 (SEL_ACCURATE) passes in_accurate, sel = 1 (SEL_ERROR_EFFICIENT)
// passes in_approx. Purely combinational. The select polarity is the source
// design's; the enum type for it is this design's own.
module sum_mux
  import approx_adder_pkg::*;
#(
  parameter int unsigned WIDTH = approx_adder_pkg::ADDER_WIDTH
) (
  input  logic [WIDTH-1:0] in_accurate,  // sum of the accurate adder
  input  logic [WIDTH-1:0] in_approx,    // sum of the error-efficient adder
  input  sum_sel_e         sel,          // user select line
  output logic [WIDTH-1:0] y             // selected sum
);

  always_comb begin
    unique case (sel)
      SEL_ACCURATE:        y = in_accurate;
      SEL_ERROR_EFFICIENT: y = in_approx;
      default:             y = in_accurate;
    endcase
  end

endmodule
