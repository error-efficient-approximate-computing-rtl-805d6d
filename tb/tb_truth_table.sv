// tb_truth_table: replays the per-bit comparison truth table of the exact
// and the error-efficient sum through the complete adder.
//
// Bit 0 of both operands carries (Ai, Bi) and the carry input carries Ci;
// all other operand bits are 0. For each of the 8 rows the accurate output
// (s = 0) must show the full-adder sum Ai^Bi^Ci on y[0], and the
// error-efficient output (s = 1) must show Ai|Bi. The testbench also counts
// the rows where the two differ: the table has exactly four.
module tb_truth_table;

  logic [31:0] a, b, y;
  logic        c_in, s, c_acc, c_erreff;
  int checks = 0, failures = 0, differing = 0;

  // Rows {Ai,Bi,Ci} = 000..111: exact column and OR column.
  localparam logic [7:0] EXACT_COL = 8'b1001_0110;
  localparam logic [7:0] OR_COL    = 8'b1111_1100;

  approx_rca_top dut (
    .a(a), .b(b), .c_in(c_in), .s(s),
    .y(y), .c_acc(c_acc), .c_erreff(c_erreff)
  );

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exact_bit, approx_bit;
    for (int row = 0; row < 8; row++) begin
      a    = {31'b0, row[2]};
      b    = {31'b0, row[1]};
      c_in = row[0];
      s = 1'b0;
      #1;
      exact_bit = y[0];
      s = 1'b1;
      #1;
      approx_bit = y[0];
      checks++;
      if (exact_bit !== EXACT_COL[row]) begin
        failures++;
        $display("FAIL row %0d: accurate sum bit %0b", row, exact_bit);
      end
      checks++;
      if (approx_bit !== OR_COL[row]) begin
        failures++;
        $display("FAIL row %0d: error-efficient sum bit %0b", row, approx_bit);
      end
      $display("Ai=%0b Bi=%0b Ci=%0b  exact S=%0b  error-efficient S=%0b  %s",
               row[2], row[1], row[0], exact_bit, approx_bit,
               (exact_bit == approx_bit) ? "(correct)" : "(incorrect)");
      if (exact_bit != approx_bit) differing++;
    end
    checks++;
    if (differing != 4) begin
      failures++;
      $display("FAIL %0d differing rows, expected 4", differing);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
