// tb_full_adder: exhaustive check of the one-bit full adder.
// All eight input combinations are applied; {cout, sum} must equal the
// integer sum a + b + cin, and sum must match the method-1 column of the
// accurate/approximate comparison truth table.
module tb_full_adder;

  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  // Expected sum bit for rows {a,b,cin} = 000..111 (exact column).
  localparam logic [7:0] EXACT_SUM = 8'b1001_0110;

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, cin} = 3'(i);
      #1;
      checks++;
      if ({cout, sum} !== 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b -> cout=%0b sum=%0b", a, b, cin, cout, sum);
      end
      checks++;
      if (sum !== EXACT_SUM[i]) begin
        failures++;
        $display("FAIL table row %0d: sum=%0b", i, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
