// tb_rca_accurate: self-checking test of the exact 32-bit ripple-carry adder.
// Directed corner cases (zero, all ones, full carry propagation, carry input
// alone) and random operands are applied; {cout, sum} must equal the 33-bit
// integer sum a + b + cin computed by the testbench.
module tb_rca_accurate;

  localparam int W = 32;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  rca_accurate dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb,
                       input logic tc);
    logic [W:0] expected;
    a = ta; b = tb; cin = tc;
    #1;
    expected = {1'b0, ta} + {1'b0, tb} + {{W{1'b0}}, tc};
    checks++;
    if ({cout, sum} !== expected) begin
      failures++;
      $display("FAIL %h + %h + %0b: got %0b_%h expected %0b_%h",
               ta, tb, tc, cout, sum, expected[W], expected[W-1:0]);
    end
  endtask

  initial begin
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '0, 1'b1);          // carry ripples through all 32 cells
    apply('1, 32'd1, 1'b0);
    apply('1, '1, 1'b1);
    apply(32'h8000_0000, 32'h8000_0000, 1'b0);
    apply(32'h0000_00FF, 32'h0000_0001, 1'b0);
    apply(32'h1234_5678, 32'h8765_4321, 1'b0);
    for (int i = 0; i < W; i++) begin
      apply(32'(1) << i, 32'(1) << i, 1'b0);
      apply(~(32'(1) << i), 32'(1) << i, 1'b1);
    end
    for (int i = 0; i < 5000; i++) begin
      apply($urandom, $urandom, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
