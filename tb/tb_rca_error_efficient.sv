// tb_rca_error_efficient: self-checking test of the error-efficient
// approximate 32-bit adder (low 8 bits OR, upper 24 bits exact).
//
// For every input the testbench checks
//  * each of the 8 low sum bits against the OR column of the comparison
//    truth table, looked up by row {a_i, b_i, c} (c is irrelevant to it),
//  * the upper 24 bits and carry out against the integer sum
//    (a >> 8) + (b >> 8) + cin,
//  * that the error against the exact sum a + b + cin equals
//    cin * 255 - (a_lo & b_lo), and so never exceeds 255 in magnitude.
// The low byte is swept exhaustively with random upper bits.
module tb_rca_error_efficient;

  localparam int W  = 32;
  localparam int AB = 8;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  rca_error_efficient dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  // OR column of the truth table, rows {Ai,Bi,Ci} = 000..111.
  localparam logic [7:0] OR_SUM = 8'b1111_1100;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb,
                       input logic tc);
    longint unsigned hi_exp;
    longint signed   exact, approx, err, err_exp;
    logic            bad;
    a = ta; b = tb; cin = tc;
    #1;
    bad = 1'b0;
    // low bits, from the truth table
    for (int i = 0; i < AB; i++) begin
      if (sum[i] !== OR_SUM[{ta[i], tb[i], 1'b0}] ||
          sum[i] !== OR_SUM[{ta[i], tb[i], 1'b1}]) bad = 1'b1;
    end
    // upper bits and carry, from integer arithmetic
    hi_exp = longint'(ta[W-1:AB]) + longint'(tb[W-1:AB]) + longint'(tc);
    if ({cout, sum[W-1:AB]} !== (W-AB+1)'(hi_exp)) bad = 1'b1;
    // error against the exact sum
    exact   = longint'(ta) + longint'(tb) + longint'(tc);
    approx  = longint'({cout, sum});
    err     = approx - exact;
    err_exp = longint'(tc) * 255 - longint'(ta[AB-1:0] & tb[AB-1:0]);
    if (err != err_exp || err > 255 || err < -255) bad = 1'b1;
    checks++;
    if (bad) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h + %h + %0b: got %0b_%h (error %0d, expected %0d)",
                 ta, tb, tc, cout, sum, err, err_exp);
    end
  endtask

  initial begin
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, 32'h100, 1'b0);       // carry ripples through the exact part
    apply(32'hFFFF_FF00, '0, 1'b1); // carry input ripples to cout
    for (int i = 0; i < 65536; i++) begin
      apply({24'($urandom), 8'(i)}, {24'($urandom), 8'(i >> 8)}, 1'(i));
    end
    for (int i = 0; i < 5000; i++) begin
      apply($urandom, $urandom, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
