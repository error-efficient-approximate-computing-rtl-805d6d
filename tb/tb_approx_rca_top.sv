// tb_approx_rca_top: end-to-end test of the selectable accurate /
// error-efficient 32-bit adder at its default sizes.
//
// Every operand pair is applied with both values of the select line s.
// Expected values are computed here from integer arithmetic:
//  * s = 0: y = (a + b + c_in) mod 2**32 exactly;
//  * s = 1: y[7:0] = a[7:0] | b[7:0] and y[31:8] = (a>>8) + (b>>8) + c_in;
//  * c_acc is the carry of the exact sum and c_erreff that of the upper
//    24-bit sum, whatever s is.
// The low byte is swept exhaustively (with both c_in values) under random
// upper bits, then random operands follow. The testbench counts how often
// each mechanism happened: both select values, each carry output set, the
// carry input set, an approximate result that differs from the exact one and
// one that equals it; a mechanism that never happened counts as a failure.
// It also reports the error statistics of the approximate output.
module tb_approx_rca_top;

  localparam int W  = 32;
  localparam int AB = 8;

  logic [W-1:0] a, b, y;
  logic         c_in, s, c_acc, c_erreff;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_sel_acc = 0, n_sel_approx = 0, n_cacc = 0, n_cerreff = 0, n_cin = 0;
  int n_err = 0, n_noerr = 0;
  longint signed  max_abs_err = 0;
  longint unsigned sum_abs_err = 0;
  int n_approx = 0;

  approx_rca_top dut (
    .a(a), .b(b), .c_in(c_in), .s(s),
    .y(y), .c_acc(c_acc), .c_erreff(c_erreff)
  );

  initial begin : watchdog
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: a=%h b=%h c_in=%0b s=%0b y=%h c_acc=%0b c_erreff=%0b",
                 what, a, b, c_in, s, y, c_acc, c_erreff);
    end
  endtask

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb,
                       input logic tc);
    logic [W:0]        exact;
    logic [W-AB:0]     hi;
    logic [W-1:0]      approx;
    longint signed     err;
    exact  = {1'b0, ta} + {1'b0, tb} + {{W{1'b0}}, tc};
    hi     = {1'b0, ta[W-1:AB]} + {1'b0, tb[W-1:AB]} + {{(W-AB){1'b0}}, tc};
    approx = {hi[W-AB-1:0], ta[AB-1:0] | tb[AB-1:0]};
    a = ta; b = tb; c_in = tc;
    if (tc) n_cin++;

    s = 1'b0;
    #1;
    n_sel_acc++;
    check(y === exact[W-1:0], "accurate sum");
    check(c_acc === exact[W], "accurate carry");
    check(c_erreff === hi[W-AB], "error-efficient carry");
    if (c_acc) n_cacc++;
    if (c_erreff) n_cerreff++;

    s = 1'b1;
    #1;
    n_sel_approx++;
    check(y === approx, "approximate sum");
    check(c_acc === exact[W], "accurate carry (s=1)");
    check(c_erreff === hi[W-AB], "error-efficient carry (s=1)");

    err = longint'({c_erreff, y}) - longint'(exact);
    if (err < 0) err = -err;
    check(err <= 255, "error bound");
    if (err != 0) n_err++; else n_noerr++;
    if (err > max_abs_err) max_abs_err = err;
    sum_abs_err += longint'(err);
    n_approx++;
  endtask

  initial begin
    apply('0, '0, 1'b0);
    apply('1, '1, 1'b1);
    apply('1, 32'd1, 1'b0);
    apply(32'h0000_0080, 32'h0000_0080, 1'b0);
    for (int i = 0; i < 131072; i++) begin
      apply({24'($urandom), 8'(i)}, {24'($urandom), 8'(i >> 8)}, 1'(i >> 16));
    end
    for (int i = 0; i < 20000; i++) begin
      apply($urandom, $urandom, 1'($urandom));
    end

    check(n_sel_acc > 0,    "mechanism: accurate sum selected");
    check(n_sel_approx > 0, "mechanism: approximate sum selected");
    check(n_cacc > 0,       "mechanism: accurate carry out");
    check(n_cerreff > 0,    "mechanism: error-efficient carry out");
    check(n_cin > 0,        "mechanism: carry input set");
    check(n_err > 0,        "mechanism: approximation error");
    check(n_noerr > 0,      "mechanism: approximation exact");

    $display("select accurate=%0d approximate=%0d c_acc=%0d c_erreff=%0d c_in=%0d",
             n_sel_acc, n_sel_approx, n_cacc, n_cerreff, n_cin);
    $display("approximate results: %0d wrong, %0d right, max |error| %0d, mean |error| %0.2f",
             n_err, n_noerr, max_abs_err, real'(sum_abs_err) / real'(n_approx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
