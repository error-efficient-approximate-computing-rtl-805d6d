// tb_sum_mux: self-checking test of the 2:1 sum multiplexer.
// Random pairs of sums are applied with both select values; select 0 must
// pass the accurate input and select 1 the approximate input.
module tb_sum_mux;

  import approx_adder_pkg::*;

  localparam int W = 32;

  logic [W-1:0] in_accurate, in_approx, y;
  sum_sel_e     sel;
  int checks = 0, failures = 0;

  sum_mux dut (.in_accurate(in_accurate), .in_approx(in_approx), .sel(sel), .y(y));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      in_accurate = $urandom;
      in_approx   = (i % 7 == 0) ? ~in_accurate : $urandom;
      sel         = sum_sel_e'(i[0]);
      #1;
      checks++;
      if (y !== (i[0] ? in_approx : in_accurate)) begin
        failures++;
        $display("FAIL sel=%0d acc=%h approx=%h y=%h", i[0], in_accurate, in_approx, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
