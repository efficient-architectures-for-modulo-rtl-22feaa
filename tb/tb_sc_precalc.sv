// tb_sc_precalc -- exhaustive check of the pre-calculated sum/carry cell:
// for all 8 input patterns, 2*c + s must equal 2*a_i*~a_j + a_i*a_k + a_j*a_k.
// The cell is combinational; each pattern is applied for 1 time unit.
module tb_sc_precalc;
  logic ai, aj, ak, c, s;
  int checks = 0, failures = 0;

  sc_precalc dut (.ai(ai), .aj(aj), .ak(ak), .c(c), .s(s));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v, got_v;
    for (int v = 0; v < 8; v++) begin
      {ai, aj, ak} = 3'(v);
      #1;
      exp_v = 2 * int'(ai & ~aj) + int'(ai & ak) + int'(aj & ak);
      got_v = 2 * int'(c) + int'(s);
      checks++;
      if (exp_v != got_v) begin
        failures++;
        $display("FAIL ai=%b aj=%b ak=%b: 2c+s=%0d expected %0d", ai, aj, ak, got_v, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
