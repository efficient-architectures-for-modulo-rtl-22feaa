// tb_booth_enc -- exhaustive check of the radix-4 Booth digit encoder.
// For each 3-bit group the digit -2*b2 + b1 + b0 is formed in the testbench;
// one/two must flag its magnitude and neg must equal b2.
module tb_booth_enc;
  logic [2:0] grp;
  logic one, two, neg;
  int checks = 0, failures = 0;

  booth_enc dut (.grp(grp), .one(one), .two(two), .neg(neg));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, mag;
    for (int v = 0; v < 8; v++) begin
      grp = 3'(v);
      #1;
      d = -2 * int'(grp[2]) + int'(grp[1]) + int'(grp[0]);
      mag = (d < 0) ? -d : d;
      checks++;
      if (one !== (mag == 1) || two !== (mag == 2) || neg !== grp[2]) begin
        failures++;
        $display("FAIL grp=%b digit=%0d: one=%b two=%b neg=%b", grp, d, one, two, neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
