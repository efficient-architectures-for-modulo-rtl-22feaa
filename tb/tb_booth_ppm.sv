// tb_booth_ppm -- checks the Booth-folded matrix.
// For every 8-bit operand (and every operand of a second, smaller instance)
// the rows are summed in the testbench as plain integers; the total must be
// congruent to A*A modulo 2^n-1. The elaboration-time bit count and maximum
// column height are compared with the published figures for
// n = 4, 8, 16, 32, 64 and 128, and the row count of the n = 8 instance
// with its height.
module tb_booth_ppm;
  import modsq_pkg::*;
  localparam int N = 8;
  int checks = 0, failures = 0;

  logic [N-1:0] a;
  logic [N-1:0] rows [booth_height(N)];
  logic [5:0] a6;  logic [5:0] r6 [booth_height(6)];
  booth_ppm #(.N(6)) dut6 (.a(a6), .rows(r6));

  booth_ppm dut (.a(a), .rows(rows));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  initial begin
    int ns [6] = '{4, 8, 16, 32, 64, 128};
    int tb_bits [6] = '{10, 28, 88, 304, 1120, 4288};
    int tb_h [6] = '{4, 5, 7, 11, 19, 35};
    longint s;
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (booth_bits(ns[k]) != tb_bits[k] || booth_height(ns[k]) != tb_h[k]) begin
        failures++;
        $display("FAIL n=%0d: bits=%0d height=%0d, expected %0d / %0d",
                 ns[k], booth_bits(ns[k]), booth_height(ns[k]), tb_bits[k], tb_h[k]);
      end
    end
    checks++;
    if ($size(rows) != tb_h[1]) begin
      failures++;
      $display("FAIL n=8 row count %0d", $size(rows));
    end
    for (int i = 0; i < 256; i++) begin
      a = N'(i);
      #1;
      s = 0;
      for (int r = 0; r < $size(rows); r++) s += longint'(rows[r]);
      checks++;
      if (s % 255 != longint'((i * i) % 255)) begin
        failures++;
        $display("FAIL n=8 a=%0d: matrix sum %0d, residue %0d expected %0d", i, s, s % 255, (i * i) % 255);
      end
        if (i < 64) begin
          a6 = 6'(i);
          #1;
          s = 0;
          for (int r = 0; r < booth_height(6); r++) s += longint'(r6[r]);
          checks++;
          if (s % 63 != (i * i) % 63) begin
            failures++;
            $display("FAIL n=6 a=%0d", i);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
