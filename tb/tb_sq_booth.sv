// tb_sq_booth -- end-to-end check of the booth modulo 2^n-1 squarer.
// All 256 operands at n = 8 (the default) and all 64 operands at n = 6 are
// applied; the result must equal A*A mod 2^n-1, computed here in integers,
// where a result of all ones is also accepted for a residue of zero.
module tb_sq_booth;
  int checks = 0, failures = 0;

  logic [7:0] a8, q8;
  logic [5:0] a6, q6;

  sq_booth           dut8 (.a(a8), .sq(q8));
  sq_booth #(.N(6))  dut6 (.a(a6), .sq(q6));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(int n, int a, int got);
    int m, e;
    m = (1 << n) - 1;
    e = (a * a) % m;
    checks++;
    if (!(got == e || (e == 0 && got == m))) begin
      failures++;
      $display("FAIL n=%0d a=%0d: got %0d expected %0d", n, a, got, e);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      a8 = 8'(i);
      a6 = 6'(i);
      #1;
      cmp(8, i, int'(q8));
      if (i < 64) cmp(6, i, int'(q6));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
