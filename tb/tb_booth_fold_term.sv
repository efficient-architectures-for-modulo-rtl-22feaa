// tb_booth_fold_term -- exhaustive check of the folded Booth product P_i.
// Every Booth group {b2,b1,b0} (digit A = -2*b2 + b1 + b0) is combined with
// every L-bit upper field T; the testbench forms Q = signed(T) + b2 and
// compares the module output, read as an (L+1)-bit two's complement
// number, with A*Q computed in integers. Also run at L = 2 (P_2 at n = 8).
module tb_booth_fold_term;
  int checks = 0, failures = 0;

  logic       one, two, neg;
  logic [5:0] t6;
  logic [6:0] p6;
  logic [1:0] t2;
  logic [2:0] p2;

  booth_fold_term             dut6 (.one(one), .two(two), .neg(neg), .t(t6), .p(p6));
  booth_fold_term #(.L(2))    dut2 (.one(one), .two(two), .neg(neg), .t(t2), .p(p2));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int l, int g, int tv, int got);
    int d, q, e;
    d = -2 * ((g >> 2) & 1) + ((g >> 1) & 1) + (g & 1);
    q = ((tv >= (1 << (l - 1))) ? tv - (1 << l) : tv) + ((g >> 2) & 1);
    e = d * q;
    checks++;
    if (e != got) begin
      failures++;
      $display("FAIL L=%0d grp=%03b T=%0d: P=%0d expected %0d", l, g[2:0], tv, got, e);
    end
  endtask

  initial begin
    for (int g = 0; g < 8; g++) begin
      // encoder outputs for the group, derived independently here
      int d;
      d = -2 * ((g >> 2) & 1) + ((g >> 1) & 1) + (g & 1);
      one = (d == 1) || (d == -1);
      two = (d == 2) || (d == -2);
      neg = g[2];
      for (int tv = 0; tv < 64; tv++) begin
        t6 = 6'(tv);
        t2 = 2'(tv);
        #1;
        check(6, g, tv, int'($signed(p6)));
        if (tv < 4) check(2, g, tv, int'($signed(p2)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
