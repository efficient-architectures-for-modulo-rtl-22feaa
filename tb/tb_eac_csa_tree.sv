// tb_eac_csa_tree -- checks the end-around-carry carry-save tree.
// Random row sets are reduced by a 4-row tree (n = 8, two levels), a 7-row
// tree (n = 8, four levels) and a 2-row tree (pass-through); the sum of the
// two outputs must be congruent to the sum of the rows modulo 2^8-1.
// Also checks that all-ones rows (zero modulo 2^8-1) are handled.
module tb_eac_csa_tree;
  localparam int N = 8;
  localparam int M = (1 << N) - 1;
  int checks = 0, failures = 0;

  logic [N-1:0] r4 [4];
  logic [N-1:0] r7 [7];
  logic [N-1:0] r2 [2];
  logic [N-1:0] s4, c4, s7, c7, s2, c2;

  eac_csa_tree                        dut4 (.rows(r4), .sum(s4), .carry(c4));
  eac_csa_tree #(.N(N), .ROWS(7))     dut7 (.rows(r7), .sum(s7), .carry(c7));
  eac_csa_tree #(.N(N), .ROWS(2))     dut2 (.rows(r2), .sum(s2), .carry(c2));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(string tag, int exp_sum, logic [N-1:0] s, logic [N-1:0] c);
    checks++;
    if ((int'(s) + int'(c)) % M != exp_sum % M) begin
      failures++;
      $display("FAIL %s: sum=%0d carry=%0d expected residue %0d", tag, s, c, exp_sum % M);
    end
  endtask

  initial begin
    int e4, e7, e2;
    for (int it = 0; it < 3000; it++) begin
      e4 = 0; e7 = 0; e2 = 0;
      for (int r = 0; r < 7; r++) begin
        r7[r] = (it < 2) ? '1 : N'($urandom);
        e7 += int'(r7[r]);
      end
      for (int r = 0; r < 4; r++) begin
        r4[r] = (it < 2) ? '1 : N'($urandom);
        e4 += int'(r4[r]);
      end
      for (int r = 0; r < 2; r++) begin
        r2[r] = N'($urandom);
        e2 += int'(r2[r]);
      end
      #1;
      cmp("rows=4", e4, s4, c4);
      cmp("rows=7", e7, s7, c7);
      cmp("rows=2", e2, s2, c2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
