// tb_mod_sq_top -- full-size end-to-end test of both squarers (n = 8,
// default parameters). Every 8-bit operand is applied; both outputs must be
// congruent to A*A modulo 255 (all ones accepted for zero) and must agree
// with each other as residues.
// It also counts how often each mechanism of the two architectures is
// exercised, through hierarchical references, and fails if any never is:
//   - pre-calculated pair cells giving c = 1 and s = 1,
//   - every Booth digit value -2 .. +2,
//   - a negative folded term P_i (its sign correction is active),
//   - end-around carries in the carry-save trees and in both final adders.
module tb_mod_sq_top;
  localparam int N = 8;
  localparam int M = (1 << N) - 1;
  int checks = 0, failures = 0;

  logic [N-1:0] a, q_ne, q_be;

  mod_sq_top dut (.a(a), .sq_nonenc(q_ne), .sq_booth(q_be));

  int n_c1, n_s1, n_neg_p, n_eac_ne, n_eac_be, n_csa_eac_ne, n_csa_eac_be, n_zero_ones;
  int n_digit [5];

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(string what, int cnt);
    checks++;
    $display("mechanism %-34s seen %0d times", what, cnt);
    if (cnt == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    int e, d;
    logic [N/2-1:0] one, two, neg;
    n_c1 = 0; n_s1 = 0; n_neg_p = 0; n_eac_ne = 0; n_eac_be = 0;
    n_csa_eac_ne = 0; n_csa_eac_be = 0; n_zero_ones = 0;
    for (int k = 0; k < 5; k++) n_digit[k] = 0;
    for (int i = 0; i <= M; i++) begin
      a = N'(i);
      #1;
      e = (i * i) % M;
      checks += 3;
      if (!(int'(q_ne) == e || (e == 0 && int'(q_ne) == M))) begin
        failures++;
        $display("FAIL non-encoded a=%0d: got %0d expected %0d", i, q_ne, e);
      end
      if (!(int'(q_be) == e || (e == 0 && int'(q_be) == M))) begin
        failures++;
        $display("FAIL Booth a=%0d: got %0d expected %0d", i, q_be, e);
      end
      if (int'(q_ne) % M != int'(q_be) % M) begin
        failures++;
        $display("FAIL a=%0d: outputs disagree %0d / %0d", i, q_ne, q_be);
      end
      if (q_ne == N'(M) || q_be == N'(M)) n_zero_ones++;
      // mechanism counters
      n_c1 += $countones(dut.u_nonenc.u_ppm.c_bit);
      n_s1 += $countones(dut.u_nonenc.u_ppm.s_bit);
      one = dut.u_booth.u_ppm.one;
      two = dut.u_booth.u_ppm.two;
      neg = dut.u_booth.u_ppm.neg;
      for (int k = 0; k < N / 2; k++) begin
        d = two[k] ? 2 : (one[k] ? 1 : 0);
        if (neg[k]) d = -d;
        n_digit[d + 2]++;
      end
      for (int k = 0; k < N / 2 - 1; k++)
        if (dut.u_booth.u_ppm.pb[k][N-2*k-2]) n_neg_p++;
      if (dut.u_nonenc.u_add.cout) n_eac_ne++;
      if (dut.u_booth.u_add.cout) n_eac_be++;
      if (dut.u_nonenc.u_csa.g_lvl[0].g_csa[0].u_csa.c[0]) n_csa_eac_ne++;
      if (dut.u_booth.u_csa.g_lvl[0].g_csa[0].u_csa.c[0]) n_csa_eac_be++;
    end
    need("pre-calculated c = 1", n_c1);
    need("pre-calculated s = 1", n_s1);
    need("Booth digit -2", n_digit[0]);
    need("Booth digit -1", n_digit[1]);
    need("Booth digit 0", n_digit[2]);
    need("Booth digit +1", n_digit[3]);
    need("Booth digit +2", n_digit[4]);
    need("negative P_i (sign correction)", n_neg_p);
    need("CSA end-around carry, non-encoded", n_csa_eac_ne);
    need("CSA end-around carry, Booth", n_csa_eac_be);
    need("final adder end-around carry, non-enc", n_eac_ne);
    need("final adder end-around carry, Booth", n_eac_be);
    $display("zero shown as all ones: %0d operands", n_zero_ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
