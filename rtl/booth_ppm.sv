// booth_ppm -- Booth-folded partial-product matrix of the modulo 2^n-1
// squarer (n even).
//
// The operand is recoded into m = n/2 radix-4 digits A_i (booth_enc), with
// a_{n-1} standing in for a_{-1} so that the recoding is exact modulo
// 2^n-1. The square is then folded as
//   A^2 = sum_i C_i 2^(4i) + sum_{i<m-1} P_i 2^(4i+3),
//   C_i = A_i^2 in {0,1,4},   P_i = A_i * sum_{k>i} A_k 4^(k-i-1),
// with P_i an (n-2i-1)-bit two's complement number (booth_fold_term).
// Every bit is moved to column (weight mod n). The sign bit of each P_i is
// not moved; instead a single correction word, all ones except ~sign(P_i)
// in column 2i+1, is added once. At n = 8 this is 28 bits, 5 of them the
// constant 1, with maximum column height 5.
// The matrix follows the architecture; the order in which bits are placed
// into rows (the walk modsq_pkg counts) is this design's own choice.
// Interface: rows[0..H-1], H = modsq_pkg::booth_height(N); the sum of the
// rows is A^2 modulo 2^N-1. Requires even N >= 4. Combinational.
module booth_ppm
  import modsq_pkg::*;
#(
  parameter int unsigned N = 8,
  localparam int unsigned H = booth_height(N)
) (
  input  logic [N-1:0] a,
  output logic [N-1:0] rows [H]
);
  localparam int unsigned M = N / 2;

  if (N < 4 || (N % 2) != 0) begin : g_bad_n
    $error("booth_ppm needs an even N >= 4");
  end

  logic [M-1:0]   one, two, neg;
  logic [N-1:0]   pb [M];  // P_i, zero-extended; bit n-2i-2 is its sign

  for (genvar i = 0; i < M; i++) begin : g_dig
    if (i == 0) begin : g_wrap
      booth_enc u_enc (.grp({a[1], a[0], a[N-1]}), .one(one[0]), .two(two[0]), .neg(neg[0]));
    end else begin : g_mid
      booth_enc u_enc (.grp(a[2*i+1:2*i-1]), .one(one[i]), .two(two[i]), .neg(neg[i]));
    end
  end

  for (genvar i = 0; i < M; i++) begin : g_fold
    if (i < M - 1) begin : g_term
      localparam int unsigned L = N - 2 * i - 2;
      logic [L:0] p;
      booth_fold_term #(.L(L)) u_term (
        .one(one[i]), .two(two[i]), .neg(neg[i]), .t(a[N-1:2*i+2]), .p(p)
      );
      assign pb[i] = N'(p);
    end else begin : g_last
      assign pb[i] = '0;
    end
  end

  always_comb begin
    int cnt [N];
    int col;
    logic [N-1:0] corr;
    for (int r = 0; r < H; r++) rows[r] = '0;
    for (int k = 0; k < N; k++) cnt[k] = 0;
    // C_i = A_i^2: bit 0 at weight 4i, bit 2 at weight 4i+2
    for (int i = 0; i < M; i++) begin
      col = (4 * i) % N;
      rows[cnt[col]][col] = one[i];
      cnt[col]++;
      col = (4 * i + 2) % N;
      rows[cnt[col]][col] = two[i];
      cnt[col]++;
    end
    // non-sign bits of P_i from weight 4i+3 upward
    for (int i = 0; i < M - 1; i++) begin
      for (int j = 0; j < N - 2 * i - 2; j++) begin
        col = (4 * i + 3 + j) % N;
        rows[cnt[col]][col] = pb[i][j];
        cnt[col]++;
      end
    end
    // merged sign correction: ones, with ~sign(P_i) in column 2i+1
    corr = '1;
    for (int i = 0; i < M - 1; i++) corr[2*i+1] = ~pb[i][N-2*i-2];
    for (int k = 0; k < N; k++) begin
      rows[cnt[k]][k] = corr[k];
      cnt[k]++;
    end
  end
endmodule
