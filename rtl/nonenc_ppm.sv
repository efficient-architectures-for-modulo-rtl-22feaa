// nonenc_ppm -- reduced partial-product matrix of the non-encoded modulo
// 2^n-1 squarer.
//
// Starting point is the folded square A^2 = sum a_i 4^i + sum_{i<j} a_i a_j
// 2^(i+j+1); every weight 2^w is moved to column w mod n. Two rewrites then
// shrink the matrix:
//   1. a_i (column 2i) and a_i a_{i-1} (also column 2i) become
//      a_i*~a_{i-1} in column 2i and a_i a_{i-1} in column 2i+1.
//   2. For each i, a_i*~a_{i-1} (column 2i) with a_{i-1}a_{i-2} and
//      a_i a_{i-2} (column 2i-1) become c_{i,i-1,i-2} and s_{i,i-1,i-2}
//      (sc_precalc). A c bit that would land in column n wraps to column 0.
// After that only the products a_i a_j whose index distance is 3 .. n-3
// remain plain. At n = 8 this gives 28 bits with a maximum column height of
// 4 (36 bits, height 6 before the rewrites); n = 4 keeps two triplets only.
// The rewrites are the architecture's; placing each column's bits into rows
// top-down in a fixed walk order (the same walk modsq_pkg counts) is this
// design's own choice.
// Interface: rows[0..H-1], H = modsq_pkg::nonenc_height(N); the sum of the
// rows is A^2 modulo 2^N-1. Requires N >= 4. Combinational.
module nonenc_ppm
  import modsq_pkg::*;
#(
  parameter int unsigned N = 8,
  localparam int unsigned H = nonenc_height(N)
) (
  input  logic [N-1:0] a,
  output logic [N-1:0] rows [H]
);
  if (N < 4) begin : g_bad_n
    $error("nonenc_ppm needs N >= 4");
  end

  logic [N-1:0] c_bit;  // c_{i,i-1,i-2}, index i
  logic [N-1:0] s_bit;  // s_{i,i-1,i-2}, index i

  for (genvar i = 0; i < N; i++) begin : g_sc
    if (nonenc_has_triplet(N, i)) begin : g_cell
      sc_precalc u_sc (
        .ai(a[i]),
        .aj(a[(i+N-1)%N]),
        .ak(a[(i+N-2)%N]),
        .c (c_bit[i]),
        .s (s_bit[i])
      );
    end else begin : g_none
      assign c_bit[i] = 1'b0;
      assign s_bit[i] = 1'b0;
    end
  end

  always_comb begin
    int cnt [N];
    int col;
    for (int r = 0; r < H; r++) rows[r] = '0;
    for (int k = 0; k < N; k++) cnt[k] = 0;
    // pre-calculated pairs
    for (int i = 0; i < N; i++) begin
      if (nonenc_has_triplet(N, i)) begin
        col = (2 * i) % N;
        rows[cnt[col]][col] = c_bit[i];
        cnt[col]++;
        col = (2 * i - 1 + N) % N;
        rows[cnt[col]][col] = s_bit[i];
        cnt[col]++;
      end
    end
    // recoded bits not absorbed by a triplet (n = 4 only)
    for (int i = 0; i < N; i++) begin
      if (!nonenc_has_triplet(N, i)) begin
        col = (2 * i) % N;
        rows[cnt[col]][col] = a[i] & ~a[(i+N-1)%N];
        cnt[col]++;
      end
      if (!nonenc_has_triplet(N, (i + 1) % N)) begin
        col = (2 * i + 1) % N;
        rows[cnt[col]][col] = a[i] & a[(i+N-1)%N];
        cnt[col]++;
      end
    end
    // remaining folded products a_i a_j at weight 2^(i+j+1)
    for (int i = 0; i < N; i++) begin
      for (int j = i + 1; j < N; j++) begin
        if (nonenc_keep_product(N, i, j)) begin
          col = (i + j + 1) % N;
          rows[cnt[col]][col] = a[i] & a[j];
          cnt[col]++;
        end
      end
    end
  end
endmodule
