// sq_nonenc -- non-encoded modulo 2^n-1 squarer.
//
// Computes |A^2| modulo 2^n-1 for an n-bit operand in three combinational
// stages, as the architecture lays out:
//   (a) nonenc_ppm: the reduced partial-product matrix, including the n
//       pre-calculated s/c cells (height 4 at n = 8, n/2 for n >= 8),
//   (b) eac_csa_tree: end-around-carry carry-save reduction to two words,
//   (c) mod_adder: one's complement (modulo 2^n-1) addition of the two.
// Any n >= 4 works; the operand may be any n-bit value, all ones included
// (it is congruent to 0). The result is congruent to A^2; zero may come
// out as all ones. No clock: the delay is that of the three stages.
module sq_nonenc
  import modsq_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  output logic [N-1:0] sq
);
  localparam int unsigned H = nonenc_height(N);

  logic [N-1:0] rows [H];
  logic [N-1:0] sum, carry;
  logic         cout;

  nonenc_ppm   #(.N(N))            u_ppm (.a(a), .rows(rows));
  eac_csa_tree #(.N(N), .ROWS(H))  u_csa (.rows(rows), .sum(sum), .carry(carry));
  mod_adder    #(.N(N))            u_add (.x(sum), .y(carry), .r(sq), .cout(cout));
endmodule
