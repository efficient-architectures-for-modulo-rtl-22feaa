// mod_sq_top -- the two modulo 2^n-1 squarer architectures side by side.
//
// One n-bit operand drives both squarers: sq_nonenc (no operand encoding,
// pre-calculated partial-product pairs; the smaller and faster choice for
// small n) and sq_booth (radix-4 Booth digits with folding; the better
// choice for medium and large n). Both outputs are congruent to A^2 modulo
// 2^n-1 and agree except that either may show zero as all ones.
// N must be even (the Booth squarer needs it); default 8.
// Purely combinational: outputs follow the input after the logic delay.
module mod_sq_top #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  output logic [N-1:0] sq_nonenc,
  output logic [N-1:0] sq_booth
);
  sq_nonenc #(.N(N)) u_nonenc (.a(a), .sq(sq_nonenc));
  sq_booth  #(.N(N)) u_booth  (.a(a), .sq(sq_booth));
endmodule
