// sc_precalc -- pre-calculated sum/carry pair for the non-encoded squarer.
//
// Replaces three partial-product bits that sit in two adjacent columns,
//   a_i*~a_j at weight 2^(l+1)  plus  a_i*a_k and a_j*a_k at weight 2^l,
// by two bits with the same total value:
//   c = a_i & (~a_j | a_k)   at weight 2^(l+1)
//   s = (a_i ^ a_j) & a_k    at weight 2^l
// i.e. 2*a_i*~a_j + a_i*a_k + a_j*a_k = 2*c + s for every input.
// In the squarer j = i-1 and k = i-2 (indices modulo n). The two equations
// follow the architecture; the cell is purely combinational, no clock.
module sc_precalc (
  input  logic ai,   // a_i
  input  logic aj,   // a_j, j = i-1
  input  logic ak,   // a_k, k = i-2
  output logic c,    // carry-side bit, one column above s
  output logic s     // sum-side bit
);
  assign c = ai & (~aj | ak);
  assign s = (ai ^ aj) & ak;
endmodule
