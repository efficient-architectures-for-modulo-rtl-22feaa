// booth_fold_term -- folded Booth product P_i = A_i * Q_i.
//
// In the Booth-folded squarer every cross term 2*A_i*A_k (k > i) of the
// squared operand is collected into one signed number
//   P_i = A_i * sum_{k>i} A_k 4^(k-i-1) = A_i * Q_i .
// The digits above i recode the operand bits above a_{2i+1}, so
//   Q_i = T + a_{2i+1},  T = two's complement value of a_{n-1} .. a_{2i+2}.
// A negative digit always has a_{2i+1} = 1, and then -Q_i = -(T+1) = ~T.
// Hence P_i = |A_i| * (T xor {a_{2i+1}}): a one's complement stage on T
// followed by a x1 / x2 selection, with no increment.
// Port T is L bits (L = n-2i-2), P is L+1 bits, two's complement. The range
// of A_i*Q_i never reaches +2^L, so L+1 bits always suffice.
// The one's complement trick is how this design builds P_i; the width rule
// (n-2i-1 bits) follows the architecture. Combinational.
module booth_fold_term #(
  parameter int unsigned L = 6   // width of T; n-2i-2 (6 for i = 0, n = 8)
) (
  input  logic         one,  // |A_i| == 1
  input  logic         two,  // |A_i| == 2
  input  logic         neg,  // a_{2i+1}
  input  logic [L-1:0] t,    // a_{n-1} .. a_{2i+2}
  output logic [L:0]   p     // P_i, two's complement
);
  logic [L:0] x;  // Q_i or -Q_i, sign-extended to L+1 bits

  always_comb begin
    x = {t[L-1], t} ^ {(L + 1){neg}};
    p = ({(L + 1){one}} & x) | ({(L + 1){two}} & {x[L-1:0], 1'b0});
  end
endmodule
