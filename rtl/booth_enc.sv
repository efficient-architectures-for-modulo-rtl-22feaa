// booth_enc -- radix-4 (modified Booth) digit encoder for modulo 2^n-1.
//
// Encodes the 3-bit group {a_{2i+1}, a_{2i}, a_{2i-1}} into the digit
//   A_i = -2*a_{2i+1} + a_{2i} + a_{2i-1}  in {-2,-1,0,+1,+2}
// as a one-hot magnitude (one: |A_i| = 1, two: |A_i| = 2) and a sign bit.
// For digit 0 the low bit of the group is a_{n-1} instead of a_{-1}; this
// end-around wiring is what makes the recoding exact modulo 2^n-1 and is
// done by the instantiating module.
// The sign output is a_{2i+1} itself, also for the group 111 (digit zero):
// the folded-product generator relies on that (see booth_fold_term).
// |A_i|^2 = C_i in {0,1,4}, so one and two are also the two non-zero bits
// of the squared digit (bits 0 and 2). Combinational.
module booth_enc (
  input  logic [2:0] grp,  // {a_{2i+1}, a_{2i}, a_{2i-1}}
  output logic       one,  // |A_i| == 1
  output logic       two,  // |A_i| == 2
  output logic       neg   // a_{2i+1}: digit is negative or a negative zero
);
  always_comb begin
    one = grp[1] ^ grp[0];
    two = (grp[2] & ~grp[1] & ~grp[0]) | (~grp[2] & grp[1] & grp[0]);
    neg = grp[2];
  end
endmodule
