// csa_eac -- one row of end-around-carry carry-save adders modulo 2^n-1.
//
// Adds three n-bit words with n full adders. The carry out of column n-1
// has weight 2^n = 1 (mod 2^n-1), so the carry word is rotated left by one
// instead of being shifted: s + c == x + y + z (mod 2^n-1).
// Constant-zero inputs reduce the full adders to half adders after
// synthesis. Combinational.
module csa_eac #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] z,
  output logic [N-1:0] s,  // sum word
  output logic [N-1:0] c   // carry word, already moved to its weight
);
  logic [N-1:0] maj;

  always_comb begin
    s   = x ^ y ^ z;
    maj = (x & y) | (x & z) | (y & z);
    c   = {maj[N-2:0], maj[N-1]};
  end
endmodule
