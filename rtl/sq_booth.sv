// sq_booth -- Booth-folded modulo 2^n-1 squarer (n even).
//
// Computes |A^2| modulo 2^n-1 for an n-bit operand. booth_ppm recodes the
// operand into n/2 radix-4 digits and builds the folded matrix (C_i squares,
// P_i cross-term sums, one merged correction word: height 5 at n = 8,
// n/4+3 for n >= 8); eac_csa_tree reduces it to two words and mod_adder adds
// them modulo 2^n-1. The operand may be any n-bit value, all ones included.
// The result is congruent to A^2; zero may come out as all ones.
// Combinational, no clock.
module sq_booth
  import modsq_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  output logic [N-1:0] sq
);
  localparam int unsigned H = booth_height(N);

  logic [N-1:0] rows [H];
  logic [N-1:0] sum, carry;
  logic         cout;

  booth_ppm    #(.N(N))            u_ppm (.a(a), .rows(rows));
  eac_csa_tree #(.N(N), .ROWS(H))  u_csa (.rows(rows), .sum(sum), .carry(carry));
  mod_adder    #(.N(N))            u_add (.x(sum), .y(carry), .r(sq), .cout(cout));
endmodule
