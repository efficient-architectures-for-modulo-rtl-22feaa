// mod_adder -- parallel-prefix modulo 2^n-1 adder (one's complement adder).
//
// Computes x + y modulo 2^n-1 by feeding the carry out of the top bit back
// in as the carry into bit 0. A Kogge-Stone prefix network forms the group
// generate/propagate signals G[i:0], P[i:0]; the end-around carry is
// cout = G[n-1:0], and the carry into bit i is G[i-1:0] | P[i-1:0] & cout.
// This costs one extra AND-OR level after the prefix tree. The squarers only
// require a modulo 2^n-1 adder here; the Kogge-Stone form with a separate
// end-around level is this design's own choice.
// Result convention: r = x + y when that is below 2^n, otherwise
// x + y - 2^n + 1. Zero therefore appears as all ones when x + y = 2^n-1
// (the usual double representation of zero of one's complement adders).
// Combinational.
module mod_adder #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] r,
  output logic         cout  // end-around carry (observation only)
);
  localparam int LV = $clog2(N);

  logic [N-1:0] g [LV+1];
  logic [N-1:0] p [LV+1];
  logic [N-1:0] cin;

  assign g[0] = x & y;
  assign p[0] = x ^ y;

  for (genvar l = 0; l < LV; l++) begin : g_lvl
    for (genvar i = 0; i < N; i++) begin : g_bit
      if (i >= (1 << l)) begin : g_op
        assign g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-(1<<l)]);
        assign p[l+1][i] = p[l][i] & p[l][i-(1<<l)];
      end else begin : g_buf
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  assign cout = g[LV][N-1];
  assign cin  = {g[LV][N-2:0] | (p[LV][N-2:0] & {(N-1){cout}}), cout};
  assign r    = p[0] ^ cin;
endmodule
