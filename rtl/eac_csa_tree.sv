// eac_csa_tree -- end-around-carry carry-save reduction of a partial-product
// matrix modulo 2^n-1 down to two n-bit summands.
//
// The matrix arrives as ROWS n-bit words (empty matrix positions are zero).
// Each level groups the words in threes and replaces every group by a sum
// and a rotated carry word (csa_eac); words left over pass to the next level.
// The number of levels is fixed at elaboration by modsq_pkg::csa_levels, so
// a matrix of height 2 passes straight through and height 4 takes two levels.
// Rows that hold constants or zeros are simplified by synthesis, which turns
// the affected full adders into half adders or wires.
// End-around-carry carry-save reduction is the architecture's; the row-wise
// Wallace grouping is this design's own choice.
// Interface: sum + carry == sum of all rows (mod 2^n-1). Combinational.
module eac_csa_tree
  import modsq_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter int unsigned ROWS = 4
) (
  input  logic [N-1:0] rows [ROWS],
  output logic [N-1:0] sum,
  output logic [N-1:0] carry
);
  localparam int LEVELS = csa_levels(ROWS);

  // Level l reads the rows left by level l-1 (the inputs for l = 0) and
  // writes its own array, so no array is both read and written by one level.
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int R  = csa_rows_at(ROWS, l);
    localparam int G  = R / 3;
    localparam int RN = csa_next(R);
    logic [N-1:0] src [R];
    logic [N-1:0] dst [RN];
    for (genvar r = 0; r < R; r++) begin : g_src
      if (l == 0) begin : g_first
        assign src[r] = rows[r];
      end else begin : g_next
        assign src[r] = g_lvl[l-1].dst[r];
      end
    end
    for (genvar g = 0; g < G; g++) begin : g_csa
      csa_eac #(.N(N)) u_csa (
        .x(src[3*g]),
        .y(src[3*g+1]),
        .z(src[3*g+2]),
        .s(dst[2*g]),
        .c(dst[2*g+1])
      );
    end
    for (genvar r = 3 * G; r < R; r++) begin : g_pass
      assign dst[2*G+r-3*G] = src[r];
    end
  end

  if (LEVELS == 0) begin : g_direct
    assign sum   = rows[0];
    assign carry = (ROWS >= 2) ? rows[ROWS-1] : '0;
  end else begin : g_out
    assign sum   = g_lvl[LEVELS-1].dst[0];
    assign carry = g_lvl[LEVELS-1].dst[1];
  end
endmodule
