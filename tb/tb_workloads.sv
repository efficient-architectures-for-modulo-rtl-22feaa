// tb_workloads -- both squarers at every operand width of the published
// comparison: n = 4, 8, 16, 32 (area/delay study) and n = 64, 128 (bit-count
// and height study).
// n = 4 and n = 8 are tested exhaustively, n = 16 exhaustively as well
// (65536 operands); n = 32, 64 and 128 with random operands plus the corner
// operands 0, 1, 2^n-2 and 2^n-1. The expected residue comes from a
// shift-and-add modular multiplication done in the testbench; a result of
// all ones is also accepted for a residue of zero. The two squarers must
// agree as residues.
module tb_workloads;
  int checks = 0, failures = 0;

  logic [3:0]   a4,   ne4,   be4;
  logic [7:0]   a8,   ne8,   be8;
  logic [15:0]  a16,  ne16,  be16;
  logic [31:0]  a32,  ne32,  be32;
  logic [63:0]  a64,  ne64,  be64;
  logic [127:0] a128, ne128, be128;

  sq_nonenc #(.N(4))   n4   (.a(a4),   .sq(ne4));
  sq_booth  #(.N(4))   b4   (.a(a4),   .sq(be4));
  sq_nonenc #(.N(8))   n8   (.a(a8),   .sq(ne8));
  sq_booth  #(.N(8))   b8   (.a(a8),   .sq(be8));
  sq_nonenc #(.N(16))  n16  (.a(a16),  .sq(ne16));
  sq_booth  #(.N(16))  b16  (.a(a16),  .sq(be16));
  sq_nonenc #(.N(32))  n32  (.a(a32),  .sq(ne32));
  sq_booth  #(.N(32))  b32  (.a(a32),  .sq(be32));
  sq_nonenc #(.N(64))  n64  (.a(a64),  .sq(ne64));
  sq_booth  #(.N(64))  b64  (.a(a64),  .sq(be64));
  sq_nonenc #(.N(128)) n128 (.a(a128), .sq(ne128));
  sq_booth  #(.N(128)) b128 (.a(a128), .sq(be128));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // x*x mod 2^n-1 by shift-and-add, n <= 128
  function automatic logic [128:0] ref_sq(logic [127:0] x, int n);
    logic [128:0] m, r, xr;
    m  = (129'(1) << n) - 1;
    xr = 129'(x) % m;
    r  = '0;
    for (int i = n - 1; i >= 0; i--) begin
      r = r << 1;
      if (r >= m) r = r - m;
      if (xr[i]) begin
        r = r + xr;
        if (r >= m) r = r - m;
      end
    end
    return r;
  endfunction

  task automatic cmp(int n, logic [127:0] x, logic [127:0] q_ne, logic [127:0] q_be);
    logic [128:0] e, m;
    m = (129'(1) << n) - 1;
    e = ref_sq(x, n);
    checks++;
    if (!(129'(q_ne) == e || (e == 0 && 129'(q_ne) == m))) begin
      failures++;
      $display("FAIL non-encoded n=%0d a=%h: got %h expected %h", n, x, q_ne, e);
    end
    checks++;
    if (!(129'(q_be) == e || (e == 0 && 129'(q_be) == m))) begin
      failures++;
      $display("FAIL Booth n=%0d a=%h: got %h expected %h", n, x, q_be, e);
    end
  endtask

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    logic [127:0] v;
    for (int i = 0; i < 65536; i++) begin
      a4 = 4'(i);
      a8 = 8'(i);
      a16 = 16'(i);
      case (i)
        0: v = '0;
        1: v = 128'd1;
        2: v = '1;
        3: v = ~128'd1;
        default: v = rnd128();
      endcase
      a32 = (i < 4) ? 32'(v) : v[31:0];
      if (i == 3) a32 = ~32'd1;
      a64 = (i == 3) ? ~64'd1 : v[63:0];
      a128 = v;
      #1;
      if (i < 16) cmp(4, 128'(a4), 128'(ne4), 128'(be4));
      if (i < 256) cmp(8, 128'(a8), 128'(ne8), 128'(be8));
      cmp(16, 128'(a16), 128'(ne16), 128'(be16));
      if (i < 20000) cmp(32, 128'(a32), 128'(ne32), 128'(be32));
      if (i < 5000) cmp(64, 128'(a64), 128'(ne64), 128'(be64));
      if (i < 2000) cmp(128, a128, ne128, be128);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
