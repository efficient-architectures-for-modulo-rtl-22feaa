// tb_mod_adder -- exhaustive check of the modulo 2^8-1 adder over all
// 65536 operand pairs, plus random pairs at n = 5 and n = 32.
// Expected value: x + y if below 2^n, else x + y - 2^n + 1 (one's
// complement addition with end-around carry); cout must be the carry out
// of x + y.
module tb_mod_adder;
  int checks = 0, failures = 0;

  logic [7:0]  x8, y8, r8;
  logic        c8;
  logic [4:0]  x5, y5, r5;
  logic        c5;
  logic [31:0] x32, y32, r32;
  logic        c32;

  mod_adder                dut8  (.x(x8),  .y(y8),  .r(r8),  .cout(c8));
  mod_adder #(.N(5))       dut5  (.x(x5),  .y(y5),  .r(r5),  .cout(c5));
  mod_adder #(.N(32))      dut32 (.x(x32), .y(y32), .r(r32), .cout(c32));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned ref_add(longint unsigned x, longint unsigned y, int n);
    longint unsigned t;
    t = x + y;
    return (t >= (64'd1 << n)) ? t - (64'd1 << n) + 1 : t;
  endfunction

  initial begin
    int eac_seen = 0;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        x8 = 8'(i); y8 = 8'(j);
        x5 = 5'($urandom); y5 = 5'($urandom);
        x32 = $urandom; y32 = $urandom;
        #1;
        checks += 3;
        if (longint'(r8) != ref_add(x8, y8, 8) || c8 != (i + j >= 256)) begin
          failures++;
          $display("FAIL n=8 %0d+%0d: r=%0d cout=%b", x8, y8, r8, c8);
        end
        if (longint'(r5) != ref_add(x5, y5, 5)) begin
          failures++;
          $display("FAIL n=5 %0d+%0d: r=%0d", x5, y5, r5);
        end
        if (longint'(r32) != ref_add(x32, y32, 32)) begin
          failures++;
          $display("FAIL n=32 %0d+%0d: r=%0d", x32, y32, r32);
        end
        if (c8) eac_seen++;
      end
    end
    $display("end-around carries exercised: %0d", eac_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
