// Self-checking test of fxp_mul, the 27-bit fixed-point multiplier.
// Products of random and corner-case operands are compared with a reference
// computed in 64-bit integers: floor(a*b / 2^20), clamped to the 27-bit range.
module tb_fxp_mul;
  import tire_nn_pkg::*;

  fx_t a, b, p;
  int  checks = 0, failures = 0;

  fxp_mul dut (.a, .b, .p);

  function automatic longint ref_mul(longint x, longint y);
    longint r;
    r = (x * y) >>> 20;
    if (r >  (2**26 - 1)) r =  2**26 - 1;
    if (r < -(2**26))     r = -(2**26);
    return r;
  endfunction

  task automatic check(longint x, longint y);
    a = fx_t'(x);
    b = fx_t'(y);
    #1;
    checks++;
    if (longint'(p) != ref_mul(longint'(a), longint'(b))) begin
      failures++;
      $display("FAIL %0d * %0d: got %0d expected %0d", a, b, p, ref_mul(longint'(a), longint'(b)));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(1 << 20, 1 << 20);           // 1.0 * 1.0
    check(3 << 19, -(5 << 18));        // 1.5 * -1.25
    check(-(1 << 20), -(7 << 20));     // -1 * -7
    check(2**26 - 1, 2**26 - 1);       // saturates high
    check(-(2**26), 2**26 - 1);        // saturates low
    check(-1, 1);                      // -2^-20 * 2^-20 rounds to -1 LSB
    check(0, -(2**26));
    repeat (2000) begin
      longint x, y;
      x = longint'($signed(27'($urandom)));
      y = longint'($signed(27'($urandom))) >>> ($urandom % 27);
      check(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
