// tb_fp_add: random and directed checks of the single-precision adder.
//
// Operands are random normal numbers over a range of exponents (including
// near-equal magnitudes, which exercise cancellation, and far-apart ones,
// which exercise the sticky bit). The reference is the sum computed in double
// precision and rounded to single; a result must be within one unit in the
// last place (the reference rounds ties away from zero, the adder to even).
// Directed cases cover exact zero results, zero operands and overflow.
module tb_fp_add;
  import dpc_pkg::*;
  import tb_util_pkg::*;

  fp32_t a, b, y;
  logic  sub;
  int    checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .sub(sub), .y(y));

  function automatic fp32_t rnd_fp(int emin, int emax);
    return {1'($urandom_range(0, 1)), 8'($urandom_range(emin, emax)), 23'($urandom)};
  endfunction

  task automatic check(fp32_t exp_y, bit exact);
    checks++;
    if (exact ? (y !== exp_y) : (ulp_diff(y, exp_y) > 1 || (y[31] != exp_y[31] && exp_y[30:0] != 0))) begin
      failures++;
      if (failures < 10) $display("a=%h b=%h sub=%0d y=%h expected %h", a, b, sub, y, exp_y);
    end
  endtask

  initial begin
    #1;
    for (int i = 0; i < 20000; i++) begin
      a   = rnd_fp(100, 150);
      b   = (i % 4 == 0) ? {1'($urandom_range(0, 1)), a[30:23], 23'($urandom)} : rnd_fp(100, 150);
      sub = 1'($urandom_range(0, 1));
      #1;
      check(r2f(sub ? f2r(a) - f2r(b) : f2r(a) + f2r(b)), 0);
    end
    // x - x = +0
    a = 32'h4049_0fdb; b = a; sub = 1; #1; check(32'h0, 1);
    // x + 0 = x
    b = 32'h0; sub = 0; #1; check(a, 1);
    // 0 - x = -x
    a = 32'h0; b = 32'h3fc0_0000; sub = 1; #1; check(32'hbfc0_0000, 1);
    // 1 + 1 = 2
    a = 32'h3f80_0000; b = a; sub = 0; #1; check(32'h4000_0000, 1);
    // overflow to infinity
    a = 32'h7f7f_ffff; b = a; sub = 0; #1; check(32'h7f80_0000, 1);
    // 1 + 2^-24 is a tie: rounds to even (1.0)
    a = 32'h3f80_0000; b = 32'h3380_0000; sub = 0; #1; check(32'h3f80_0000, 1);
    // 1 + 3*2^-24 rounds up
    b = 32'h3440_0000; #1; check(32'h3f80_0002, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
