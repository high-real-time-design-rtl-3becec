// tb_fp_mul: random and directed checks of the single-precision multiplier.
//
// Random normal operands are multiplied; the reference is the exact product
// (representable in double precision) rounded to single, and results must be
// within one unit in the last place. Directed cases: multiplication by zero,
// by one, a rounding tie, overflow to infinity and underflow to zero.
module tb_fp_mul;
  import dpc_pkg::*;
  import tb_util_pkg::*;

  fp32_t a, b, y;
  int    checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .y(y));

  function automatic fp32_t rnd_fp(int emin, int emax);
    return {1'($urandom_range(0, 1)), 8'($urandom_range(emin, emax)), 23'($urandom)};
  endfunction

  task automatic check(fp32_t exp_y, bit exact);
    checks++;
    if (exact ? (y !== exp_y) : (ulp_diff(y, exp_y) > 1 || y[31] != exp_y[31])) begin
      failures++;
      if (failures < 10) $display("a=%h b=%h y=%h expected %h", a, b, y, exp_y);
    end
  endtask

  initial begin
    #1;
    for (int i = 0; i < 20000; i++) begin
      a = rnd_fp(90, 160);
      b = rnd_fp(90, 160);
      #1;
      check(r2f(f2r(a) * f2r(b)), 0);
    end
    a = 32'h4049_0fdb; b = 32'h0;         #1; check(32'h0, 1);
    a = 32'hc049_0fdb; b = 32'h3f80_0000; #1; check(32'hc049_0fdb, 1);
    a = 32'h4040_0000; b = 32'h4080_0000; #1; check(32'h4140_0000, 1);   // 3 * 4 = 12
    a = 32'h7f00_0000; b = 32'h7f00_0000; #1; check(32'h7f80_0000, 1);   // overflow
    a = 32'h0100_0000; b = 32'h0100_0000; #1; check(32'h0, 1);           // underflow
    // (1 + 2^-23) * (1 + 2^-23) = 1 + 2^-22 + 2^-46 -> rounds to 1 + 2^-22
    a = 32'h3f80_0001; b = 32'h3f80_0001; #1; check(32'h3f80_0002, 1);
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
