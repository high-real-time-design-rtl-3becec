// fp_mul: combinational IEEE-754 single-precision multiplier.
//
// The 24-bit significands are multiplied to a 48-bit product, normalised by at
// most one place and rounded to nearest, ties to even, using the bits below the
// kept 24 as guard and sticky. As in fp_add (an assumption of this design, not a
// detail from the paper), subnormal inputs count as zero, results below the
// normal range become signed zero, results above it become infinity, and an
// infinite or NaN operand yields infinity. Purely combinational.
module fp_mul
  import dpc_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        s;
  logic [7:0]  ea, eb;
  logic [47:0] p;
  logic [23:0] m;
  logic        g, st, up;
  logic [24:0] rnd;
  int signed   e;

  always_comb begin
    s  = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    p  = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e  = int'(ea) + int'(eb) - 127;
    if (p[47]) begin
      m  = p[47:24];
      g  = p[23];
      st = |p[22:0];
      e  = e + 1;
    end else begin
      m  = p[46:23];
      g  = p[22];
      st = |p[21:0];
    end
    up  = g & (st | m[0]);
    rnd = {1'b0, m} + {24'd0, up};
    if (rnd[24]) begin
      rnd = rnd >> 1;
      e = e + 1;
    end
    if (ea == 8'hff || eb == 8'hff)      y = {s, 8'hff, 23'd0};
    else if (ea == 8'd0 || eb == 8'd0)   y = {s, 31'd0};
    else if (e >= 255)                   y = {s, 8'hff, 23'd0};
    else if (e <= 0)                     y = {s, 31'd0};
    else                                 y = {s, 8'(e), rnd[22:0]};
  end

endmodule
