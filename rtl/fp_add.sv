// fp_add: combinational IEEE-754 single-precision adder/subtractor.
//
// y = a + b when sub = 0, y = a - b when sub = 1. The operands are aligned
// with three extra bits (guard, round, sticky), added or subtracted as
// magnitudes, normalised with a leading-zero count, and rounded to nearest,
// ties to even. Simplifications chosen for this design (the paper only says the
// butterfly is built from floating-point adders and multipliers): subnormal
// inputs are read as zero and subnormal results are flushed to zero; an
// overflow gives infinity; an operand with exponent 255 (infinity or NaN) is
// passed through. The unit is purely combinational; callers register around it.
module fp_add
  import dpc_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t y
);

  logic        sa, sb, sx, sy;
  logic [7:0]  ea, eb, ex, ey;
  logic [23:0] ma, mb, mx, my;
  logic [7:0]  d;
  logic [26:0] xx, yy, ysh;
  logic        sticky;
  logic [27:0] sum;
  logic [26:0] nrm;
  int          lz;
  int signed   e;
  logic [24:0] rnd;
  logic        round_up;

  always_comb begin
    lz = 0;
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    ma = (ea == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    mb = (eb == 8'd0) ? 24'd0 : {1'b1, b[22:0]};
    // order so that x has the larger magnitude
    if ({ea, a[22:0]} >= {eb, b[22:0]}) begin
      sx = sa; ex = ea; mx = ma; sy = sb; ey = eb; my = mb;
    end else begin
      sx = sb; ex = eb; mx = mb; sy = sa; ey = ea; my = ma;
    end
    d  = ex - ey;
    xx = {mx, 3'b000};
    yy = {my, 3'b000};
    if (d >= 8'd27) begin
      ysh    = '0;
      sticky = |yy;
    end else begin
      ysh    = yy >> d;
      sticky = |(yy & ((27'd1 << d) - 27'd1));
    end
    ysh[0] = ysh[0] | sticky;

    if (sx == sy) sum = {1'b0, xx} + {1'b0, ysh};
    else          sum = {1'b0, xx} - {1'b0, ysh};

    e  = int'(ex);
    if (sum[27]) begin
      nrm = sum[27:1];
      nrm[0] = nrm[0] | sum[0];
      e = e + 1;
    end else begin
      lz = 27;
      for (int i = 0; i <= 26; i++)
        if (sum[i]) lz = 26 - i;
      nrm = sum[26:0] << lz;
      e = e - lz;
    end

    round_up = nrm[2] & (nrm[1] | nrm[0] | nrm[3]);
    rnd = {1'b0, nrm[26:3]} + {24'd0, round_up};
    if (rnd[24]) begin
      rnd = rnd >> 1;
      e = e + 1;
    end

    if (ea == 8'hff) begin
      y = a;
    end else if (eb == 8'hff) begin
      y = {sb, b[30:0]};
    end else if (mx == 24'd0 && my == 24'd0) begin
      y = {sx & sy, 31'd0};
    end else if (sum == 28'd0) begin
      y = 32'd0;
    end else if (e >= 255) begin
      y = {sx, 8'hff, 23'd0};
    end else if (e <= 0) begin
      y = {sx, 31'd0};
    end else begin
      y = {sx, 8'(e), rnd[22:0]};
    end
  end

endmodule
