// radix4_bfly: pipelined single-precision radix-4 decimation-in-time butterfly.
//
// Inputs are the four operands x[0..3] and the twiddle factors w[1..3] (the
// first operand needs no multiplication, so there are three complex
// multipliers, as the paper describes). The outputs are the 4-point DFT of
// b_q = x_q * w_q with the forward kernel W_4 = -j:
//   y0 = b0 + b1 + b2 + b3        y1 = b0 - j b1 - b2 + j b3
//   y2 = b0 - b1 + b2 - b3        y3 = b0 + j b1 - b2 - j b3
// computed as t0 = b0+b2, t1 = b0-b2, t2 = b1+b3, t3 = b1-b3, then
// y0 = t0+t2, y2 = t0-t2, y1 = t1 - j t3, y3 = t1 + j t3.
//
// Timing: a butterfly may enter every cycle (in_valid). Results appear four
// cycles later with out_valid and the untouched side-band word `tag`
// (two cycles of complex multiply, one for t, one for y). The registered
// outputs are the paper's Bf_Reg_Out; the four-cycle depth is this design's
// choice. `busy` is high while any butterfly is inside.
module radix4_bfly
  import dpc_pkg::*;
#(
  parameter int unsigned TAG_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  cpx_t             x [4],
  input  cpx_t             w [1:3],
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output cpx_t             y [4],
  output logic             busy
);

  cpx_t             b [4];
  cpx_t             b0_d1;
  logic [2:0]       mv;
  logic             v2;
  logic [TAG_W-1:0] tag1, tag2, tag3;
  cpx_t             t [4];
  cpx_t             tn [4];
  cpx_t             yn [4];

  // twiddle multiplications for operands 1..3; operand 0 is only delayed
  for (genvar q = 1; q < 4; q++) begin : g_mul
    fp_cmul u_cmul (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
      .a(x[q]), .b(w[q]), .out_valid(mv[q-1]), .y(b[q])
    );
  end

  always_ff @(posedge clk) begin
    b0_d1 <= x[0];
    b[0]  <= b0_d1;
    tag1  <= in_tag;
    tag2  <= tag1;
  end

  // t stage
  fp_add u_t0r (.a(b[0].re), .b(b[2].re), .sub(1'b0), .y(tn[0].re));
  fp_add u_t0i (.a(b[0].im), .b(b[2].im), .sub(1'b0), .y(tn[0].im));
  fp_add u_t1r (.a(b[0].re), .b(b[2].re), .sub(1'b1), .y(tn[1].re));
  fp_add u_t1i (.a(b[0].im), .b(b[2].im), .sub(1'b1), .y(tn[1].im));
  fp_add u_t2r (.a(b[1].re), .b(b[3].re), .sub(1'b0), .y(tn[2].re));
  fp_add u_t2i (.a(b[1].im), .b(b[3].im), .sub(1'b0), .y(tn[2].im));
  fp_add u_t3r (.a(b[1].re), .b(b[3].re), .sub(1'b1), .y(tn[3].re));
  fp_add u_t3i (.a(b[1].im), .b(b[3].im), .sub(1'b1), .y(tn[3].im));

  always_ff @(posedge clk) begin
    t    <= tn;
    tag3 <= tag2;
  end

  // y stage: -j*(u + jv) = v - ju
  fp_add u_y0r (.a(t[0].re), .b(t[2].re), .sub(1'b0), .y(yn[0].re));
  fp_add u_y0i (.a(t[0].im), .b(t[2].im), .sub(1'b0), .y(yn[0].im));
  fp_add u_y2r (.a(t[0].re), .b(t[2].re), .sub(1'b1), .y(yn[2].re));
  fp_add u_y2i (.a(t[0].im), .b(t[2].im), .sub(1'b1), .y(yn[2].im));
  fp_add u_y1r (.a(t[1].re), .b(t[3].im), .sub(1'b0), .y(yn[1].re));
  fp_add u_y1i (.a(t[1].im), .b(t[3].re), .sub(1'b1), .y(yn[1].im));
  fp_add u_y3r (.a(t[1].re), .b(t[3].im), .sub(1'b1), .y(yn[3].re));
  fp_add u_y3i (.a(t[1].im), .b(t[3].re), .sub(1'b0), .y(yn[3].im));

  always_ff @(posedge clk) begin
    y       <= yn;
    out_tag <= tag3;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v2        <= &mv;
      out_valid <= v2;
    end
  end

  // mirror of the multipliers' first valid stage, for `busy` only
  logic v1;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;

  assign busy = in_valid | v1 | (|mv) | v2 | out_valid;

endmodule
