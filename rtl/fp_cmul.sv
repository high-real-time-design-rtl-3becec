// fp_cmul: pipelined single-precision complex multiplier, y = a * b.
//
// Stage 1 registers the four real products ar*br, ai*bi, ar*bi, ai*br
// (four fp_mul units); stage 2 registers re = ar*br - ai*bi and
// im = ar*bi + ai*br (two fp_add units). Latency is two clock cycles and a
// new pair can enter every cycle; in_valid travels alongside as out_valid.
// The paper builds its twiddle and matched-filter multiplications from
// floating-point multipliers and adders; the four-multiplier form and the
// two-stage split are this design's choice.
module fp_cmul
  import dpc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  cpx_t a,
  input  cpx_t b,
  output logic out_valid,
  output cpx_t y
);

  fp32_t p_rr, p_ii, p_ri, p_ir;
  fp32_t q_rr, q_ii, q_ri, q_ir;
  fp32_t s_re, s_im;
  logic  v1;

  fp_mul u_rr (.a(a.re), .b(b.re), .y(p_rr));
  fp_mul u_ii (.a(a.im), .b(b.im), .y(p_ii));
  fp_mul u_ri (.a(a.re), .b(b.im), .y(p_ri));
  fp_mul u_ir (.a(a.im), .b(b.re), .y(p_ir));

  always_ff @(posedge clk) begin
    q_rr <= p_rr;
    q_ii <= p_ii;
    q_ri <= p_ri;
    q_ir <= p_ir;
  end

  fp_add u_re (.a(q_rr), .b(q_ii), .sub(1'b1), .y(s_re));
  fp_add u_im (.a(q_ri), .b(q_ir), .sub(1'b0), .y(s_im));

  always_ff @(posedge clk) begin
    y.re <= s_re;
    y.im <= s_im;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
    end
  end

endmodule
