// tb_fp_cmul: streams random complex pairs through the complex multiplier, one
// per cycle with occasional gaps, and checks each product against double
// precision (relative tolerance 1e-6 of |a||b|) and the two-cycle latency.
module tb_fp_cmul;
  import dpc_pkg::*;
  import tb_util_pkg::*;

  localparam int NV = 500;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  cpx_t a, b, y;
  int   checks = 0, failures = 0, cyc = 0;
  cpx_t sa [NV], sb [NV];
  int   t_in [NV];

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  fp_cmul dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .out_valid(out_valid), .y(y));

  function automatic fp32_t rnd();
    return r2f((real'($urandom_range(0, 20000)) - 10000.0) / 700.0);
  endfunction

  initial begin
    a = '0; b = '0;
    for (int i = 0; i < NV; i++) begin
      sa[i].re = rnd(); sa[i].im = rnd(); sb[i].re = rnd(); sb[i].im = rnd();
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < NV; i++) begin
      if (i % 5 == 2) begin in_valid <= 0; @(posedge clk); end
      in_valid <= 1; a <= sa[i]; b <= sb[i]; t_in[i] = cyc + 1;
      @(posedge clk);
    end
    in_valid <= 0;
  end

  initial begin
    int i;
    i = 0;
    while (i < NV) begin
      @(posedge clk); #1;
      if (out_valid && rst_n) begin
        real ar, ai, br, bi, rr, ri, tol;
        ar = f2r(sa[i].re); ai = f2r(sa[i].im); br = f2r(sb[i].re); bi = f2r(sb[i].im);
        rr = ar * br - ai * bi; ri = ar * bi + ai * br;
        tol = 1e-6 * $sqrt((ar * ar + ai * ai) * (br * br + bi * bi)) + 1e-30;
        checks++;
        if (rabs(f2r(y.re) - rr) > tol || rabs(f2r(y.im) - ri) > tol || cyc - t_in[i] != 2) begin
          failures++;
          if (failures < 10) $display("%0d: got (%g,%g) ref (%g,%g) latency %0d", i,
                                      f2r(y.re), f2r(y.im), rr, ri, cyc - t_in[i]);
        end
        i++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NV * 3 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
