// tb_radix4_bfly: streams random butterflies into the radix-4 butterfly, one
// per cycle with gaps, and checks every result against a double-precision
// evaluation of y_k = sum_q x_q w_q (-j)^(qk) (w_0 = 1), the returned tag, and
// the four-cycle latency from in_valid to out_valid.
module tb_radix4_bfly;
  import dpc_pkg::*;
  import tb_util_pkg::*;

  localparam int NB = 400;

  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid, busy;
  logic [11:0] in_tag, out_tag;
  cpx_t x [4];
  cpx_t w [1:3];
  cpx_t y [4];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  radix4_bfly #(.TAG_W(12)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_tag(in_tag), .x(x), .w(w),
    .out_valid(out_valid), .out_tag(out_tag), .y(y), .busy(busy)
  );

  cpx_t  sx [NB][4];
  cpx_t  sw [NB][4];
  int    t_in [NB];
  int    cyc = 0;

  always @(posedge clk) cyc++;

  function automatic fp32_t rnd();
    return r2f((real'($urandom_range(0, 20000)) - 10000.0) / 1000.0);
  endfunction

  initial begin
    in_valid = 0; in_tag = '0;
    for (int i = 0; i < 4; i++) x[i] = '0;
    for (int i = 1; i < 4; i++) w[i] = '0;
    for (int n = 0; n < NB; n++)
      for (int q = 0; q < 4; q++) begin
        real a;
        sx[n][q].re = rnd(); sx[n][q].im = rnd();
        a = 2.0 * 3.14159265358979323846 * real'($urandom_range(0, 4095)) / 4096.0;
        sw[n][q].re = (q == 0) ? 32'h3f80_0000 : r2f($cos(a));
        sw[n][q].im = (q == 0) ? 32'h0 : r2f(-$sin(a));
      end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < NB; n++) begin
      if (n % 7 == 3) begin in_valid <= 0; @(posedge clk); end
      in_valid <= 1; in_tag <= 12'(n);
      for (int q = 0; q < 4; q++) x[q] <= sx[n][q];
      for (int q = 1; q < 4; q++) w[q] <= sw[n][q];
      t_in[n] = cyc + 1;
      @(posedge clk);
    end
    in_valid <= 0;
  end

  initial begin
    int n;
    n = 0;
    while (n < NB) begin
      @(posedge clk);
      #1;
      if (out_valid && rst_n) begin
        for (int k = 0; k < 4; k++) begin
          real sr, si, er, ei, mag;
          sr = 0; si = 0; mag = 0;
          for (int q = 0; q < 4; q++) begin
            real br, bi, cr, ci, xr, xi, wr, wi;
            xr = f2r(sx[n][q].re); xi = f2r(sx[n][q].im);
            wr = f2r(sw[n][q].re); wi = f2r(sw[n][q].im);
            br = xr * wr - xi * wi; bi = xr * wi + xi * wr;
            // multiply by (-j)^(q*k)
            case ((q * k) % 4)
              0: begin cr = br;  ci = bi;  end
              1: begin cr = bi;  ci = -br; end
              2: begin cr = -br; ci = -bi; end
              default: begin cr = -bi; ci = br; end
            endcase
            sr += cr; si += ci;
            mag += $sqrt(br * br + bi * bi);
          end
          er = f2r(y[k].re) - sr; ei = f2r(y[k].im) - si;
          checks++;
          if ($sqrt(er * er + ei * ei) > 1e-6 * mag + 1e-30) begin
            failures++;
            if (failures < 10) $display("bfly %0d y%0d got (%g,%g) ref (%g,%g)", n, k,
                                        f2r(y[k].re), f2r(y[k].im), sr, si);
          end
        end
        checks++;
        if (out_tag != 12'(n) || cyc - t_in[n] != 4) begin
          failures++;
          $display("bfly %0d tag %0d latency %0d", n, out_tag, cyc - t_in[n]);
        end
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NB * 2 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
