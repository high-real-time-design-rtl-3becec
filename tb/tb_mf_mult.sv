// tb_mf_mult: loads random coefficients H(k) into the matched-filter multiplier
// (LOGN = 6, N = 64), streams two frames X(k) with a gap between them, and
// checks every product X(k)*H(k) against double precision (relative 1e-6), the
// three-cycle latency from in_valid to out_valid, and out_last on k = N-1
// (the index counter restarts after in_last).
module tb_mf_mult;
  import dpc_pkg::*;
  import tb_util_pkg::*;

  localparam int LOGN = 6;
  localparam int N    = 1 << LOGN;

  logic clk = 0, rst_n = 0, coef_we = 0, in_valid = 0, in_last = 0, out_valid, out_last;
  logic [LOGN-1:0] coef_addr = '0;
  cpx_t coef_data = '0, in_data = '0, out_data;
  cpx_t h [N], x [2][N];
  int checks = 0, failures = 0, cyc = 0;
  int t_in [$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  mf_mult #(.LOGN(LOGN)) dut (
    .clk(clk), .rst_n(rst_n), .coef_we(coef_we), .coef_addr(coef_addr), .coef_data(coef_data),
    .in_valid(in_valid), .in_data(in_data), .in_last(in_last),
    .out_valid(out_valid), .out_data(out_data), .out_last(out_last)
  );

  function automatic fp32_t rnd();
    return r2f((real'($urandom_range(0, 20000)) - 10000.0) / 900.0);
  endfunction

  initial begin
    for (int k = 0; k < N; k++) begin
      h[k].re = rnd(); h[k].im = rnd();
      x[0][k].re = rnd(); x[0][k].im = rnd();
      x[1][k].re = rnd(); x[1][k].im = rnd();
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < N; k++) begin
      coef_we <= 1; coef_addr <= LOGN'(k); coef_data <= h[k];
      @(posedge clk);
    end
    coef_we <= 0;
    for (int f = 0; f < 2; f++) begin
      for (int k = 0; k < N; k++) begin
        #1;
        in_valid <= 1; in_data <= x[f][k]; in_last <= (k == N - 1);
        t_in.push_back(cyc);
        @(posedge clk);
      end
      #1;
      in_valid <= 0; in_last <= 0;
      repeat (5) @(posedge clk);
    end
  end

  initial begin
    int f, k;
    f = 0; k = 0;
    while (f < 2) begin
      @(posedge clk); #1;
      if (out_valid && rst_n) begin
        real ar, ai, br, bi, rr, ri, tol;
        ar = f2r(x[f][k].re); ai = f2r(x[f][k].im); br = f2r(h[k].re); bi = f2r(h[k].im);
        rr = ar * br - ai * bi; ri = ar * bi + ai * br;
        tol = 1e-6 * $sqrt((ar * ar + ai * ai) * (br * br + bi * bi)) + 1e-30;
        checks++;
        if (rabs(f2r(out_data.re) - rr) > tol || rabs(f2r(out_data.im) - ri) > tol ||
            out_last != (k == N - 1) || cyc - t_in[0] != 3) begin
          failures++;
          if (failures < 10) $display("frame %0d k=%0d got (%g,%g) ref (%g,%g) latency %0d", f, k,
                                      f2r(out_data.re), f2r(out_data.im), rr, ri, cyc - t_in[0]);
        end
        void'(t_in.pop_front());
        k++;
        if (k == N) begin k = 0; f++; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
