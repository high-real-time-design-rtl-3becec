// tb_fft_engine: runs the in-place FFT engine on four memory models for
// N = 256 (LOG4L = 3, L = 64). Random samples x(n) are placed in memory n mod 4
// at the base-4 digit reversal of n / 4; after `done`, memory k1 address k0
// must hold X(L*k1 + k0) of a double-precision DFT (tolerance 2e-5 of the
// largest bin). The engine must be busy for exactly
// LOG4L*(L + 3 + 11) + (L + 7) cycles (for N = 4096 this is 6221, within the
// paper's 6292).
module tb_fft_engine;
  import dpc_pkg::*;
  import tb_util_pkg::*;

  localparam int LOG4L = 3;
  localparam int LOG2L = 2 * LOG4L;
  localparam int L     = 1 << LOG2L;
  localparam int N     = 4 * L;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [LOG2L-1:0] rd_addr [4], waddr [4];
  cpx_t rdata [4], wdata [4];
  logic we [4];
  cpx_t mem [4][L];
  cpx_t x [N];
  creal_t X [N];
  real maxmag;
  int checks = 0, failures = 0, busy_cnt = 0;

  always #5 clk = ~clk;

  fft_engine #(.LOG4L(LOG4L)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .rd_addr(rd_addr), .rdata(rdata), .we(we), .waddr(waddr), .wdata(wdata)
  );

  always @(posedge clk) begin
    for (int r = 0; r < 4; r++) begin
      rdata[r] <= mem[r][rd_addr[r]];
      if (we[r] && rst_n) mem[r][waddr[r]] <= wdata[r];
    end
    if (busy && rst_n) busy_cnt++;
  end

  function automatic int drev(int v);
    int r;
    r = 0;
    for (int d = 0; d < LOG4L; d++) r = r * 4 + ((v >> (2 * d)) & 3);
    return r;
  endfunction

  initial begin
    for (int n = 0; n < N; n++) begin
      x[n].re = r2f((real'($urandom_range(0, 2000)) - 1000.0) / 100.0);
      x[n].im = r2f((real'($urandom_range(0, 2000)) - 1000.0) / 100.0);
      mem[n % 4][drev(n / 4)] = x[n];
    end
    maxmag = 0;
    for (int k = 0; k < N; k++) begin
      real sr, si;
      sr = 0; si = 0;
      for (int n = 0; n < N; n++) begin
        real a;
        a = -2.0 * 3.14159265358979323846 * real'((n * k) % N) / N;
        sr += f2r(x[n].re) * $cos(a) - f2r(x[n].im) * $sin(a);
        si += f2r(x[n].re) * $sin(a) + f2r(x[n].im) * $cos(a);
      end
      X[k].re = sr; X[k].im = si;
      if (cabs(X[k]) > maxmag) maxmag = cabs(X[k]);
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    wait (done);
    @(posedge clk);
    for (int k1 = 0; k1 < 4; k1++)
      for (int k0 = 0; k0 < L; k0++) begin
        real er, ei;
        er = f2r(mem[k1][k0].re) - X[L * k1 + k0].re;
        ei = f2r(mem[k1][k0].im) - X[L * k1 + k0].im;
        checks++;
        if ($sqrt(er * er + ei * ei) > 2e-5 * maxmag) begin
          failures++;
          if (failures < 10) $display("X(%0d) got (%g,%g) ref (%g,%g)", L * k1 + k0,
                                      f2r(mem[k1][k0].re), f2r(mem[k1][k0].im), X[L * k1 + k0].re, X[L * k1 + k0].im);
        end
      end
    checks++;
    if (busy_cnt != LOG4L * (L + 3 + 11) + (L + 7)) begin
      failures++;
      $display("engine busy %0d cycles, expected %0d", busy_cnt, LOG4L * (L + 3 + 11) + (L + 7));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
