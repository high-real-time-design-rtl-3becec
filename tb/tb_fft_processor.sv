// tb_fft_processor: checks the reconfigurable FFT processor against a
// double-precision DFT computed here.
//
// Two frames of random complex samples are streamed in back to back: the first
// in FFT mode, the second in IFFT mode, so the second loads into the other bank
// while the first is transformed. Every output word is compared with the
// reference (tolerance 2e-5 of the largest reference magnitude), out_fft_mode
// and out_last are checked, and the engine's busy time is checked against the
// cycle count this implementation is built for:
//   (LOG4L pipeline stages of L+3 issue cycles + 1 parallel stage of L) + drains.
// Runs at N = 64 (LOG4L = 2) to stay short; tb_fft_processor_full is the same
// test at the full 4096 points.
module tb_fft_processor;
  import dpc_pkg::*;
  import tb_util_pkg::*;

  localparam int unsigned LOG4L = 2;
  localparam int unsigned N     = 1 << (2 * LOG4L + 2);
  localparam int unsigned L     = N / 4;
  // drain after each stage: 1 read + 1 cache + 4 butterfly (+4 write-back
  // in pipeline stages) cycles, then one cycle to see the pipeline empty
  localparam int unsigned EXP_CYC = LOG4L * (L + 3 + 11) + (L + 7);

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_fft_mode, out_valid, out_last, out_fft_mode, eng_busy, eng_done;
  cpx_t in_data, out_data;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  fft_processor #(.LOG4L(LOG4L)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .in_fft_mode(in_fft_mode), .out_en(1'b1), .out_valid(out_valid), .out_data(out_data),
    .out_last(out_last), .out_fft_mode(out_fft_mode), .eng_busy(eng_busy), .eng_done(eng_done)
  );

  cpx_t   x   [2][N];
  creal_t ref_ [2][N];
  real    maxmag [2];
  real    cos_t [N], sin_t [N];   // exp(-j 2 pi m / N), m = 0..N-1

  task automatic make_ref(int f, bit inverse);
    real sgn;
    sgn = inverse ? 1.0 : -1.0;
    maxmag[f] = 0.0;
    for (int k = 0; k < N; k++) begin
      real sr, si;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < N; n++) begin
        real c, s, xr, xi;
        c  = cos_t[(n * k) % N];
        s  = -sgn * sin_t[(n * k) % N];
        xr = f2r(x[f][n].re); xi = f2r(x[f][n].im);
        sr += xr * c - xi * s;
        si += xr * s + xi * c;
      end
      if (inverse) begin sr = sr / N; si = si / N; end
      ref_[f][k].re = sr; ref_[f][k].im = si;
      if (cabs(ref_[f][k]) > maxmag[f]) maxmag[f] = cabs(ref_[f][k]);
    end
  endtask

  // watchdog
  initial begin
    repeat (20 * N + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // engine busy time per frame
  int busy_cnt = 0;
  always @(posedge clk) begin
    if (eng_busy && rst_n) busy_cnt++;
    if (eng_done && rst_n) begin
      checks++;
      $display("engine cycles %0d", busy_cnt);
      if (busy_cnt != int'(EXP_CYC)) begin
        failures++;
        $display("engine cycles %0d, expected %0d", busy_cnt, EXP_CYC);
      end
      busy_cnt = 0;
    end
  end

  // driver
  initial begin
    for (int f = 0; f < 2; f++)
      for (int n = 0; n < N; n++) begin
        x[f][n].re = r2f((real'($urandom_range(0, 2000)) - 1000.0) / 250.0);
        x[f][n].im = r2f((real'($urandom_range(0, 2000)) - 1000.0) / 250.0);
      end
    for (int m = 0; m < N; m++) begin
      cos_t[m] = $cos(2.0 * 3.14159265358979323846 * real'(m) / real'(N));
      sin_t[m] = -$sin(2.0 * 3.14159265358979323846 * real'(m) / real'(N));
    end
    make_ref(0, 0);
    make_ref(1, 1);
    in_valid = 0; in_data = '0; in_fft_mode = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int n = 0; n < N; n++) begin
        in_valid    <= 1;
        in_data     <= x[f][n];
        in_fft_mode <= (f == 0);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    in_valid <= 0;
  end

  // monitor
  initial begin
    int f, k;
    f = 0; k = 0;
    while (f < 2) begin
      @(posedge clk);
      if (out_valid && rst_n) begin
        real er, ei, err;
        er  = f2r(out_data.re) - ref_[f][k].re;
        ei  = f2r(out_data.im) - ref_[f][k].im;
        err = $sqrt(er * er + ei * ei);
        checks++;
        if (err > 2e-5 * maxmag[f] || out_fft_mode != (f == 0) || out_last != (k == N - 1)) begin
          failures++;
          if (failures < 10)
            $display("frame %0d k=%0d got (%g,%g) ref (%g,%g) mode %0d last %0d", f, k,
                     f2r(out_data.re), f2r(out_data.im), ref_[f][k].re, ref_[f][k].im,
                     out_fft_mode, out_last);
        end
        k++;
        if (k == N) begin k = 0; f++; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
