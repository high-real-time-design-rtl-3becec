// tb_dpc_top: end-to-end test of the pulse-compression top.
//
// The transmitted waveform is a complex linear-FM chirp of N/4 samples. The
// matched-filter coefficients are H(k) = conj(C(k)) * w(k), C the N-point DFT of
// the chirp and w a Hamming window over the (centred) spectrum; they are
// loaded into the coefficient memory first. Each received pulse is the chirp
// delayed by d samples, scaled, plus a little noise. The compressed output is
// compared word by word with y = IDFT(DFT(s) * H) computed here in double
// precision (tolerance 1e-4 of the peak), and the peak must sit at d.
//
// Cycle counts are checked: each transform must take exactly the engine's
// designed count and no more than the paper's 6292 at N = 4096 (scaled by
// N log N for smaller N); the multiply pass must end within the paper's
// 4110-cycle budget scaled the same way. Counted mechanisms, each of which
// must occur: FFT frames, IFFT frames, pipeline stages, parallel stages,
// memory-bank swaps, input back-pressure (in_ready low while a sample waits)
// and every phase 0..4. Runs NPULSE pulses at N = 64.
module tb_dpc_top;
  import dpc_pkg::*;
  import tb_util_pkg::*;

  localparam int unsigned LOG4L  = 2;
  localparam int          NPULSE = 2;
  localparam int unsigned N      = 1 << (2 * LOG4L + 2);
  localparam int unsigned L      = N / 4;
  localparam int          FFT_CYC = LOG4L * (L + 3 + 11) + (L + 7);
  localparam real         PI      = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic coef_we, in_valid, in_ready, out_valid, out_last, fft_busy, fft_done;
  logic [2*LOG4L+1:0] coef_addr;
  cpx_t coef_data, in_data, out_data;
  logic [2:0] phase;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  dpc_top #(.LOG4L(LOG4L)) dut (
    .clk(clk), .rst_n(rst_n), .coef_we(coef_we), .coef_addr(coef_addr), .coef_data(coef_data),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .out_valid(out_valid), .out_data(out_data), .out_last(out_last), .phase(phase),
    .fft_busy(fft_busy), .fft_done(fft_done)
  );

  real    cs [N], sn [N];      // cos/sin(2 pi i / N)
  cpx_t   h  [N];
  cpx_t   s  [NPULSE][N];
  creal_t yref [NPULSE][N];
  real    peak [NPULSE];
  int     delay [NPULSE];

  // X = DFT(x) (inverse = 0) or IDFT (inverse = 1, includes 1/N)
  task automatic dft(input creal_t x [N], output creal_t X [N], input bit inverse);
    for (int k = 0; k < N; k++) begin
      real sr, si;
      sr = 0; si = 0;
      for (int n = 0; n < N; n++) begin
        int  m;
        real c, sg;
        m  = (n * k) % N;
        c  = cs[m];
        sg = inverse ? sn[m] : -sn[m];
        sr += x[n].re * c - x[n].im * sg;
        si += x[n].re * sg + x[n].im * c;
      end
      X[k].re = inverse ? sr / N : sr;
      X[k].im = inverse ? si / N : si;
    end
  endtask

  task automatic prepare();
    creal_t chirp [N], C [N], x [N], S [N], Y [N], y [N];
    for (int i = 0; i < N; i++) begin
      cs[i] = $cos(2.0 * PI * i / N);
      sn[i] = $sin(2.0 * PI * i / N);
    end
    for (int n = 0; n < N; n++) begin
      real ph;
      ph = PI * 0.5 * real'(n * n) / real'(L);
      chirp[n].re = (n < int'(L)) ? $cos(ph) : 0.0;
      chirp[n].im = (n < int'(L)) ? $sin(ph) : 0.0;
    end
    dft(chirp, C, 0);
    for (int k = 0; k < N; k++) begin
      real w;
      w = 0.54 - 0.46 * $cos(2.0 * PI * real'((k + N / 2) % N) / real'(N - 1));
      h[k].re = r2f(C[k].re * w);
      h[k].im = r2f(-C[k].im * w);
    end
    for (int p = 0; p < NPULSE; p++) begin
      delay[p] = 5 + p * int'(N) / 3;
      for (int n = 0; n < N; n++) begin
        real nr, ni;
        nr = (real'($urandom_range(0, 2000)) - 1000.0) * 1e-5;
        ni = (real'($urandom_range(0, 2000)) - 1000.0) * 1e-5;
        x[n].re = nr; x[n].im = ni;
        if (n >= delay[p] && n - delay[p] < int'(L)) begin
          x[n].re += 3.0 * chirp[n - delay[p]].re;
          x[n].im += 3.0 * chirp[n - delay[p]].im;
        end
        s[p][n].re = r2f(x[n].re);
        s[p][n].im = r2f(x[n].im);
        x[n].re = f2r(s[p][n].re);
        x[n].im = f2r(s[p][n].im);
      end
      dft(x, S, 0);
      for (int k = 0; k < N; k++) begin
        real hr, hi;
        hr = f2r(h[k].re); hi = f2r(h[k].im);
        Y[k].re = S[k].re * hr - S[k].im * hi;
        Y[k].im = S[k].re * hi + S[k].im * hr;
      end
      dft(Y, y, 1);
      peak[p] = 0;
      for (int n = 0; n < N; n++) begin
        yref[p][n] = y[n];
        if (cabs(y[n]) > peak[p]) peak[p] = cabs(y[n]);
      end
    end
  endtask

  // mechanism counters
  int n_fft = 0, n_ifft = 0, n_pipe_stage = 0, n_par_stage = 0, n_bank_swap = 0, n_backpressure = 0;
  int ph_seen [5] = '{default: 0};
  int busy_cnt = 0, mul_cnt = 0;
  logic prev_par = 0, prev_run_ptr = 0;

  always @(posedge clk) if ($test$plusargs("dbg") && rst_n) $display("%0t ph=%0d st=%0d/%0d inr=%0d pin=%0d pout=%0d mode=%0d busy=%0d", $time, phase, dut.u_fft.st[0], dut.u_fft.st[1], in_ready, dut.p_in_valid, dut.p_out_valid, dut.p_out_mode, fft_busy);
  always @(posedge clk) if (rst_n) begin
    ph_seen[phase]++;
    if (in_valid && !in_ready) n_backpressure++;
    if (fft_busy) busy_cnt++;
    if (phase == 3'd2) mul_cnt++;
    if (dut.u_fft.u_eng.u_ctrl.en0 &&
        dut.u_fft.u_eng.u_ctrl.c == '0) begin
      if (dut.u_fft.u_eng.u_ctrl.par_mode) n_par_stage++;
      else n_pipe_stage++;
    end
    if (dut.u_fft.run_ptr != prev_run_ptr) n_bank_swap++;
    prev_run_ptr <= dut.u_fft.run_ptr;
    if (fft_done) begin
      checks++;
      if (busy_cnt != FFT_CYC || real'(busy_cnt) > 6292.0 * real'(N * (2 * LOG4L + 2)) / (4096.0 * 12.0) + 40.0) begin
        failures++;
        $display("transform took %0d cycles, expected %0d", busy_cnt, FFT_CYC);
      end
      if (phase == 3'd1) n_fft++; else n_ifft++;
      busy_cnt = 0;
    end
    if (phase == 3'd2 && dut.u_mf.out_valid && dut.u_mf.out_last) begin
      checks++;
      if (mul_cnt + 1 > int'(N) + 14) begin
        failures++;
        $display("multiply pass took %0d cycles", mul_cnt + 1);
      end
      mul_cnt = 0;
    end
  end

  initial begin
    repeat (NPULSE * (8 * int'(N) + 2 * FFT_CYC) + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // driver
  initial begin
    coef_we = 0; coef_addr = '0; coef_data = '0; in_valid = 0; in_data = '0;
    prepare();
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < int'(N); k++) begin
      coef_we <= 1; coef_addr <= (2*LOG4L+2)'(k); coef_data <= h[k];
      @(posedge clk);
    end
    coef_we <= 0;
    for (int p = 0; p < NPULSE; p++)
      for (int n = 0; n < int'(N); n++) begin
        in_valid <= 1;
        in_data  <= s[p][n];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    in_valid <= 0;
  end

  // monitor
  initial begin
    int p, n, pk;
    real best;
    p = 0; n = 0; best = 0; pk = 0;
    while (p < NPULSE) begin
      @(posedge clk);
      if (out_valid && rst_n) begin
        real er, ei, mag;
        er  = f2r(out_data.re) - yref[p][n].re;
        ei  = f2r(out_data.im) - yref[p][n].im;
        mag = $sqrt(f2r(out_data.re) ** 2 + f2r(out_data.im) ** 2);
        if (mag > best) begin best = mag; pk = n; end
        checks++;
        if ($sqrt(er * er + ei * ei) > 1e-4 * peak[p] || out_last != (n == int'(N) - 1)) begin
          failures++;
          if (failures < 10) $display("pulse %0d n=%0d got (%g,%g) ref (%g,%g)", p, n,
                                      f2r(out_data.re), f2r(out_data.im), yref[p][n].re, yref[p][n].im);
        end
        n++;
        if (n == int'(N)) begin
          checks++;
          if (pk != delay[p]) begin
            failures++;
            $display("pulse %0d: peak at %0d, echo delay %0d", p, pk, delay[p]);
          end
          $display("pulse %0d: peak %g at sample %0d", p, best, pk);
          n = 0; p++; best = 0; pk = 0;
        end
      end
    end
    repeat (2) @(posedge clk);
    $display("mechanisms: fft=%0d ifft=%0d pipeline_stages=%0d parallel_stages=%0d bank_swaps=%0d backpressure=%0d phases=%0d/%0d/%0d/%0d/%0d",
             n_fft, n_ifft, n_pipe_stage, n_par_stage, n_bank_swap, n_backpressure,
             ph_seen[0], ph_seen[1], ph_seen[2], ph_seen[3], ph_seen[4]);
    checks++;
    if (n_fft == 0 || n_ifft == 0 || n_pipe_stage == 0 || n_par_stage == 0 ||
        n_bank_swap == 0 || n_backpressure == 0 ||
        ph_seen[0] == 0 || ph_seen[1] == 0 || ph_seen[2] == 0 || ph_seen[3] == 0 || ph_seen[4] == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
