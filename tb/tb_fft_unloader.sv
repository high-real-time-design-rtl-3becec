// tb_fft_unloader: reads two frames from four memory models (LOG4L = 2, N = 64).
// Memory k / 16, address k mod 16 holds a word derived from k. The FFT frame
// must come out unchanged in order k = 0..63; the IFFT frame with real and
// imaginary parts swapped and each exponent lowered by log2(N) = 6 (a part
// whose exponent would not stay positive becomes zero, one such word is
// included). out_valid must rise three cycles after `start` (two after the first read address) and stay high for N
// cycles; out_last and `done` mark the last word.
module tb_fft_unloader;
  import dpc_pkg::*;

  localparam int LOG4L = 2;
  localparam int L     = 1 << (2 * LOG4L);
  localparam int N     = 4 * L;
  localparam int LOGN  = 2 * LOG4L + 2;

  logic clk = 0, rst_n = 0, start = 0, fft_mode = 1, active, out_valid, out_last, done;
  logic [2*LOG4L-1:0] raddr;
  cpx_t rdata [4], out_data;
  cpx_t mem [4][L];
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;

  fft_unloader #(.LOG4L(LOG4L)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .fft_mode(fft_mode), .active(active),
    .raddr(raddr), .rdata(rdata), .out_valid(out_valid), .out_data(out_data),
    .out_last(out_last), .done(done)
  );

  always @(posedge clk) begin
    cyc++;
    for (int r = 0; r < 4; r++) rdata[r] <= mem[r][raddr];
  end

  function automatic cpx_t word(int k);
    cpx_t z;
    z.re = {1'(k % 2), 8'(100 + k), 23'(k * 12345)};
    z.im = {1'(k % 3 == 0), 8'(k == 7 ? 3 : 60 + k), 23'(k * 777)};
    return z;
  endfunction

  function automatic fp32_t scaled(fp32_t a);
    if (int'(a[30:23]) - LOGN <= 0) return 32'h0;
    return {a[31], 8'(int'(a[30:23]) - LOGN), a[22:0]};
  endfunction

  initial begin
    int t_start;
    for (int k = 0; k < N; k++) mem[k / L][k % L] = word(k);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < 2; f++) begin
      int k;
      #1;
      start <= 1; fft_mode <= (f == 0); t_start = cyc;
      @(posedge clk);
      start <= 0;
      k = 0;
      while (k < N) begin
        @(posedge clk); #1;
        if (out_valid && rst_n) begin
          cpx_t e;
          e = word(k);
          if (f == 1) begin e = cpx_swap(e); e.re = scaled(e.re); e.im = scaled(e.im); end
          checks++;
          if (out_data != e || out_last != (k == N - 1) || done != (k == N - 1) ||
              (k == 0 && cyc - t_start != 3)) begin
            failures++;
            if (failures < 10) $display("frame %0d k=%0d got %h expected %h (cycle %0d)", f, k, out_data, e, cyc - t_start);
          end
          k++;
        end
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid || active) begin failures++; $display("output did not stop"); end
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
