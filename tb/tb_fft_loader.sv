// tb_fft_loader: streams two 64-sample frames (LOG4L = 2) into the loader, the
// first in FFT mode, the second in IFFT mode with gaps in in_valid, and checks
// each registered write: memory n mod 4 only, address = base-4 digit reversal
// of n / 4, data unchanged (FFT) or with real and imaginary parts swapped
// (IFFT), the bank tag, and `last` on sample 63 of each frame.
module tb_fft_loader;
  import dpc_pkg::*;

  localparam int LOG4L = 2;
  localparam int L     = 1 << (2 * LOG4L);
  localparam int N     = 4 * L;

  logic clk = 0, rst_n = 0, in_valid = 0, fft_mode = 1, bank = 0, last, wbank;
  cpx_t in_data = '0, wdata;
  logic [2*LOG4L+1:0] count;
  logic we [4];
  logic [2*LOG4L-1:0] waddr;
  int checks = 0, failures = 0, n_last = 0;

  always #5 clk = ~clk;

  fft_loader #(.LOG4L(LOG4L)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data), .fft_mode(fft_mode),
    .bank(bank), .last(last), .count(count), .we(we), .wbank(wbank), .waddr(waddr), .wdata(wdata)
  );

  function automatic int drev(int v);
    int r;
    r = 0;
    for (int d = 0; d < LOG4L; d++) r = r * 4 + ((v >> (2 * d)) & 3);
    return r;
  endfunction

  // expected writes
  int e_ram [$], e_addr [$];
  cpx_t e_dat [$];
  logic e_bank [$];

  always @(posedge clk) if (rst_n) begin
    int nwe;
    nwe = 0;
    for (int r = 0; r < 4; r++) if (we[r]) nwe++;
    if (nwe > 0) begin
      checks++;
      if (nwe != 1 || e_ram.size() == 0 || !we[e_ram[0]] || int'(waddr) != e_addr[0] ||
          wdata != e_dat[0] || wbank != e_bank[0]) begin
        failures++;
        if (failures < 10) $display("bad write addr %0d data %h", waddr, wdata);
      end
      if (e_ram.size() > 0) begin
        void'(e_ram.pop_front()); void'(e_addr.pop_front()); void'(e_dat.pop_front()); void'(e_bank.pop_front());
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < 2; f++)
      for (int n = 0; n < N; n++) begin
        cpx_t d;
        d.re = $urandom; d.im = $urandom;
        if (f == 1 && n % 5 == 1) begin in_valid <= 0; @(posedge clk); end
        in_valid <= 1; in_data <= d; fft_mode <= (f == 0); bank <= 1'(f);
        e_ram.push_back(n % 4); e_addr.push_back(drev(n / 4));
        e_dat.push_back(f == 0 ? d : cpx_swap(d)); e_bank.push_back(1'(f));
        #1;
        // `last` is combinational on the sample being accepted
        checks++;
        if (last != (n == N - 1)) begin failures++; $display("last wrong at n=%0d", n); end
        if (last) n_last++;
        @(posedge clk);
      end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (e_ram.size() != 0 || n_last != 2) begin failures++; $display("%0d writes missing", e_ram.size()); end
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
