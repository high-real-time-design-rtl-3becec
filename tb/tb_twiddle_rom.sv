// tb_twiddle_rom: reads every exponent m = 0..N-1 of the default 4096-point
// table (three ports, different exponents on each) and compares the registered
// output, one cycle later, with cos(2 pi m/N) - j sin(2 pi m/N) to 1e-7.
module tb_twiddle_rom;
  import dpc_pkg::*;
  import tb_util_pkg::*;

  localparam int N = 4096;

  logic        clk = 0;
  logic [11:0] idx [1:3];
  cpx_t        w   [1:3];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  twiddle_rom #(.N(N)) dut (.clk(clk), .idx(idx), .w(w));

  initial begin
    for (int m = 0; m < N; m++) begin
      for (int p = 1; p <= 3; p++) idx[p] = 12'((m * p + p * 1000) % N);
      @(posedge clk); #1;
      for (int p = 1; p <= 3; p++) begin
        real a;
        a = 2.0 * 3.14159265358979323846 * real'((m * p + p * 1000) % N) / N;
        checks++;
        if (rabs(f2r(w[p].re) - $cos(a)) > 1e-7 || rabs(f2r(w[p].im) + $sin(a)) > 1e-7) begin
          failures++;
          if (failures < 10) $display("m=%0d port %0d got (%g,%g)", (m * p + p * 1000) % N, p,
                                      f2r(w[p].re), f2r(w[p].im));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
