// fft_loader: input counter and distribution of a frame over the four memories.
//
// A counter follows the input samples from 0 to N-1. Sample n goes to memory
// n mod 4 (the paper's modulo-4 rule), at address digit_rev(n / 4): the
// base-4 digit reversal puts each set in the order the in-place
// decimation-in-time stages expect. When fft_mode is low (IFFT) the real and
// imaginary parts are swapped on the way in, the first half of the paper's
// FFT-to-IFFT reconfiguration. The memory write is registered (one cycle after
// the sample) and carries the `bank` value given with the sample. `last` is
// high, combinationally, while the final sample of a frame is accepted.
module fft_loader
  import dpc_pkg::*;
#(
  parameter int unsigned LOG4L = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  cpx_t               in_data,
  input  logic               fft_mode,
  input  logic               bank,
  output logic               last,
  output logic [2*LOG4L+1:0] count,
  output logic               we [4],
  output logic               wbank,
  output logic [2*LOG4L-1:0] waddr,
  output cpx_t               wdata
);

  localparam int unsigned LOG2L = 2 * LOG4L;

  assign last = in_valid && (&count);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int r = 0; r < 4; r++) we[r] <= 1'b0;
      wbank <= 1'b0;
      waddr <= '0;
      wdata <= '0;
    end else begin
      for (int r = 0; r < 4; r++) we[r] <= in_valid && (count[1:0] == 2'(r));
      if (in_valid) begin
        count <= count + 1'b1;
        wbank <= bank;
        waddr <= LOG2L'(digit_rev(16'(count[LOG2L+1:2]), LOG4L));
        wdata <= fft_mode ? in_data : cpx_swap(in_data);
      end
    end
  end

endmodule
