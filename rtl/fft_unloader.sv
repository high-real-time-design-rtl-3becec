// fft_unloader: reads a finished transform out in natural order.
//
// After `start` it walks k = 0..N-1, reading memory k / L at address k mod L
// (where the engine leaves X(k)), one word per cycle. For an IFFT frame
// (fft_mode low) it swaps real and imaginary parts back and divides by N by
// subtracting log2(N) = 12 from each exponent, as the paper proposes instead
// of a divider; a part whose exponent would fall to zero or below becomes
// zero. out_valid follows the read address by two cycles (memory read, then
// the output register); out_last marks k = N-1 and `done` pulses with it.
module fft_unloader
  import dpc_pkg::*;
#(
  parameter int unsigned LOG4L = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               fft_mode,
  output logic               active,
  output logic [2*LOG4L-1:0] raddr,
  input  cpx_t               rdata [4],
  output logic               out_valid,
  output cpx_t               out_data,
  output logic               out_last,
  output logic               done
);

  localparam int unsigned LOG2L = 2 * LOG4L;
  localparam int unsigned LOGN  = LOG2L + 2;

  logic [LOGN-1:0] k;
  logic            mode;
  logic            v1, last1;
  logic [1:0]      sel1;
  cpx_t            z;

  function automatic fp32_t div_n(fp32_t a);
    if (a[30:23] > 8'(LOGN)) return {a[31], a[30:23] - 8'(LOGN), a[22:0]};
    else                     return 32'd0;
  endfunction

  assign raddr = k[LOG2L-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      k         <= '0;
      mode      <= 1'b1;
      v1        <= 1'b0;
      last1     <= 1'b0;
      sel1      <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      done      <= 1'b0;
    end else begin
      if (start && !active) begin
        active <= 1'b1;
        k      <= '0;
        mode   <= fft_mode;
      end else if (active) begin
        k <= k + 1'b1;
        if (&k) active <= 1'b0;
      end
      v1        <= active;
      last1     <= active && (&k);
      sel1      <= k[LOGN-1 -: 2];
      out_valid <= v1;
      out_last  <= last1;
      done      <= last1;
    end
  end

  always_comb begin
    z = rdata[sel1];
    if (!mode) begin
      z = cpx_swap(z);
      z.re = div_n(z.re);
      z.im = div_n(z.im);
    end
  end

  always_ff @(posedge clk) out_data <= z;

endmodule
