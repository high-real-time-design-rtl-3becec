// dpc_top: frequency-domain digital pulse compression of N = 4096 complex
// single-precision samples, y = IFFT{ FFT{s} x H }.
//
// The received pulse s(n) streams in (in_valid/in_ready). The fft_processor
// transforms it in place with its single radix-4 butterfly ("pipeline and
// parallel" memory access). Its spectrum streams out in natural order through
// mf_mult, which multiplies each X(k) by the stored matched-filter coefficient
// H(k) and feeds the product straight back into the processor as an IFFT frame
// (real and imaginary parts swapped on entry). The processor runs the IFFT on
// its second memory bank, swaps the parts back, divides by 4096 by lowering
// each exponent by 12, and the compressed pulse y(n) streams out
// (out_valid/out_last, no back-pressure).
//
// Processing is one pulse at a time, as in the paper's timing: load 4096
// samples, FFT, multiply, IFFT, unload. `phase` reports the step
// (0 load, 1 FFT, 2 multiply, 3 IFFT, 4 output); in_ready is high only while
// loading. fft_busy is high while the butterfly engine runs a transform and
// fft_done pulses at its end. Coefficients are written through coef_we/coef_addr/coef_data before
// the first pulse. Cycle counts at N = 4096: FFT and IFFT 6221 each, the
// multiply pass 4096 + 6.
module dpc_top
  import dpc_pkg::*;
#(
  parameter int unsigned LOG4L = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 coef_we,
  input  logic [2*LOG4L+1:0]   coef_addr,
  input  cpx_t                 coef_data,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  cpx_t                 in_data,
  output logic                 out_valid,
  output cpx_t                 out_data,
  output logic                 out_last,
  output logic [2:0]           phase,
  output logic                 fft_busy,
  output logic                 fft_done
);

  localparam int unsigned LOGN = 2 * LOG4L + 2;

  typedef enum logic [2:0] {PH_LOAD = 3'd0, PH_FFT = 3'd1, PH_MUL = 3'd2,
                            PH_IFFT = 3'd3, PH_OUT = 3'd4} phase_t;
  phase_t ph;

  logic            p_in_valid, p_in_ready, p_in_mode;
  cpx_t            p_in_data;
  logic            p_out_valid, p_out_last, p_out_mode;
  cpx_t            p_out_data;
  logic            m_out_valid, m_out_last;
  cpx_t            m_out_data;
  logic [LOGN-1:0] in_cnt;
  logic            ext_accept;

  fft_processor #(.LOG4L(LOG4L)) u_fft (
    .clk(clk), .rst_n(rst_n),
    .in_valid(p_in_valid), .in_ready(p_in_ready), .in_data(p_in_data), .in_fft_mode(p_in_mode),
    .out_en(1'b1), .out_valid(p_out_valid), .out_data(p_out_data), .out_last(p_out_last),
    .out_fft_mode(p_out_mode), .eng_busy(fft_busy), .eng_done(fft_done)
  );

  mf_mult #(.LOGN(LOGN)) u_mf (
    .clk(clk), .rst_n(rst_n),
    .coef_we(coef_we), .coef_addr(coef_addr), .coef_data(coef_data),
    .in_valid(p_out_valid && p_out_mode), .in_data(p_out_data),
    .in_last(p_out_last && p_out_mode),
    .out_valid(m_out_valid), .out_data(m_out_data), .out_last(m_out_last)
  );

  // processor input: products of the multiply pass (IFFT frame) or new samples
  assign in_ready   = (ph == PH_LOAD) && p_in_ready && !m_out_valid;
  assign ext_accept = in_valid && in_ready;
  always_comb begin
    if (m_out_valid) begin
      p_in_valid = 1'b1;
      p_in_data  = m_out_data;
      p_in_mode  = 1'b0;
    end else begin
      p_in_valid = ext_accept;
      p_in_data  = in_data;
      p_in_mode  = 1'b1;
    end
  end

  // compressed pulse
  assign out_valid = p_out_valid && !p_out_mode;
  assign out_data  = p_out_data;
  assign out_last  = p_out_last && !p_out_mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph     <= PH_LOAD;
      in_cnt <= '0;
    end else begin
      unique case (ph)
        PH_LOAD: if (ext_accept) begin
          in_cnt <= in_cnt + 1'b1;
          if (&in_cnt) ph <= PH_FFT;
        end
        PH_FFT:  if (p_out_valid && p_out_mode) ph <= PH_MUL;
        PH_MUL:  if (m_out_valid && m_out_last) ph <= PH_IFFT;
        PH_IFFT: if (p_out_valid && !p_out_mode) ph <= PH_OUT;
        PH_OUT:  if (out_valid && out_last) ph <= PH_LOAD;
        default: ph <= PH_LOAD;
      endcase
    end
  end

  assign phase = ph;

  // the multiply pass always finds a free bank, so nothing is dropped
  a_mul_accepted: assert property (@(posedge clk) disable iff (!rst_n)
    m_out_valid |-> p_in_ready);

endmodule
