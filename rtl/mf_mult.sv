// mf_mult: matched-filter multiplication in the frequency domain.
//
// Multiplies the spectrum X(k), arriving in natural order k = 0..N-1 one word
// per cycle (in_valid, in_last on k = N-1), by the matched-filter coefficient
// H(k), and emits X(k)*H(k) in the same order. The coefficients sit in an
// N-word memory (coef_we/coef_addr/coef_data, loaded once by the host; the
// paper keeps them in a ROM generated offline for the transmitted waveform,
// with a Hamming weighting). A counter follows k, the coefficient is read in
// the cycle the sample arrives, the sample is delayed one cycle to meet it,
// and an fp_cmul forms the product. Latency is three cycles; throughput one
// product per cycle.
module mf_mult
  import dpc_pkg::*;
#(
  parameter int unsigned LOGN = 12
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            coef_we,
  input  logic [LOGN-1:0] coef_addr,
  input  cpx_t            coef_data,
  input  logic            in_valid,
  input  cpx_t            in_data,
  input  logic            in_last,
  output logic            out_valid,
  output cpx_t            out_data,
  output logic            out_last
);

  logic [LOGN-1:0] k;
  logic            v1;
  logic [2:0]      last_d;
  cpx_t            x1, h;

  dp_ram #(.DEPTH(1 << LOGN), .WIDTH($bits(cpx_t))) u_coef (
    .clk(clk), .we(coef_we), .waddr(coef_addr), .wdata(coef_data),
    .raddr(k), .rdata(h)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k      <= '0;
      v1     <= 1'b0;
      last_d <= '0;
    end else begin
      if (in_valid) k <= in_last ? '0 : k + 1'b1;
      v1     <= in_valid;
      last_d <= {last_d[1:0], in_valid && in_last};
    end
  end

  always_ff @(posedge clk) x1 <= in_data;

  fp_cmul u_mul (
    .clk(clk), .rst_n(rst_n), .in_valid(v1), .a(x1), .b(h),
    .out_valid(out_valid), .y(out_data)
  );

  assign out_last = last_d[2];

endmodule
