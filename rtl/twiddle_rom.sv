// twiddle_rom: three-port table of twiddle factors W_N^m = cos(2*pi*m/N) - j sin(2*pi*m/N).
//
// Only a quarter wave is stored: COS_TAB[i] = cos(2*pi*i/N) for i = 0..N/4,
// in single precision, computed at elaboration by a constant function. Each
// port takes an exponent m (0..N-1), splits it into a quadrant and an offset r,
// and builds cos and sin from COS_TAB[r] and COS_TAB[N/4 - r] with sign flips.
// Three ports serve operands 1..3 of a radix-4 butterfly in one cycle (the last
// FFT stage needs all three every cycle). Outputs are registered: one cycle of
// latency. The paper reads twiddle factors from a table addressed for the
// 1024-point FFT; the quarter-wave folding and the port count are this
// design's choice.
module twiddle_rom
  import dpc_pkg::*;
#(
  parameter int unsigned N = 4096
) (
  input  logic                 clk,
  input  logic [$clog2(N)-1:0] idx [1:3],
  output cpx_t                 w   [1:3]
);

  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned Q    = N / 4;

  typedef fp32_t tab_t [Q+1];

  // real -> single precision, round to nearest; used at elaboration only
  function automatic fp32_t real_to_fp32(real x);
    real         v;
    int          e;
    longint      m;
    logic        s;
    if (x == 0.0) return 32'h0;
    s = x < 0.0;
    v = s ? -x : x;
    e = 0;
    while (v >= 2.0) begin v = v / 2.0; e++; end
    while (v < 1.0)  begin v = v * 2.0; e--; end
    m = longint'($floor((v - 1.0) * 8388608.0 + 0.5));
    if (m >= 64'd8388608) begin m = 0; e++; end
    return {s, 8'(e + 127), m[22:0]};
  endfunction

  function automatic tab_t make_tab();
    tab_t t;
    for (int i = 0; i <= int'(Q); i++)
      t[i] = (i == int'(Q)) ? 32'h0 : real_to_fp32($cos(2.0 * 3.14159265358979323846 * i / N));
    return t;
  endfunction

  localparam tab_t COS_TAB = make_tab();

  for (genvar p = 1; p <= 3; p++) begin : g_port
    logic [1:0]      quad;
    logic [LOGN-2:0] r;
    fp32_t           c_r, c_c;
    cpx_t            wn;

    always_comb begin
      quad = idx[p][LOGN-1 -: 2];
      r    = {1'b0, idx[p][LOGN-3:0]};
      c_r  = COS_TAB[r];
      c_c  = COS_TAB[(LOGN-1)'(Q) - r];
      // re = cos(theta), im = -sin(theta)
      unique case (quad)
        2'd0: begin wn.re = c_r;                 wn.im = {~c_c[31], c_c[30:0]}; end
        2'd1: begin wn.re = {~c_c[31], c_c[30:0]}; wn.im = {~c_r[31], c_r[30:0]}; end
        2'd2: begin wn.re = {~c_r[31], c_r[30:0]}; wn.im = c_c;                 end
        default: begin wn.re = c_c;              wn.im = c_r;                   end
      endcase
    end

    always_ff @(posedge clk) w[p] <= wn;
  end

endmodule
