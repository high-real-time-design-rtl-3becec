// fft_engine: in-place N-point radix-4 FFT over four external memories with a
// single radix-4 butterfly (N = 4^(LOG4L+1), 4096 by default).
//
// The memories hold the input decimated by four: memory r holds the samples
// n = 4*n1 + r at address digit_rev(n1) (see fft_loader). The engine first runs
// the four independent L-point FFTs (L = N/4) in LOG4L pipelined stages: the
// control unit reads the four memories one cycle apart, cache unit 1 gathers
// each memory's four operands, the butterfly takes one set per cycle and cache
// unit 2 writes each result back, in place, one word per cycle. Then a last
// stage reads all four memories in parallel at address k0, multiplies operand
// n0 by W_N^(n0*k0) and takes the 4-point DFT, writing output k1 to memory k1
// at address k0. Afterwards memory k1, address k0 holds X(L*k1 + k0).
//
// Interface: pulse `start` with the data in place; `busy` stays high until
// `done` pulses. Memory ports are those of four simple dual-port RAMs with a
// one-cycle read latency. Time per transform is (LOG4L+1) issue phases of
// about L cycles each plus one pipeline drain per stage: 6 * 1024 + 6 * drain
// cycles for N = 4096.
module fft_engine
  import dpc_pkg::*;
#(
  parameter int unsigned LOG4L = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic [2*LOG4L-1:0]   rd_addr [4],
  input  cpx_t                 rdata   [4],
  output logic                 we      [4],
  output logic [2*LOG4L-1:0]   waddr   [4],
  output cpx_t                 wdata   [4]
);

  localparam int unsigned LOG2L = 2 * LOG4L;
  localparam int unsigned N     = 1 << (LOG2L + 2);

  logic             pipe_busy, c1_busy, bf_busy, c2_busy;
  logic [2:0]       stage;
  logic             par_mode;
  logic             rd_en [4];
  logic [1:0]       rd_q  [4];
  logic [LOG2L-1:0] rd_b  [4];
  logic [LOG2L+1:0] tw_idx [1:3];
  cpx_t             tw     [1:3];
  logic             bf_in_valid, bf_out_valid;
  logic [LOG2L+1:0] bf_in_tag, bf_out_tag;
  cpx_t             bf_x [4];
  cpx_t             bf_w [1:3];
  cpx_t             bf_y [4];

  assign pipe_busy = c1_busy | bf_busy | c2_busy;

  mem_ctrl #(.LOG4L(LOG4L)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .pipe_busy(pipe_busy),
    .busy(busy), .done(done), .stage(stage), .par_mode(par_mode),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_q(rd_q), .rd_b(rd_b), .tw_idx(tw_idx)
  );

  twiddle_rom #(.N(N)) u_tw (.clk(clk), .idx(tw_idx), .w(tw));

  cache_unit1 #(.LOG2L(LOG2L)) u_c1 (
    .clk(clk), .rst_n(rst_n), .par_mode(par_mode),
    .rd_en(rd_en), .rd_q(rd_q), .rd_b(rd_b), .rdata(rdata), .tw(tw),
    .bf_valid(bf_in_valid), .bf_tag(bf_in_tag), .bf_x(bf_x), .bf_w(bf_w),
    .busy(c1_busy)
  );

  radix4_bfly #(.TAG_W(LOG2L + 2)) u_bf (
    .clk(clk), .rst_n(rst_n), .in_valid(bf_in_valid), .in_tag(bf_in_tag),
    .x(bf_x), .w(bf_w), .out_valid(bf_out_valid), .out_tag(bf_out_tag),
    .y(bf_y), .busy(bf_busy)
  );

  cache_unit2 #(.LOG2L(LOG2L)) u_c2 (
    .clk(clk), .rst_n(rst_n), .par_mode(par_mode), .stage(stage),
    .bf_valid(bf_out_valid), .bf_tag(bf_out_tag), .bf_y(bf_y),
    .we(we), .waddr(waddr), .wdata(wdata), .busy(c2_busy)
  );

endmodule
