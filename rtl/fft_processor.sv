// fft_processor: reconfigurable N-point FFT/IFFT processor with two memory banks.
//
// One fft_engine (single radix-4 butterfly, "pipeline and parallel" memory
// access) works on banks of four 1024-word dual-port memories. A frame of N
// samples streams in (in_valid/in_ready, one sample per cycle) through the
// fft_loader, which selects FFT or IFFT with in_fft_mode (high = FFT, low =
// IFFT, as the paper's control signal). When a frame is complete the engine
// transforms its bank in place; then, when out_en allows, the fft_unloader
// streams the result out in natural order (out_valid, out_last) with the
// frame's mode on out_fft_mode.
//
// Two banks are used in turn (load pointer, run pointer and unload pointer
// each toggle per frame), so one bank can be unloaded while the other is
// loaded. The pulse-compression top relies on this: the spectrum leaving one
// bank is multiplied and written straight into the other as IFFT input. The
// paper does not say how its memories are shared between these steps; the
// second bank and the per-bank state are this design's choice.
// Bank states: FREE -> LOAD -> QUEUED -> RUN -> DONE -> UNLOAD -> FREE.
module fft_processor
  import dpc_pkg::*;
#(
  parameter int unsigned LOG4L = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  cpx_t in_data,
  input  logic in_fft_mode,
  input  logic out_en,
  output logic out_valid,
  output cpx_t out_data,
  output logic out_last,
  output logic out_fft_mode,
  output logic eng_busy,
  output logic eng_done
);

  localparam int unsigned LOG2L = 2 * LOG4L;
  localparam int unsigned L     = 1 << LOG2L;

  typedef enum logic [2:0] {FREE, LOAD, QUEUED, RUN, DONE, UNLOAD} bank_st_t;

  bank_st_t st   [2];
  logic     mode [2];
  logic     ld_ptr, run_ptr, ul_ptr;
  logic     accept, ld_last;
  logic     eng_start, ul_start, ul_active, ul_done;

  // loader
  logic             ld_we [4];
  logic             ld_wbank;
  logic [LOG2L-1:0] ld_waddr;
  cpx_t             ld_wdata;

  // engine
  logic [LOG2L-1:0] e_raddr [4];
  cpx_t             e_rdata [4];
  logic             e_we    [4];
  logic [LOG2L-1:0] e_waddr [4];
  cpx_t             e_wdata [4];

  // unloader
  logic [LOG2L-1:0] u_raddr;
  cpx_t             u_rdata [4];

  // memories
  logic             m_we    [2][4];
  logic [LOG2L-1:0] m_waddr [2][4];
  cpx_t             m_wdata [2][4];
  logic [LOG2L-1:0] m_raddr [2][4];
  cpx_t             m_rdata [2][4];

  assign in_ready = (st[ld_ptr] == FREE) || (st[ld_ptr] == LOAD);
  assign accept   = in_valid && in_ready;

  fft_loader #(.LOG4L(LOG4L)) u_ld (
    .clk(clk), .rst_n(rst_n), .in_valid(accept), .in_data(in_data),
    .fft_mode(in_fft_mode), .bank(ld_ptr), .last(ld_last), .count(),
    .we(ld_we), .wbank(ld_wbank), .waddr(ld_waddr), .wdata(ld_wdata)
  );

  fft_engine #(.LOG4L(LOG4L)) u_eng (
    .clk(clk), .rst_n(rst_n), .start(eng_start), .busy(eng_busy), .done(eng_done),
    .rd_addr(e_raddr), .rdata(e_rdata), .we(e_we), .waddr(e_waddr), .wdata(e_wdata)
  );

  fft_unloader #(.LOG4L(LOG4L)) u_ul (
    .clk(clk), .rst_n(rst_n), .start(ul_start), .fft_mode(mode[ul_ptr]),
    .active(ul_active), .raddr(u_raddr), .rdata(u_rdata),
    .out_valid(out_valid), .out_data(out_data), .out_last(out_last), .done(ul_done)
  );

  // memory port multiplexing
  for (genvar p = 0; p < 2; p++) begin : g_bank
    for (genvar r = 0; r < 4; r++) begin : g_ram
      always_comb begin
        if (ld_we[r] && ld_wbank == 1'(p)) begin
          m_we[p][r]    = 1'b1;
          m_waddr[p][r] = ld_waddr;
          m_wdata[p][r] = ld_wdata;
        end else begin
          m_we[p][r]    = e_we[r] && (st[p] == RUN);
          m_waddr[p][r] = e_waddr[r];
          m_wdata[p][r] = e_wdata[r];
        end
        m_raddr[p][r] = (st[p] == RUN) ? e_raddr[r] : u_raddr;
      end

      dp_ram #(.DEPTH(L), .WIDTH($bits(cpx_t))) u_ram (
        .clk(clk), .we(m_we[p][r]), .waddr(m_waddr[p][r]), .wdata(m_wdata[p][r]),
        .raddr(m_raddr[p][r]), .rdata(m_rdata[p][r])
      );
    end
  end

  always_comb
    for (int r = 0; r < 4; r++) begin
      e_rdata[r] = m_rdata[run_ptr][r];
      u_rdata[r] = m_rdata[ul_ptr][r];
    end

  assign ul_start = !ul_active && out_en && (st[ul_ptr] == DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st[0]     <= FREE;
      st[1]     <= FREE;
      mode[0]   <= 1'b1;
      mode[1]   <= 1'b1;
      ld_ptr    <= 1'b0;
      run_ptr   <= 1'b0;
      ul_ptr    <= 1'b0;
      eng_start <= 1'b0;
      out_fft_mode <= 1'b1;
    end else begin
      eng_start <= 1'b0;
      // loading
      if (accept) begin
        if (st[ld_ptr] == FREE) begin
          st[ld_ptr]   <= LOAD;
          mode[ld_ptr] <= in_fft_mode;
        end
        if (ld_last) begin
          st[ld_ptr] <= QUEUED;
          ld_ptr     <= ~ld_ptr;
        end
      end
      // transform
      if (!eng_busy && !eng_start && st[run_ptr] == QUEUED) begin
        eng_start    <= 1'b1;
        st[run_ptr]  <= RUN;
      end
      if (eng_done) begin
        st[run_ptr] <= DONE;
        run_ptr     <= ~run_ptr;
      end
      // unloading
      if (ul_start) begin
        st[ul_ptr]   <= UNLOAD;
        out_fft_mode <= mode[ul_ptr];
      end
      if (ul_done) begin
        st[ul_ptr] <= FREE;
        ul_ptr     <= ~ul_ptr;
      end
    end
  end

  // a bank being transformed is never written by the loader
  a_no_load_into_run: assert property (@(posedge clk) disable iff (!rst_n)
    !(ld_we[0] | ld_we[1] | ld_we[2] | ld_we[3]) || st[ld_wbank] != RUN);

endmodule
