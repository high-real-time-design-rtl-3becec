// cache_unit2: writes butterfly results back to the memories, in place.
//
// Pipeline mode (paper Sec. 3.1 (v), Fig. 5): a result of set r (its four
// outputs y0..y3 in parallel, tag = {r, butterfly b}) is loaded into a buffer
// for memory r and written to RAM r one word per cycle over the next four
// cycles, at the addresses the operands were read from (op_addr of the current
// stage). Results of one set arrive every four cycles, so each buffer is free
// again exactly when the next one comes.
// Parallel mode (Sec. 3.3, Fig. 6): output y_k goes to RAM k at address b in
// the same cycle the result is valid.
// `busy` is high while a result is pending or being written.
module cache_unit2
  import dpc_pkg::*;
#(
  parameter int unsigned LOG2L = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             par_mode,
  input  logic [2:0]       stage,
  input  logic             bf_valid,
  input  logic [LOG2L+1:0] bf_tag,
  input  cpx_t             bf_y  [4],
  output logic             we    [4],
  output logic [LOG2L-1:0] waddr [4],
  output cpx_t             wdata [4],
  output logic             busy
);

  cpx_t             buf_y [4][4];
  logic [LOG2L-1:0] buf_b [4];
  logic [1:0]       cnt   [4];
  logic             act   [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 4; r++) begin
        act[r] <= 1'b0;
        cnt[r] <= '0;
        buf_b[r] <= '0;
      end
    end else begin
      for (int r = 0; r < 4; r++) begin
        if (act[r]) begin
          cnt[r] <= cnt[r] + 1'b1;
          if (cnt[r] == 2'd3) act[r] <= 1'b0;
        end
        if (!par_mode && bf_valid && bf_tag[LOG2L+1:LOG2L] == 2'(r)) begin
          act[r]   <= 1'b1;
          cnt[r]   <= '0;
          buf_b[r] <= bf_tag[LOG2L-1:0];
        end
      end
    end
  end

  always_ff @(posedge clk)
    for (int r = 0; r < 4; r++)
      if (!par_mode && bf_valid && bf_tag[LOG2L+1:LOG2L] == 2'(r)) buf_y[r] <= bf_y;

  always_comb begin
    for (int r = 0; r < 4; r++) begin
      if (par_mode) begin
        we[r]    = bf_valid;
        waddr[r] = bf_tag[LOG2L-1:0];
        wdata[r] = bf_y[r];
      end else begin
        we[r]    = act[r];
        waddr[r] = LOG2L'(op_addr(int'(stage), 16'(buf_b[r]), cnt[r]));
        wdata[r] = buf_y[r][cnt[r]];
      end
    end
  end

  assign busy = bf_valid | act[0] | act[1] | act[2] | act[3];

endmodule
