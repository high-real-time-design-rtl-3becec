// cache_unit1: turns the memory read streams into parallel butterfly inputs.
//
// Pipeline mode (paper Sec. 3.1 (iii), Fig. 5): each memory delivers the four
// operands of one butterfly on four consecutive cycles, RAM r one cycle after
// RAM r-1. A four-entry buffer per memory collects them; when operand 3 of
// memory r arrives, the four operands are registered as one butterfly input
// tagged with the set number r and the butterfly index. Because of the
// one-cycle stagger, sets 0, 1, 2, 3 complete on consecutive cycles and the
// butterfly receives one input every cycle. The twiddle factors are captured
// when set 0 completes and reused for sets 1..3 (the four sets share them).
// Parallel mode (Sec. 3.3, Fig. 6): the four memories are read at the same
// address; their words go straight to the butterfly input with the twiddles.
//
// Inputs rd_en/rd_q/rd_b are those that went with the addresses; they are
// delayed here by the memories' one-cycle read latency. The registered outputs
// are the butterfly input registers (Bf_Reg_In in the paper's timing figures).
module cache_unit1
  import dpc_pkg::*;
#(
  parameter int unsigned LOG2L = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             par_mode,
  input  logic             rd_en [4],
  input  logic [1:0]       rd_q  [4],
  input  logic [LOG2L-1:0] rd_b  [4],
  input  cpx_t             rdata [4],
  input  cpx_t             tw    [1:3],
  output logic             bf_valid,
  output logic [LOG2L+1:0] bf_tag,
  output cpx_t             bf_x  [4],
  output cpx_t             bf_w  [1:3],
  output logic             busy
);

  logic             rv [4];
  logic [1:0]       rq [4];
  logic [LOG2L-1:0] rb [4];
  cpx_t             col [4][3];
  cpx_t             tw_hold [1:3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 4; r++) begin
        rv[r] <= 1'b0;
        rq[r] <= '0;
        rb[r] <= '0;
      end
    end else begin
      rv <= rd_en;
      rq <= rd_q;
      rb <= rd_b;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bf_valid <= 1'b0;
      bf_tag   <= '0;
    end else begin
      bf_valid <= 1'b0;
      if (par_mode) begin
        if (rv[0]) begin
          bf_valid <= 1'b1;
          bf_tag   <= {2'b00, rb[0]};
        end
      end else begin
        for (int r = 0; r < 4; r++)
          if (rv[r] && rq[r] == 2'd3) begin
            bf_valid <= 1'b1;
            bf_tag   <= {2'(r), rb[r]};
          end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (par_mode) begin
      if (rv[0]) begin
        bf_x <= rdata;
        bf_w <= tw;
      end
    end else begin
      for (int r = 0; r < 4; r++) begin
        if (rv[r]) begin
          if (rq[r] != 2'd3) begin
            col[r][rq[r]] <= rdata[r];
          end else begin
            bf_x[0] <= col[r][0];
            bf_x[1] <= col[r][1];
            bf_x[2] <= col[r][2];
            bf_x[3] <= rdata[r];
            if (r == 0) begin
              tw_hold <= tw;
              bf_w    <= tw;
            end else begin
              bf_w    <= tw_hold;
            end
          end
        end
      end
    end
  end

  assign busy = rv[0] | rv[1] | rv[2] | rv[3] | bf_valid;

  // the stagger guarantees at most one set completes per cycle
  property p_one_set;
    @(posedge clk) disable iff (!rst_n)
      !par_mode |-> $countones({rv[0] && rq[0] == 2'd3, rv[1] && rq[1] == 2'd3,
                                rv[2] && rq[2] == 2'd3, rv[3] && rq[3] == 2'd3}) <= 1;
  endproperty
  a_one_set: assert property (p_one_set);

endmodule
