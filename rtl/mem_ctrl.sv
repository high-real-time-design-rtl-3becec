// mem_ctrl: control unit for the four data memories of the FFT engine.
//
// After `start` it runs LOG4L pipeline stages and one parallel stage, each as
// an issue phase followed by a drain phase (wait until `pipe_busy` is low, so
// the next stage reads what this one wrote in place).
//
// Pipeline stage s (the four L-point FFTs, paper Sec. 3.2 / Fig. 5): RAM0 is read
// at one address per cycle, the four operands of butterfly b one after the
// other (operand q = c mod 4, b = c / 4). RAM1..RAM3 repeat the same address
// sequence one, two and three cycles later, so the four sets share addresses
// and twiddle factors. An issue phase lasts L + 3 cycles.
// Parallel stage (paper Sec. 3.3 / Fig. 6): all four memories are read at the
// same address k0 = c each cycle; L cycles.
//
// Each read carries its operand index and butterfly index (rd_q, rd_b) to the
// cache unit. The twiddle exponents for operands 1..3 go to the twiddle table
// in the same cycle as RAM0's address. `stage` and `par_mode` stay stable
// through a stage's drain for the write-back addressing. `done` pulses one
// cycle when the last stage has drained. The stage order and the drain rule
// are this design's; the paper gives the access orders.
module mem_ctrl
  import dpc_pkg::*;
#(
  parameter int unsigned LOG4L = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                pipe_busy,
  output logic                busy,
  output logic                done,
  output logic [2:0]          stage,
  output logic                par_mode,
  output logic                rd_en   [4],
  output logic [2*LOG4L-1:0]  rd_addr [4],
  output logic [1:0]          rd_q    [4],
  output logic [2*LOG4L-1:0]  rd_b    [4],
  output logic [2*LOG4L+1:0]  tw_idx  [1:3]
);

  localparam int unsigned LOG2L = 2 * LOG4L;
  localparam int unsigned L     = 1 << LOG2L;
  localparam int unsigned LOGN  = LOG2L + 2;

  typedef enum logic [1:0] {IDLE, ISSUE, DRAIN} state_t;
  state_t state;

  logic [LOG2L+1:0] c;
  logic             en0;
  logic [LOG2L-1:0] addr0, b0;
  logic [1:0]       q0;
  logic             en_d   [1:3];
  logic [LOG2L-1:0] addr_d [1:3];
  logic [LOG2L-1:0] b_d    [1:3];
  logic [1:0]       q_d    [1:3];
  logic             last_issue;

  // RAM0 read of this cycle
  always_comb begin
    en0   = (state == ISSUE) && (c < (LOG2L+2)'(L));
    if (par_mode) begin
      b0    = c[LOG2L-1:0];
      q0    = 2'd0;
      addr0 = c[LOG2L-1:0];
    end else begin
      b0    = {2'b00, c[LOG2L-1:2]};
      q0    = c[1:0];
      addr0 = LOG2L'(op_addr(int'(stage), 16'(b0), q0));
    end
    for (int q = 1; q <= 3; q++)
      tw_idx[q] = par_mode ? LOGN'(q * int'(c[LOG2L-1:0]))
                           : LOGN'(tw_exp(int'(stage), LOG4L, 16'(b0), 2'(q)));
  end

  assign last_issue = par_mode ? (c == (LOG2L+2)'(L - 1)) : (c == (LOG2L+2)'(L + 2));

  // same sequence one, two, three cycles later for RAM1..RAM3
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 1; r <= 3; r++) begin
        en_d[r]   <= 1'b0;
        addr_d[r] <= '0;
        b_d[r]    <= '0;
        q_d[r]    <= '0;
      end
    end else begin
      en_d[1] <= en0 && !par_mode;  addr_d[1] <= addr0;     b_d[1] <= b0;     q_d[1] <= q0;
      en_d[2] <= en_d[1];           addr_d[2] <= addr_d[1]; b_d[2] <= b_d[1]; q_d[2] <= q_d[1];
      en_d[3] <= en_d[2];           addr_d[3] <= addr_d[2]; b_d[3] <= b_d[2]; q_d[3] <= q_d[2];
    end
  end

  always_comb begin
    rd_en[0] = en0; rd_addr[0] = addr0; rd_b[0] = b0; rd_q[0] = q0;
    for (int r = 1; r <= 3; r++) begin
      if (par_mode) begin
        rd_en[r] = en0; rd_addr[r] = addr0; rd_b[r] = b0; rd_q[r] = q0;
      end else begin
        rd_en[r] = en_d[r]; rd_addr[r] = addr_d[r]; rd_b[r] = b_d[r]; rd_q[r] = q_d[r];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      c        <= '0;
      stage    <= '0;
      par_mode <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          state    <= ISSUE;
          c        <= '0;
          stage    <= '0;
          par_mode <= (LOG4L == 0);
        end
        ISSUE: begin
          c <= c + 1'b1;
          if (last_issue) state <= DRAIN;
        end
        DRAIN: if (!pipe_busy && !en_d[1] && !en_d[2] && !en_d[3]) begin
          if (par_mode) begin
            state <= IDLE;
            done  <= 1'b1;
          end else begin
            state    <= ISSUE;
            c        <= '0;
            stage    <= stage + 1'b1;
            par_mode <= (stage + 1'b1 == 3'(LOG4L));
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

endmodule
