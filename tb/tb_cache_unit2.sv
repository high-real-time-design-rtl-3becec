// tb_cache_unit2: feeds cache unit 2 with butterfly results (L = 16) and
// checks the memory writes it makes.
// Pipeline mode, stage 1: results arrive one per cycle for sets 0..3 of each
// butterfly b. Set r's outputs y0..y3 must be written to RAM r on the four
// cycles after the result, operand q at g*4^(s+1) + q*4^s + j (b = g*4^s + j).
// Parallel mode: output y_k of butterfly b goes to RAM k, address b, in the
// cycle the result is valid.
module tb_cache_unit2;
  import dpc_pkg::*;

  localparam int LOG2L = 4;
  localparam int L     = 1 << LOG2L;
  localparam int S     = 1;

  logic clk = 0, rst_n = 0, par_mode = 0, bf_valid = 0, busy;
  logic [2:0] stage = 3'(S);
  logic [LOG2L+1:0] bf_tag = '0;
  cpx_t bf_y [4];
  logic we [4];
  logic [LOG2L-1:0] waddr [4];
  cpx_t wdata [4];
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;

  cache_unit2 #(.LOG2L(LOG2L)) dut (
    .clk(clk), .rst_n(rst_n), .par_mode(par_mode), .stage(stage), .bf_valid(bf_valid),
    .bf_tag(bf_tag), .bf_y(bf_y), .we(we), .waddr(waddr), .wdata(wdata), .busy(busy)
  );

  function automatic cpx_t code(int r, int b, int q);
    code.re = 32'((r << 16) | (b << 4) | q);
    code.im = ~code.re;
  endfunction

  // expected writes per RAM: (cycle, address, data)
  int   e_cyc [4][$], e_addr [4][$];
  cpx_t e_dat [4][$];

  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n)
    for (int r = 0; r < 4; r++) if (we[r]) begin
      checks++;
      if (e_cyc[r].size() == 0 || e_cyc[r][0] != cyc || e_addr[r][0] != int'(waddr[r]) || e_dat[r][0] != wdata[r]) begin
        failures++;
        if (failures < 10) $display("cycle %0d RAM%0d write addr %0d data %h unexpected (exp cyc %0d addr %0d)", cyc, r, waddr[r], wdata[r], e_cyc[r][0], e_addr[r][0]);
      end
      if (e_cyc[r].size() != 0) begin
        void'(e_cyc[r].pop_front()); void'(e_addr[r].pop_front()); void'(e_dat[r].pop_front());
      end
    end

  initial begin
    for (int q = 0; q < 4; q++) bf_y[q] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int b = 0; b < L / 4; b++)
      for (int r = 0; r < 4; r++) begin
        int span, g, j;
        span = 1 << (2 * S); g = b / span; j = b % span;
        bf_valid <= 1; bf_tag <= {2'(r), LOG2L'(b)};
        for (int q = 0; q < 4; q++) begin
          bf_y[q] <= code(r, b, q);
          e_cyc[r].push_back(cyc + 3 + q);  // writes start the cycle after the result register
          e_addr[r].push_back(g * span * 4 + q * span + j);
          e_dat[r].push_back(code(r, b, q));
        end
        @(posedge clk);
      end
    bf_valid <= 0;
    repeat (6) @(posedge clk);
    par_mode <= 1;
    @(posedge clk);
    for (int b = 0; b < L; b++) begin
      bf_valid <= 1; bf_tag <= {2'b00, LOG2L'(b)};
      for (int q = 0; q < 4; q++) begin
        bf_y[q] <= code(q, b, 0);
        e_cyc[q].push_back(cyc + 2);  // same cycle as the result
        e_addr[q].push_back(b);
        e_dat[q].push_back(code(q, b, 0));
      end
      @(posedge clk);
    end
    bf_valid <= 0;
    repeat (4) @(posedge clk);
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (e_cyc[r].size() != 0) begin failures++; $display("RAM%0d: %0d writes missing", r, e_cyc[r].size()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
