// tb_cache_unit1: drives cache unit 1 with the read pattern of the memory
// control unit (L = 16) and checks the butterfly inputs it forms.
// Pipeline mode: RAM r reads operand q of butterfly b at cycle 4b + q + r; each
// read word is a unique code of (r, b, q) and the twiddle table returns a code
// of b one cycle after RAM0's address. Expected: one butterfly per cycle, in
// the order (set 0, b), (set 1, b), (set 2, b), (set 3, b), (set 0, b+1), ...,
// each two cycles after its last operand's address, with operands in order,
// tag {r, b} and the twiddles of b. Parallel mode: the four words read at
// address c form butterfly c two cycles later.
module tb_cache_unit1;
  import dpc_pkg::*;

  localparam int LOG2L = 4;
  localparam int L     = 1 << LOG2L;

  logic clk = 0, rst_n = 0, par_mode = 0;
  logic rd_en [4];
  logic [1:0] rd_q [4];
  logic [LOG2L-1:0] rd_b [4];
  cpx_t rdata [4];
  cpx_t tw [1:3];
  logic bf_valid, busy;
  logic [LOG2L+1:0] bf_tag;
  cpx_t bf_x [4];
  cpx_t bf_w [1:3];
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;

  cache_unit1 #(.LOG2L(LOG2L)) dut (
    .clk(clk), .rst_n(rst_n), .par_mode(par_mode), .rd_en(rd_en), .rd_q(rd_q), .rd_b(rd_b),
    .rdata(rdata), .tw(tw), .bf_valid(bf_valid), .bf_tag(bf_tag), .bf_x(bf_x), .bf_w(bf_w), .busy(busy)
  );

  function automatic cpx_t code(int r, int b, int q);
    code.re = 32'((r << 16) | (b << 4) | q);
    code.im = ~code.re;
  endfunction
  function automatic cpx_t twc(int b, int p);
    twc.re = 32'(32'h1000 + b * 4 + p);
    twc.im = 32'(32'h2000 + b * 4 + p);
  endfunction

  // memory and twiddle-table models: registered reads
  logic pen [4]; logic [1:0] pq [4]; logic [LOG2L-1:0] pb [4];
  always @(posedge clk) begin
    for (int r = 0; r < 4; r++) begin
      rdata[r] <= code(r, int'(rd_b[r]), int'(rd_q[r]));
    end
    for (int p = 1; p <= 3; p++) tw[p] <= twc(int'(rd_b[0]), p);
    cyc++;
  end

  int t0;
  int exp_r [$], exp_b [$], exp_t [$];

  initial begin
    for (int r = 0; r < 4; r++) begin rd_en[r] = 0; rd_q[r] = 0; rd_b[r] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // pipeline mode
    t0 = cyc;
    for (int t = 0; t < L + 3; t++) begin
      for (int r = 0; r < 4; r++) begin
        int c;
        c = t - r;
        rd_en[r] <= (c >= 0 && c < L);
        rd_q[r]  <= 2'((c >= 0) ? c % 4 : 0);
        rd_b[r]  <= LOG2L'((c >= 0) ? c / 4 : 0);
        if (c >= 0 && c < L && c % 4 == 3) begin
          exp_r.push_back(r); exp_b.push_back(c / 4); exp_t.push_back(cyc + 4);
        end
      end
      @(posedge clk);
    end
    for (int r = 0; r < 4; r++) rd_en[r] <= 0;
    repeat (4) @(posedge clk);
    // parallel mode
    par_mode <= 1;
    @(posedge clk);
    for (int t = 0; t < L; t++) begin
      for (int r = 0; r < 4; r++) begin
        rd_en[r] <= 1; rd_q[r] <= 0; rd_b[r] <= LOG2L'(t);
      end
      exp_r.push_back(-1); exp_b.push_back(t); exp_t.push_back(cyc + 4);
      @(posedge clk);
    end
    for (int r = 0; r < 4; r++) rd_en[r] <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_r.size() != 0 || busy) begin failures++; $display("%0d butterflies missing", exp_r.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && bf_valid) begin
    int r, b, t;
    bit bad;
    bad = 0;
    if (exp_r.size() == 0) bad = 1;
    else begin
      r = exp_r.pop_front(); b = exp_b.pop_front(); t = exp_t.pop_front();
      if (cyc != t) bad = 1;  // sampled at the edge after the output register loads
      if (r >= 0) begin
        if (bf_tag != {2'(r), LOG2L'(b)}) bad = 1;
        for (int q = 0; q < 4; q++) if (bf_x[q] != code(r, b, q)) bad = 1;
      end else begin
        if (bf_tag[LOG2L-1:0] != LOG2L'(b)) bad = 1;
        for (int q = 0; q < 4; q++) if (bf_x[q] != code(q, b, 0)) bad = 1;
      end
      for (int p = 1; p <= 3; p++) if (bf_w[p] != twc(b, p)) bad = 1;
    end
    checks++;
    if (bad) begin
      failures++;
      if (failures < 10) $display("cycle %0d: butterfly tag %h x0 %h w1 %h wrong", cyc, bf_tag, bf_x[0], bf_w[1]);
    end
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
