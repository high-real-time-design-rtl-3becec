// tb_mem_ctrl: runs the memory control unit for a 64-point transform
// (LOG4L = 2, L = 16) with a modelled pipeline that stays busy for eight
// cycles after the last read, and checks, cycle by cycle:
//  - pipeline stages: RAM0 reads operand q of butterfly b = g*4^s + j at
//    g*4^(s+1) + q*4^s + j; RAM r repeats RAM0's address, q and b r cycles later;
//    twiddle exponents are q*j*4^(LOG4L-s);
//  - the parallel stage: all four RAMs read address c at once, twiddle q*c;
//  - every address is read exactly once per RAM and stage, the stage number
//    only advances once the pipeline is idle, and `done` pulses once.
module tb_mem_ctrl;

  localparam int LOG4L = 2;
  localparam int L     = 1 << (2 * LOG4L);

  logic clk = 0, rst_n = 0, start = 0, pipe_busy, busy, done, par_mode;
  logic [2:0] stage;
  logic rd_en [4];
  logic [2*LOG4L-1:0] rd_addr [4];
  logic [1:0] rd_q [4];
  logic [2*LOG4L-1:0] rd_b [4];
  logic [2*LOG4L+1:0] tw_idx [1:3];
  int checks = 0, failures = 0;
  int busy_hold = 0, n_done = 0;
  int seen [5][4][L];
  int c0;             // RAM0 read counter within the stage
  int hist_addr [4][$], hist_q [4][$], hist_b [4][$];

  always #5 clk = ~clk;

  mem_ctrl #(.LOG4L(LOG4L)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .pipe_busy(pipe_busy), .busy(busy), .done(done),
    .stage(stage), .par_mode(par_mode), .rd_en(rd_en), .rd_addr(rd_addr), .rd_q(rd_q),
    .rd_b(rd_b), .tw_idx(tw_idx)
  );

  assign pipe_busy = busy_hold > 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("%0t: %s", $time, msg);
  endtask

  int last_stage = 0;
  always @(posedge clk) if (rst_n) begin
    busy_hold <= (rd_en[0] || rd_en[1] || rd_en[2] || rd_en[3]) ? 8 : (busy_hold > 0 ? busy_hold - 1 : 0);
    if (done && rst_n) n_done++;
    if (int'(stage) != last_stage) begin
      checks++;
      if (pipe_busy) fail("stage advanced while busy");
      last_stage = int'(stage);
      c0 = 0;
    end
    if (par_mode) begin
      if (rd_en[0]) begin
        for (int r = 0; r < 4; r++) begin
          checks++;
          if (!rd_en[r] || int'(rd_addr[r]) != c0 || int'(rd_b[r]) != c0) fail("parallel read");
          seen[stage][r][rd_addr[r]]++;
        end
        for (int q = 1; q <= 3; q++) begin
          checks++;
          if (int'(tw_idx[q]) != (q * c0) % (4 * L)) fail("parallel twiddle");
        end
        c0++;
      end
    end else begin
      if (rd_en[0]) begin
        int s, bb, q, g, j, span;
        s = int'(stage); span = 1 << (2 * s);
        bb = c0 / 4; q = c0 % 4; g = bb / span; j = bb % span;
        checks++;
        if (int'(rd_addr[0]) != g * span * 4 + q * span + j || int'(rd_q[0]) != q || int'(rd_b[0]) != bb)
          fail($sformatf("RAM0 stage %0d c=%0d addr %0d", s, c0, rd_addr[0]));
        for (int p = 1; p <= 3; p++) begin
          checks++;
          if (int'(tw_idx[p]) != p * j * (1 << (2 * (LOG4L - s)))) fail("pipeline twiddle");
        end
        c0++;
      end
      for (int r = 0; r < 4; r++) if (rd_en[r]) begin
        hist_addr[r].push_back(int'(rd_addr[r]));
        hist_q[r].push_back(int'(rd_q[r]));
        hist_b[r].push_back(int'(rd_b[r]));
        seen[stage][r][rd_addr[r]]++;
      end
      // RAM r repeats RAM0 exactly r cycles later
      for (int r = 1; r < 4; r++) if (rd_en[r]) begin
        checks++;
        if (hist_addr[r].size() > hist_addr[0].size() ||
            hist_addr[r][$] != hist_addr[0][hist_addr[r].size() - 1] ||
            hist_q[r][$] != hist_q[0][hist_q[r].size() - 1] ||
            hist_b[r][$] != hist_b[0][hist_b[r].size() - 1])
          fail($sformatf("RAM%0d does not follow RAM0", r));
      end
    end
  end

  initial begin
    c0 = 0;
    for (int s = 0; s < 5; s++) for (int r = 0; r < 4; r++) for (int a = 0; a < L; a++) seen[s][r][a] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    wait (done);
    repeat (5) @(posedge clk);
    for (int s = 0; s <= LOG4L; s++)
      for (int r = 0; r < 4; r++)
        for (int a = 0; a < L; a++) begin
          checks++;
          if (seen[s][r][a] != 1) fail($sformatf("stage %0d RAM%0d addr %0d read %0d times", s, r, a, seen[s][r][a]));
        end
    checks++;
    if (n_done != 1 || busy) fail("done/busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
