// tb_dp_ram: fills the 1024 x 64 memory with random words, reads every address
// back (data one cycle after the address), then writes and reads the same
// address in one cycle and expects the old word (read before write).
module tb_dp_ram;

  logic        clk = 0, we = 0;
  logic [9:0]  waddr = '0, raddr = '0;
  logic [63:0] wdata = '0, rdata;
  logic [63:0] model [1024];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  dp_ram #(.DEPTH(1024), .WIDTH(64)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  initial begin
    for (int i = 0; i < 1024; i++) begin
      model[i] = {$urandom, $urandom};
      we <= 1; waddr <= 10'(i); wdata <= model[i];
      @(posedge clk);
    end
    we <= 0;
    for (int i = 0; i < 1024; i++) begin
      raddr <= 10'(1023 - i);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[1023 - i]) begin
        failures++;
        if (failures < 10) $display("addr %0d got %h expected %h", 1023 - i, rdata, model[1023 - i]);
      end
    end
    // read and write the same address in one cycle
    for (int i = 0; i < 16; i++) begin
      we <= 1; waddr <= 10'(i * 7); raddr <= 10'(i * 7); wdata <= ~model[i * 7];
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[i * 7]) failures++;
      model[i * 7] = ~model[i * 7];
    end
    we <= 0; raddr <= 10'(7);
    @(posedge clk); #1;
    checks++;
    if (rdata !== model[7]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
