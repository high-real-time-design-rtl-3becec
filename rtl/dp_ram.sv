// dp_ram: simple dual-port memory, one write port and one read port.
//
// This is one of the data memories RAM0..RAM3 (1024 words of one complex
// single-precision sample, 64 bits, i.e. 64 Kbit as in the paper), and with
// DEPTH = 4096 also the matched-filter coefficient store. The read is
// synchronous (data one cycle after the address) and returns the old contents
// when the same address is written in the same cycle. Contents are not reset.
module dp_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
