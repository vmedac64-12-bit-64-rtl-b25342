// test_memory: a scratch RAM the VME host can write and read back to test the
// board's VME interface without touching the analog outputs.
//
// The board's block diagram shows a test memory hanging off the VME slave
// interface but gives neither its size nor its use; this design makes it a
// 1024 x 16-bit single-port RAM with byte enables (D08 even/odd writes) and a
// synchronous read that returns data on the clock after the address.
module test_memory #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wr,
  input  logic [1:0]       be,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  localparam int unsigned BW = WIDTH / 2;

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (wr) begin
      if (be[0]) mem[addr][BW-1:0]     <= wdata[BW-1:0];
      if (be[1]) mem[addr][WIDTH-1:BW] <= wdata[WIDTH-1:BW];
    end
    rdata <= mem[addr];
  end

endmodule
