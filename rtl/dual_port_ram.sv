// dual_port_ram: the 64 x 16-bit DAC data memory that sits between the VME host
// and the refresh controller.
//
// Port A is the random-access VME port: the host writes the digital code of each
// analog output here (with byte enables, so D08 even/odd byte writes work) and can
// read it back. Port B is the DAC (refresh) port: the refresh controller reads one
// word per channel slot and sends it to the DAC. Both ports are synchronous and
// share one clock; a read returns the word on the clock after the address is
// presented. The 16-bit width and 64-word depth follow the board description; the
// synchronous single-clock form and the absence of a reset (the RAM powers up as
// the FPGA initialises it, here to zero) are this design's choices.
module dual_port_ram #(
  parameter int unsigned DEPTH  = 64,
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned AW     = $clog2(DEPTH)
) (
  input  logic             clk,
  // Port A: VME host, read/write
  input  logic             a_wr,
  input  logic [1:0]       a_be,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  // Port B: refresh controller, read only
  input  logic             b_rd,
  input  logic [AW-1:0]    b_addr,
  output logic [WIDTH-1:0] b_rdata
);

  localparam int unsigned BW = WIDTH / 2;

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (a_wr) begin
      if (a_be[0]) mem[a_addr][BW-1:0]     <= a_wdata[BW-1:0];
      if (a_be[1]) mem[a_addr][WIDTH-1:BW] <= a_wdata[WIDTH-1:BW];
    end
    a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    if (b_rd) b_rdata <= mem[b_addr];
  end

endmodule
