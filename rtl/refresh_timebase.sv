// refresh_timebase: divides the FPGA clock down to the 0.5 us tick that paces the
// refresh sequence.
//
// The DAC timing diagram is drawn against a 1 MHz clock and contains a 0.5 us
// write pulse, so the refresh controller counts half periods of that clock: one
// tick every 0.5 us (2 MHz). The FPGA clock frequency is not given; the default of
// 16 MHz is this design's choice, and any clock that is a whole multiple of 2 MHz
// works. The tick is a one-clock-wide enable pulse.
module refresh_timebase #(
  parameter int unsigned CLK_HZ  = 16_000_000,
  parameter int unsigned TICK_HZ = 2_000_000
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  localparam int unsigned DIV = CLK_HZ / TICK_HZ;
  localparam int unsigned CW  = (DIV > 1) ? $clog2(DIV) : 1;

  initial begin
    assert (DIV >= 1 && DIV * TICK_HZ == CLK_HZ)
      else $error("CLK_HZ must be a whole multiple of TICK_HZ");
  end

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

endmodule
