// mdac12: behavioural model (not synthesizable) of the board's single 12-bit
// multiplying DAC.
//
// The DAC has a parallel 12-bit data input latched by its chip select (cs_n) and
// write (wr_n) inputs: while both are low the latch is transparent, and it holds
// the code once either rises. The output is the reference voltage multiplied by
// the code. With the unipolar/bipolar jumper open the output runs from 0 to
// vref*4095/4096 (straight binary); with it set the code is read as offset binary
// and the output runs from -vref to vref*2047/2048. Settling is not modelled: the
// refresh controller's 10 us settling allowance stands for it. The latch-on-CS/WR
// interface and the offset-binary bipolar coding are assumed (common for
// multiplying DACs of this kind); the board description gives only the 12-bit
// multiplying DAC, the ranges and the jumper. The latch on 'code' is intended:
// it is the DAC's own input latch.
module mdac12 (
  input  logic [11:0] d,
  input  logic        cs_n,
  input  logic        wr_n,
  input  logic        bipolar,
  input  real         vref,
  output real         vout
);

  logic [11:0] code;

  initial code = '0;

  always_latch begin
    if (!cs_n && !wr_n) code = d;
  end

  always_comb begin
    if (bipolar) vout = vref * (real'(code) - 2048.0) / 2048.0;
    else         vout = vref * real'(code) / 4096.0;
  end

endmodule
