// sample_hold_bank: behavioural model (not synthesizable) of the 64 capacitive
// storage elements and their low-leakage buffer amplifiers.
//
// While a channel's demultiplexer output is connected (conn[i]) its capacitor
// follows the DAC voltage; when the connection opens, the capacitor holds the last
// value and the buffer keeps driving it. Leakage, droop and the 10 mA drive limit
// are not modelled. All holds start at 0 V. The latch on each 'v' is intended: it
// is the hold capacitor.
module sample_hold_bank (
  input  real         vin [64],
  input  logic [63:0] conn,
  output real         vhold [64]
);

  for (genvar i = 0; i < 64; i++) begin : g_ch
    real v;
    initial v = 0.0;
    always_latch begin
      if (conn[i]) v = vin[i];
    end
    assign vhold[i] = v;
  end

endmodule
