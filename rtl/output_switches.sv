// output_switches: behavioural model (not synthesizable) of the analog switches
// between the 64 output buffers and the front panel connectors.
//
// All 64 switches follow the single digital line from the CSR's OUTPUT ENABLE
// bit, as the block diagram draws it. A closed switch passes the buffer voltage;
// an open one disconnects the output from the field, which this model reports as
// closed = 0 and 0 V. Switch resistance is not modelled.
module output_switches (
  input  real  vin [64],
  input  logic enable,
  output logic closed,
  output real  vout [64]
);

  assign closed = enable;

  for (genvar i = 0; i < 64; i++) begin : g_sw
    assign vout[i] = enable ? vin[i] : 0.0;
  end

endmodule
