// analog_demux: behavioural model (not synthesizable) of the low charge injection
// analog demultiplexer of the analog distributor: eight 8-channel demultiplexers
// that connect the DAC output to one of the 64 sample-and-hold inputs.
//
// Demultiplexer k (enable en[k], MUX_EN(k+1) on the board) connects its common
// input to output 8*k + a when enabled. conn[i] tells whether output i is
// connected; a connected output carries vin, an open one is reported as 0 V (it is
// high impedance on the board, and the sample-and-hold model ignores it). Charge
// injection is not modelled.
module analog_demux (
  input  real        vin,
  input  logic [7:0] en,
  input  logic [2:0] a,
  output logic [63:0] conn,
  output real        vout [64]
);

  always_comb begin
    for (int i = 0; i < 64; i++) conn[i] = en[i / 8] && (3'(i % 8) == a);
  end

  for (genvar i = 0; i < 64; i++) begin : g_out
    assign vout[i] = conn[i] ? vin : 0.0;
  end

endmodule
