// ref_mux: behavioural model (not synthesizable) of the 8-to-1 analog multiplexer
// that picks the DAC reference voltage, steered by the CSR's REF_SEL[2:0].
//
// Inputs 0..2 carry the reference bank's 2.5 V, 5 V and 10 V; inputs 3..7 are
// unconnected on this board and, in this model, give 0 V. The assignment of
// references to REF_SEL codes is this design's choice. Switching is immediate.
module ref_mux (
  input  real        vin [8],
  input  logic [2:0] sel,
  output real        vout
);

  assign vout = vin[sel];

endmodule
