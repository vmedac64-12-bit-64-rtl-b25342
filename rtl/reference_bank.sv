// reference_bank: behavioural model (not synthesizable) of the board's bank of
// precision voltage references that feed the DAC's reference multiplexer.
//
// The block diagram shows three analog lines from the reference bank into the
// eight-input reference multiplexer. The output ranges the board offers (0..+5 V,
// 0..+10 V, +-2.5 V, +-5 V, +-10 V, with unipolar or bipolar chosen by jumper) are
// covered by references of 2.5 V, 5 V and 10 V, which is what this model supplies;
// the values are inferred from those ranges, not given. Voltages are in volts.
module reference_bank #(
  parameter real VREF0 = 2.5,
  parameter real VREF1 = 5.0,
  parameter real VREF2 = 10.0
) (
  output real vref [3]
);

  assign vref[0] = VREF0;
  assign vref[1] = VREF1;
  assign vref[2] = VREF2;

endmodule
