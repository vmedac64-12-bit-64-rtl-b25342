// channel_decoder: the one-of-64 output channel decoder of the analog distributor.
//
// The 64 sample-and-hold inputs are reached through eight 8-channel analog
// demultiplexers. All eight share the address lines MUX_A2..MUX_A0, which carry
// the low three bits of the channel number; the high three bits select which of
// the eight enables MUX_EN1..MUX_EN8 is raised (mux_en[0] is MUX_EN1). The enable
// is raised only while the refresh controller holds its sample window open, so the
// demultiplexer connects the DAC to a storage capacitor only after the DAC has
// settled. Purely combinational.
//
// The names MUX_EN1 and MUX_A0..MUX_A2 and their behaviour for the first channels
// follow the board's timing diagram; the split into eight 8-way demultiplexers is
// inferred from those names.
module channel_decoder #(
  parameter int unsigned NUM_CH = 64,
  parameter int unsigned A_W    = 3,
  parameter int unsigned CH_W   = $clog2(NUM_CH),
  parameter int unsigned NUM_EN = NUM_CH >> A_W
) (
  input  logic [CH_W-1:0]   ch,
  input  logic              window,
  output logic [A_W-1:0]    mux_a,
  output logic [NUM_EN-1:0] mux_en
);

  always_comb begin
    mux_a  = ch[A_W-1:0];
    mux_en = '0;
    if (window) mux_en[ch[CH_W-1:A_W]] = 1'b1;
  end

endmodule
