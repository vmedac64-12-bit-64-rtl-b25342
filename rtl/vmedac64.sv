// vmedac64: the VMEDAC64 board, a 64-channel, 12-bit analog output module for
// VMEbus, from the VME connector to the 64 front panel outputs.
//
// One FPGA (vmedac64_fpga) holds the VME slave, the dual-port DAC data RAM, the
// test memory, the CSR and the refresh control logic. A single 12-bit multiplying
// DAC (mdac12) converts each channel's code in turn, using a reference picked by
// the 8-to-1 reference multiplexer (ref_mux) from the reference bank
// (reference_bank) under REF_SEL[2:0]. The analog distributor (channel decoder in
// the FPGA, analog_demux outside) routes the DAC output to the channel's
// sample-and-hold buffer (sample_hold_bank), and the output switches
// (output_switches), all controlled by OUTPUT ENABLE, connect the buffers to the
// front panel: channels 0..31 on P3, 32..63 on P4.
//
// The analog parts are behavioural models with voltages as 'real' (volts), so this
// module is for simulation; vmedac64_fpga is the synthesizable part. The bus
// buffer chips between the VMEbus and the FPGA and the DC/DC converters that make
// the isolated +-15 V have no logic function and are not modelled: the VME
// signals appear here already split into inputs, outputs and output enables, as
// the buffers present them to the FPGA. 'bipolar' is the output polarity jumper.
module vmedac64 #(
  parameter int unsigned CLK_HZ = 16_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  board_addr,
  input  logic        bipolar,
  // VMEbus, after the buffers
  input  logic        as_n,
  input  logic [1:0]  ds_n,
  input  logic        write_n,
  input  logic        lword_n,
  input  logic        iack_n,
  input  logic        iackin_n,
  output logic        iackout_n,
  input  logic [5:0]  am,
  input  logic [23:1] addr,
  input  logic [15:0] data_in,
  output logic [15:0] data_out,
  output logic        data_oe,
  output logic        dtack_n,
  output logic [7:1]  irq_n,
  // front panel
  output real         ch_out [64],
  output logic        outputs_connected,
  // monitoring
  output logic [5:0]  cur_ch,
  output logic        sample_window,
  output logic        cycle_done,
  output real         dac_out
);

  logic [11:0] dac_data;
  logic        dac_cs_n, dac_wr_n;
  logic [2:0]  ref_sel, mux_a;
  logic [7:0]  mux_en;
  logic        output_en;

  vmedac64_fpga #(.CLK_HZ(CLK_HZ)) u_fpga (
    .clk, .rst_n, .board_addr,
    .as_n, .ds_n, .write_n, .lword_n, .iack_n, .iackin_n, .iackout_n,
    .am, .addr, .data_in, .data_out, .data_oe, .dtack_n, .irq_n,
    .dac_data, .dac_cs_n, .dac_wr_n,
    .ref_sel, .mux_a, .mux_en, .output_en,
    .cur_ch, .sample_window, .cycle_done
  );

  real vref [3];
  real mux_in [8];
  real vref_sel;

  reference_bank u_refs (.vref);

  assign mux_in[0] = vref[0];
  assign mux_in[1] = vref[1];
  assign mux_in[2] = vref[2];
  for (genvar i = 3; i < 8; i++) begin : g_nc
    assign mux_in[i] = 0.0;
  end

  ref_mux u_refmux (.vin(mux_in), .sel(ref_sel), .vout(vref_sel));

  mdac12 u_dac (
    .d(dac_data), .cs_n(dac_cs_n), .wr_n(dac_wr_n),
    .bipolar, .vref(vref_sel), .vout(dac_out)
  );

  logic [63:0] conn;
  real demux_out [64];
  real held [64];

  analog_demux u_demux (.vin(dac_out), .en(mux_en), .a(mux_a), .conn, .vout(demux_out));

  sample_hold_bank u_sh (.vin(demux_out), .conn, .vhold(held));

  output_switches u_sw (.vin(held), .enable(output_en), .closed(outputs_connected), .vout(ch_out));

endmodule
