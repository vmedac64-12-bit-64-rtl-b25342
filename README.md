# VMEDAC64: a 64-channel, 12-bit analog output board for VMEbus

The VMEDAC64 puts 64 independent analog voltage outputs on a single-width 6U VME
card. It does this with **one** 12-bit multiplying DAC. The host writes a 12-bit
code for each channel into a dual-port RAM inside the FPGA. A refresh controller
then walks the 64 channels in turn, for as long as the board is powered. For each
channel it loads the channel's code into the DAC and waits for the DAC to settle.
It then connects the DAC output, through an analog demultiplexer, to that
channel's sample-and-hold capacitor. A buffer amplifier drives each capacitor's
voltage to the front panel through a switch. Each output is refreshed every
7.040 ms (142 Hz), or every 3.52 ms (284 Hz) in FAST REFRESH mode. The host never
takes part in a conversion: for the host, setting an output means writing one
register.

This repository holds:

* synthesizable SystemVerilog for everything the board's FPGA does: the VME slave
  (A24:D16:D08(EO), single cycles and BLT16 block transfers, interrupter), the
  dual-port RAM, a test memory, the control and status registers, the refresh
  controller and the one-of-64 channel decoder;
* behavioural models (using `real` voltages) of the analog parts: the reference
  bank, the reference multiplexer, the DAC, the analog demultiplexer, the 64
  sample-and-hold buffers and the output switches;
* a board-level model that wires everything from the VME signals to the 64
  output voltages, plus self-checking testbenches.

## How one DAC serves 64 outputs

This is the heart of the design (`refresh_ctrl`, `channel_decoder`).

Time is counted in ticks of 0.5 us (`refresh_timebase` divides the FPGA clock
down to 2 MHz). The board's timing is drawn against a 1 MHz clock, but its DAC
write pulse is 0.5 us long, so the counter runs at half-period resolution. Each
channel owns one *slot*:

| ticks (from slot start) | time        | what happens |
|-------------------------|-------------|--------------|
| 0 - 3                   | 0 - 2 us    | DAC chip select `dac_cs_n` low. The channel's word is on `dac_data` for the whole slot |
| 1                       | 0.5 - 1 us  | DAC write strobe `dac_wr_n` low: the DAC latches the code |
| 4 - 19                  | 2 - 10 us   | DAC output settles. The demultiplexer is off |
| 20 - 219                | 10 - 110 us | **sample window**: the channel's demultiplexer is on and its hold capacitor charges to the DAC voltage |
| 20 - 109 (FAST REFRESH) | 10 - 55 us  | shorter sample window |

So a slot is 110 us, and 64 slots make 7.040 ms. FAST REFRESH shortens only the
sample window, from 100 us to 45 us. The DAC still gets the same 10 us from chip
select to the opening of the window, and a pass takes 3.52 ms. The 2 us, 0.5 us,
8 us and 100 us intervals and both pass times are the board's. The 45 us fast
window follows from them. Where WEN sits inside CS is not specified; this design
puts it in the second half-microsecond.

**Data path.** The RAM's DAC port is read on every clock at the address of the
*next* channel. When a slot starts, the word just read goes into the DAC data
register. A host write therefore reaches its output within one pass, at most
7.040 ms later. A write that lands in the very clock of the slot change waits for
the next pass. Only bits 11:0 of the 16-bit word are converted.

**Channel decoder.** The 64 hold capacitors sit behind eight 8-way analog
demultiplexers. All eight share the address lines `mux_a[2:0]` (MUX_A0..MUX_A2),
which carry channel bits 2:0. Channel bits 5:3 pick one of eight enables,
`mux_en[7:0]` (MUX_EN1..MUX_EN8, `mux_en[0]` = MUX_EN1). An enable is high only
during the sample window, so a capacitor never sees the DAC while the DAC is
changing. Channel *n* is output `n mod 8` of demultiplexer `n / 8`.

`cycle_done` pulses for one clock when channel 63's slot ends. This is also the
interrupt source. After reset the controller starts at channel 0 on the first
tick.

Two assertions in `refresh_ctrl` guard the sequence: WEN is only ever low inside
CS, and the sample window is never open while CS is low.

## Registers and address map

The board decodes A23..A16 against an 8-bit board address (`board_addr`, from
on-board switches), so each board has a 64 KiB window. The byte offsets inside
that window are:

| offset          | register     | access | contents |
|-----------------|--------------|--------|----------|
| 0x0000 - 0x007F | DAC data RAM | R/W    | channel *n* at offset 2*n*; code in bits 11:0 (bits 15:12 are stored, not used) |
| 0x0100          | CSR          | R/W    | see below |
| 0x0102          | IRQ vector   | R/W    | bits 7:0: the status/ID returned in the IACK cycle |
| 0x0104          | status       | R      | bits 5:0 channel being refreshed, bit 8 sample window open, bit 15 interrupt pending |
| 0x0800 - 0x0FFF | test memory  | R/W    | 1024 x 16-bit scratch RAM for testing the bus interface |
| other           | none         | R/W    | reads 0, writes ignored, still acknowledged |

CSR bits (`vmedac64_pkg::csr_t`). Reset clears all of them, so the outputs start
disconnected.

| bits  | field         | meaning |
|-------|---------------|---------|
| 2:0   | REF_SEL       | reference multiplexer input: 0 = 2.5 V, 1 = 5 V, 2 = 10 V, 3..7 unconnected |
| 3     | FAST_REFRESH  | 3.52 ms pass instead of 7.040 ms |
| 4     | OUTPUT_ENABLE | closes all 64 output switches |
| 5     | IRQ_EN        | interrupt at the end of every refresh pass |
| 10:8  | IRQ_LEVEL     | VME interrupt level 1..7; 0 turns the interrupter off |
| other | reserved      | read as 0 |

Output range = reference × polarity. The polarity is set by the `bipolar` jumper
input. Unipolar gives 0 .. Vref·4095/4096 in straight binary. Bipolar gives
−Vref .. Vref·2047/2048 in offset binary. With the three references this covers
0..+5 V, 0..+10 V, ±2.5 V, ±5 V and ±10 V.

## VME slave and interrupter

`vme_slave` is a synchronous design. AS*, DS0*, DS1*, IACK* and IACKIN* each
pass through a two-flip-flop synchroniser. Address, AM, WRITE*, LWORD* and data
are sampled once the synchronised strobe shows up. The slave accepts the A24
address modifiers 0x39/0x3D (single cycles) and 0x3B/0x3F (BLT). Byte lanes
follow VME usage:

* DS1* alone is the even byte (D15..D8);
* DS0* alone is the odd byte (D7..D0);
* both together are a 16-bit word.

During a BLT16 transfer AS* stays low, and the address advances by two after
each data transfer.

Cycles with LWORD* low (D32) or with other address modifiers get no response.
The slave never drives BERR*. Signals reach the FPGA through the board's TTL bus
buffers, so the ports are split into inputs, outputs and output enables
(`data_in`, `data_out`, `data_oe`). The buffers themselves are not modelled.

Towards the board, the slave issues a local bus request (`lbus_req_t`). A write
is a single strobe, and DTACK* follows on the same clock. A read strobe returns
data one clock later; the slave then drives the data and DTACK*. DTACK* and the
data drivers are released once both data strobes are high again. A read is
acknowledged about five clocks after DS* falls: two for the synchroniser, the
rest for the access.

`vme_interrupter` is a release-on-acknowledge interrupter:

* A request sets *pending*. This pulls the IRQ line of the programmed level
  (`irq_n[1]` = IRQ1* … `irq_n[7]` = IRQ7*).
* In an IACK cycle whose level (A3..A1) matches, the board answers once IACKIN*
  arrives: it puts the vector on D7..D0 and clears the request.
* Any other acknowledge goes down the daisy chain on IACKOUT*.

## Board-level model and analog parts

`vmedac64` is the whole board. It combines `vmedac64_fpga` with the analog
models:

```
VMEbus ─ vmedac64_fpga ─ dac_data/cs/wr ─► mdac12 ─► analog_demux ─► sample_hold_bank ─► output_switches ─► ch_out[0..63]
              │ ref_sel                        ▲              ▲ mux_en, mux_a                  ▲ output_en
              └──────────────► ref_mux ◄─ reference_bank      └─ (from the FPGA)               └─ (from the FPGA)
```

Channels 0..31 go to the P3 connector and 32..63 to P4. The analog models are
ideal:

* `mdac12`: a transparent latch while CS* and WR* are both low; output
  settling is not modelled.
* `analog_demux`: no charge injection; an open output reads 0 V.
* `sample_hold_bank`: no droop or leakage.
* `output_switches`: an ideal switch; an open switch reads 0 V.

The isolated ±15 V DC/DC converters and the VME bus buffer chips have no logic
function and are left out. `vmedac64` uses `real` ports and is meant for
simulation. `vmedac64_fpga` is the synthesizable top. Yosys coarse synthesis
gives about 170 flip-flops, 1 kbit of channel RAM and 16 kbit of test memory.

## Files

| file | contents |
|------|----------|
| `rtl/vmedac64_pkg.sv` | shared constants, CSR struct, local bus struct, address map |
| `rtl/vmedac64.sv` | board-level model (FPGA plus analog models) |
| `rtl/vmedac64_fpga.sv` | synthesizable FPGA top, local address decode |
| `rtl/vme_slave.sv`, `rtl/vme_interrupter.sv` | VMEbus slave and interrupter |
| `rtl/dual_port_ram.sv`, `rtl/test_memory.sv`, `rtl/csr_regs.sv` | memories and registers |
| `rtl/refresh_timebase.sv`, `rtl/refresh_ctrl.sv`, `rtl/channel_decoder.sv` | refresh timing, sequence and channel decode |
| `rtl/reference_bank.sv`, `rtl/ref_mux.sv`, `rtl/mdac12.sv`, `rtl/analog_demux.sv`, `rtl/sample_hold_bank.sv`, `rtl/output_switches.sv` | behavioural analog models |
| `tb/vme_master.sv` | VME master used by the testbenches (single, byte, BLT16, IACK cycles) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For example, the
whole board at its default parameters (16 MHz clock, about 10 refresh passes):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/vmedac64_pkg.sv tb/tb_vmedac64.sv --top-module tb_vmedac64
obj_dir/Vtb_vmedac64
```

Substitute another `tb_<module>` to test one block. All testbenches run in
seconds. They are:

* `tb_vmedac64`: loads 64 codes and checks every front panel voltage after a
  pass with the 10 V and 5 V references and with the bipolar jumper. It also
  checks FAST REFRESH, a live update of one channel, the output disable, the
  test memory, the interrupt with its IACK and a daisy-chain pass-on. It
  measures every pass as exactly 112640 clocks (7.040 ms) or 56320 clocks
  (3.52 ms), and fails if any of these mechanisms never occurred.
* `tb_vmedac64_fpga`: checks at the pins that each DAC load carries the code the
  host wrote for that channel, that the demultiplexer enables and addresses
  select that channel, and the pass times.
* `tb_refresh_ctrl`: checks every edge of the slot timing (CS 2 us, WEN 0.5 us,
  window 10 us after CS, 100 us or 45 us long) in both modes.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `vmedac64`, `vmedac64_fpga` | `CLK_HZ` | 16 000 000 | FPGA clock; must be a multiple of 2 MHz |
| `vmedac64_fpga` | `TEST_WORDS` | 1024 | test memory depth |
| `vmedac64_fpga`, `refresh_ctrl` | `SH_TICKS`, `SH_TICKS_FAST` | 200, 90 | sample window in 0.5 us ticks |
| `refresh_ctrl` | `CS_TICKS`, `WEN_START`, `WEN_TICKS`, `SETTLE_TICKS` | 4, 1, 1, 16 | DAC load timing in ticks |
| `dual_port_ram` | `DEPTH`, `WIDTH` | 64, 16 | channel RAM |

## What follows the original board and what is this design's own

Taken from the board's description:

* 64 channels with 12-bit codes;
* one multiplying DAC, references selected by REF_SEL[2:0] through an 8-to-1
  multiplexer;
* a 16-bit × 64 dual-port RAM inside the FPGA;
* the 2 us / 0.5 us / 8 us / 100 us slot timing, the 7.040 ms and 3.52 ms pass
  times and the equal 10 us DAC settling in both modes;
* the FAST REFRESH and OUTPUT ENABLE CSR bits;
* the MUX_EN and MUX_A signals;
* A24:D16:D08(EO) with single cycles and BLT16;
* a configurable interrupt level;
* a test memory on the VME side;
* unipolar/bipolar selection by jumper;
* the five output ranges.

Chosen here, because the description does not fix them:

* the FPGA clock (16 MHz);
* all register bit positions and the address map;
* the status and vector registers;
* the interrupt source (end of pass) and the release-on-acknowledge behaviour;
* the 2.5/5/10 V references and their REF_SEL codes;
* the data coding (right-justified; offset binary when bipolar);
* the size of the test memory;
* the position of WEN inside CS;
* the 64 KiB board window and the response to unsupported cycles;
* reset values (everything cleared, outputs disconnected).

One deliberate reading: the board is described both as having "a software
controlled output switch" per channel and as switching its outputs with a single
OUTPUT ENABLE bit, and its block diagram shows a single control line. This design
implements the single bit: all 64 switches open and close together.
