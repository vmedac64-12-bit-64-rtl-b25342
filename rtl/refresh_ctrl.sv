// refresh_ctrl: the output refresh control logic of the VMEDAC64.
//
// A single 12-bit multiplying DAC serves all 64 outputs, so this controller walks
// the channels in turn, forever, with no host involvement. Each channel gets one
// slot, counted in 0.5 us ticks:
//
//   tick 0 .. CS_TICKS-1            DAC chip select low; the channel's word from
//                                   the DAC port of the dual-port RAM is on the
//                                   DAC data lines for the whole slot
//   tick WEN_START (WEN_TICKS long) DAC write strobe low, latching the code
//   CS_TICKS .. CS_TICKS+SETTLE-1   DAC settles, demultiplexer still off
//   CS_TICKS+SETTLE .. end of slot  sample window: the channel's demultiplexer is
//                                   enabled and its hold capacitor charges
//
// With the defaults (2 us CS, 0.5 us WEN, 8 us settle, 100 us window) a slot is
// 110 us and a full 64-channel pass is 7.040 ms. FAST REFRESH shortens only the
// sample window, to 45 us, so the DAC still gets the same 10 us from chip select to
// window and a pass takes 3.52 ms. The 2 us, 0.5 us, 8 us and 100 us figures, the
// 7.040 ms and 3.52 ms pass times and the equal 10 us DAC settling in both modes
// come from the board description; the 45 us fast window follows from them. The
// position of WEN inside CS and the choice to shorten only the window are this
// design's own.
//
// The RAM's DAC port is read every clock at the next channel's address, and the
// word is taken into the DAC register when the slot starts. cycle_done pulses for
// one clock when the slot of the last channel ends. Outputs are registered.
module refresh_ctrl #(
  parameter int unsigned NUM_CH        = 64,
  parameter int unsigned CH_W          = $clog2(NUM_CH),
  parameter int unsigned DAC_BITS      = 12,
  parameter int unsigned CS_TICKS      = 4,
  parameter int unsigned WEN_START     = 1,
  parameter int unsigned WEN_TICKS     = 1,
  parameter int unsigned SETTLE_TICKS  = 16,
  parameter int unsigned SH_TICKS      = 200,
  parameter int unsigned SH_TICKS_FAST = 90
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                tick,          // 0.5 us enable
  input  logic                fast_refresh,  // CSR FAST REFRESH
  // DAC port of the dual-port RAM
  output logic                ram_rd,
  output logic [CH_W-1:0]     ram_addr,
  input  logic [15:0]         ram_rdata,
  // DAC
  output logic [DAC_BITS-1:0] dac_data,
  output logic                dac_cs_n,
  output logic                dac_wr_n,
  // analog distributor
  output logic [CH_W-1:0]     ch,
  output logic                sample_window,
  // one-clock pulse at the end of a full pass over all channels
  output logic                cycle_done
);

  localparam int unsigned SLOT      = CS_TICKS + SETTLE_TICKS + SH_TICKS;
  localparam int unsigned SLOT_FAST = CS_TICKS + SETTLE_TICKS + SH_TICKS_FAST;
  localparam int unsigned TW        = $clog2(SLOT + 1);
  localparam int unsigned WIN_START = CS_TICKS + SETTLE_TICKS;

  logic [TW-1:0]   t;
  logic            primed;
  logic [TW-1:0]   slot_last;
  logic            advance;
  logic [CH_W-1:0] ch_next;
  logic [TW-1:0]   t_next;

  assign slot_last = fast_refresh ? TW'(SLOT_FAST - 1) : TW'(SLOT - 1);
  assign advance   = tick && (t >= slot_last);
  assign ch_next   = (ch == CH_W'(NUM_CH - 1)) ? '0 : ch + 1'b1;
  assign t_next    = advance ? '0 : (tick ? t + 1'b1 : t);

  // The DAC port always looks one channel ahead.
  assign ram_rd   = 1'b1;
  assign ram_addr = ch_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      // Park at the end of the last channel's slot so that the first tick starts
      // channel 0 with freshly read data.
      t             <= TW'(SLOT - 1);
      ch            <= CH_W'(NUM_CH - 1);
      primed        <= 1'b0;
      dac_data      <= '0;
      dac_cs_n      <= 1'b1;
      dac_wr_n      <= 1'b1;
      sample_window <= 1'b0;
      cycle_done    <= 1'b0;
    end else begin
      cycle_done <= 1'b0;
      if (advance) begin
        ch         <= ch_next;
        dac_data   <= ram_rdata[DAC_BITS-1:0];
        primed     <= 1'b1;
        cycle_done <= primed && (ch == CH_W'(NUM_CH - 1));
      end
      t <= t_next;
      if (tick) begin
        dac_cs_n      <= !(t_next < TW'(CS_TICKS));
        dac_wr_n      <= !(t_next >= TW'(WEN_START) && t_next < TW'(WEN_START + WEN_TICKS));
        sample_window <= (t_next >= TW'(WIN_START)) && (advance || primed);
      end
    end
  end

  // The write strobe only ever falls while the chip select is low.
  a_wr_inside_cs: assert property (@(posedge clk) disable iff (!rst_n) !dac_wr_n |-> !dac_cs_n);
  // The demultiplexer is never enabled while the DAC is being loaded.
  a_window_after_cs: assert property (@(posedge clk) disable iff (!rst_n) sample_window |-> dac_cs_n);

endmodule
