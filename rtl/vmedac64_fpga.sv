// vmedac64_fpga: everything the VMEDAC64 puts in its one FPGA: the VME slave
// interface with its interrupter, the 64 x 16-bit dual-port DAC data RAM, the
// test memory, the control and status registers, and the refresh control logic
// with the one-of-64 channel decoder.
//
// The host writes a 12-bit code per channel into the RAM through the VME port.
// Independently, the refresh controller reads the RAM's DAC port one channel at a
// time, loads the code into the external DAC (dac_data, dac_cs_n, dac_wr_n) and,
// once the DAC has settled, opens that channel's demultiplexer (mux_en, mux_a) so
// the channel's sample-and-hold capacitor takes the new voltage. A full pass takes
// 7.040 ms, or 3.52 ms with FAST REFRESH set. The CSR also drives the reference
// multiplexer select (ref_sel) and the output switch control (output_en). At the
// end of every pass an interrupt can be raised at the level set in the CSR.
//
// The local bus from the VME slave is decoded by byte offset inside the board's
// 64 KiB window (see vmedac64_pkg): 0x0000-0x007F data RAM, 0x0100-0x0105 registers,
// 0x0800-0x0FFF test memory; other offsets read as zero and ignore writes, but are
// still acknowledged. Everything runs on one clock, CLK_HZ (16 MHz by default, an
// assumed value), with an asynchronous active-low reset.
module vmedac64_fpga
  import vmedac64_pkg::*;
#(
  parameter int unsigned CLK_HZ        = 16_000_000,
  parameter int unsigned TEST_WORDS    = 1024,
  parameter int unsigned SH_TICKS      = 200,
  parameter int unsigned SH_TICKS_FAST = 90
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  board_addr,
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
  // DAC
  output logic [11:0] dac_data,
  output logic        dac_cs_n,
  output logic        dac_wr_n,
  // reference multiplexer, analog demultiplexers, output switches
  output logic [2:0]  ref_sel,
  output logic [2:0]  mux_a,
  output logic [7:0]  mux_en,
  output logic        output_en,
  // refresh position, for monitoring
  output logic [5:0]  cur_ch,
  output logic        sample_window,
  output logic        cycle_done
);

  localparam int unsigned TW_AW = $clog2(TEST_WORDS);

  lbus_req_t   lreq;
  logic [15:0] lrdata;
  csr_t        csr;
  logic [7:0]  irq_vector;

  // local bus decode
  logic sel_ram, sel_reg, sel_test;
  typedef enum logic [1:0] {R_NONE, R_RAM, R_REG, R_TEST} rsrc_t;
  rsrc_t rsrc;

  assign sel_ram  = lreq.addr[15:7] == '0;
  assign sel_reg  = lreq.addr[15:3] == OFS_CSR[15:3] && lreq.addr[2:1] != 2'd3;
  assign sel_test = lreq.addr[15:11] == 5'b00001;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rsrc <= R_NONE;
    else if (lreq.rd) rsrc <= sel_ram ? R_RAM : sel_reg ? R_REG : sel_test ? R_TEST : R_NONE;
  end

  logic [15:0] ram_a_rdata, reg_rdata, test_rdata;

  always_comb begin
    unique case (rsrc)
      R_RAM:   lrdata = ram_a_rdata;
      R_REG:   lrdata = reg_rdata;
      R_TEST:  lrdata = test_rdata;
      default: lrdata = '0;
    endcase
  end

  // interrupter hand-shake
  logic       iack_active, iackin_sync_n, iack_respond, iack_done, irq_pending;
  logic [2:0] ack_level;

  vme_slave u_slave (
    .clk, .rst_n, .board_addr,
    .as_n, .ds_n, .write_n, .lword_n, .iack_n, .iackin_n, .am, .addr, .data_in,
    .data_out, .data_oe, .dtack_n,
    .lreq, .lrdata,
    .iack_active, .ack_level, .iackin_sync_n, .iack_respond, .irq_vector, .iack_done
  );

  vme_interrupter u_irq (
    .clk, .rst_n,
    .irq_req     (cycle_done && csr.irq_en),
    .irq_level   (csr.irq_level),
    .iack_active, .ack_level,
    .iackin_n    (iackin_sync_n),
    .ack_done    (iack_done),
    .respond     (iack_respond),
    .iackout_n, .irq_n,
    .pending     (irq_pending)
  );

  logic        ram_b_rd;
  logic [5:0]  ram_b_addr;
  logic [15:0] ram_b_rdata;

  dual_port_ram #(.DEPTH(NUM_CH), .WIDTH(16)) u_ram (
    .clk,
    .a_wr    (lreq.wr && sel_ram),
    .a_be    (lreq.be),
    .a_addr  (lreq.addr[6:1]),
    .a_wdata (lreq.wdata),
    .a_rdata (ram_a_rdata),
    .b_rd    (ram_b_rd),
    .b_addr  (ram_b_addr),
    .b_rdata (ram_b_rdata)
  );

  test_memory #(.DEPTH(TEST_WORDS)) u_test (
    .clk,
    .wr    (lreq.wr && sel_test),
    .be    (lreq.be),
    .addr  (lreq.addr[TW_AW:1]),
    .wdata (lreq.wdata),
    .rdata (test_rdata)
  );

  csr_regs u_csr (
    .clk, .rst_n,
    .wr    (lreq.wr && sel_reg),
    .rd    (lreq.rd && sel_reg),
    .idx   (lreq.addr[2:1]),
    .be    (lreq.be),
    .wdata (lreq.wdata),
    .rdata (reg_rdata),
    .csr, .irq_vector,
    .cur_ch, .sample_window, .irq_pending
  );

  logic tick;

  refresh_timebase #(.CLK_HZ(CLK_HZ)) u_tb (.clk, .rst_n, .tick);

  refresh_ctrl #(
    .NUM_CH(NUM_CH), .DAC_BITS(DAC_BITS),
    .SH_TICKS(SH_TICKS), .SH_TICKS_FAST(SH_TICKS_FAST)
  ) u_refresh (
    .clk, .rst_n, .tick,
    .fast_refresh (csr.fast_refresh),
    .ram_rd       (ram_b_rd),
    .ram_addr     (ram_b_addr),
    .ram_rdata    (ram_b_rdata),
    .dac_data, .dac_cs_n, .dac_wr_n,
    .ch           (cur_ch),
    .sample_window,
    .cycle_done
  );

  channel_decoder #(.NUM_CH(NUM_CH)) u_dec (
    .ch     (cur_ch),
    .window (sample_window),
    .mux_a, .mux_en
  );

  assign ref_sel   = csr.ref_sel;
  assign output_en = csr.output_en;

endmodule
