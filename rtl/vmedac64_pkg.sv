// vmedac64_pkg: types and constants shared by the VMEDAC64 board logic.
//
// The board keeps one 16-bit word per analog channel in a dual-port RAM that the
// VME host writes and the refresh controller reads. A control and status register
// (CSR) selects the DAC reference (REF_SEL[2:0]), the refresh speed (FAST REFRESH)
// and the output switches (OUTPUT ENABLE); those three fields come from the board
// description. Their bit positions, the interrupt fields and the whole local address
// map are this design's own choices.
//
// Local address map (byte offsets inside the board's 64 KiB A24 window):
//   0x0000-0x007F  DAC data RAM, channel n at offset 2*n, code in bits 11:0
//   0x0100         CSR         (read/write)
//   0x0102         IRQ vector  (read/write, bits 7:0)
//   0x0104         status      (read only)
//   0x0800-0x0FFF  test memory (1024 x 16 bit)
package vmedac64_pkg;

  // Number of analog outputs and DAC resolution.
  localparam int unsigned NUM_CH   = 64;
  localparam int unsigned CH_W     = 6;
  localparam int unsigned DAC_BITS = 12;

  // VME address modifiers accepted by the A24 slave.
  localparam logic [5:0] AM_A24_USER_DATA = 6'h39;
  localparam logic [5:0] AM_A24_USER_BLT  = 6'h3B;
  localparam logic [5:0] AM_A24_SUP_DATA  = 6'h3D;
  localparam logic [5:0] AM_A24_SUP_BLT   = 6'h3F;

  // Local register byte offsets.
  localparam logic [15:0] OFS_CSR    = 16'h0100;
  localparam logic [15:0] OFS_VECTOR = 16'h0102;
  localparam logic [15:0] OFS_STATUS = 16'h0104;

  // Control and status register, as laid out in the 16-bit word.
  typedef struct packed {
    logic [4:0] reserved_hi;  // 15:11 read as zero
    logic [2:0] irq_level;    // 10:8  VME interrupt level, 0 = interrupter off
    logic [1:0] reserved_lo;  // 7:6   read as zero
    logic       irq_en;       // 5     interrupt at the end of each refresh cycle
    logic       output_en;    // 4     OUTPUT ENABLE: close the 64 output switches
    logic       fast_refresh; // 3     FAST REFRESH: halve the refresh cycle
    logic [2:0] ref_sel;      // 2:0   REF_SEL: reference multiplexer select
  } csr_t;

  // Local bus that the VME slave drives towards the on-board resources.
  // One-cycle write strobe; a read strobe returns data on the next cycle.
  typedef struct packed {
    logic        wr;    // write strobe, one clock
    logic        rd;    // read strobe, one clock; data valid one clock later
    logic [15:0] addr;  // byte address inside the board window (bit 0 = 0)
    logic [1:0]  be;    // byte enables: [1] = D15..D8 (even byte), [0] = D7..D0 (odd byte)
    logic [15:0] wdata;
  } lbus_req_t;

endpackage
