// csr_regs: the control and status register (CSR) block of the VMEDAC64.
//
// Three 16-bit registers sit on the local bus behind the VME slave:
//   index 0  CSR        read/write  REF_SEL[2:0], FAST REFRESH, OUTPUT ENABLE,
//                                   IRQ enable and IRQ level (layout in vmedac64_pkg::csr_t)
//   index 1  IRQ vector read/write  bits 7:0, the status/ID returned in an IACK cycle
//   index 2  status     read only   bits 5:0 channel being refreshed, bit 8 sample window
//                                   open, bit 15 interrupt pending
// Writes take effect on the clock of the write strobe and honour the two byte
// enables; a read strobe returns the register on the next clock. Reserved CSR bits
// read as zero. Reset clears everything, so the outputs start disconnected, the
// refresh runs at its normal rate and no interrupt is raised.
//
// REF_SEL, FAST REFRESH and OUTPUT ENABLE are named by the board description; the
// bit positions, the interrupt fields, the vector and status registers are this
// design's choices.
module csr_regs
  import vmedac64_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr,
  input  logic        rd,
  input  logic [1:0]  idx,
  input  logic [1:0]  be,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  // register contents
  output csr_t        csr,
  output logic [7:0]  irq_vector,
  // status inputs
  input  logic [5:0]  cur_ch,
  input  logic        sample_window,
  input  logic        irq_pending
);

  localparam logic [15:0] CSR_MASK = 16'b0000_0111_0011_1111;

  logic [15:0] csr_q;
  logic [15:0] status;

  assign csr    = csr_t'(csr_q);
  assign status = {irq_pending, 6'd0, sample_window, 2'd0, cur_ch};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      csr_q      <= '0;
      irq_vector <= '0;
    end else if (wr) begin
      unique case (idx)
        2'd0: begin
          if (be[0]) csr_q[7:0]  <= wdata[7:0]  & CSR_MASK[7:0];
          if (be[1]) csr_q[15:8] <= wdata[15:8] & CSR_MASK[15:8];
        end
        2'd1: if (be[0]) irq_vector <= wdata[7:0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rdata <= '0;
    else if (rd) begin
      unique case (idx)
        2'd0:    rdata <= csr_q;
        2'd1:    rdata <= {8'd0, irq_vector};
        2'd2:    rdata <= status;
        default: rdata <= '0;
      endcase
    end
  end

endmodule
