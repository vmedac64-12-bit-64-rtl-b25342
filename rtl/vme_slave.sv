// vme_slave: the A24:D16:D08(EO) VMEbus slave interface of the VMEDAC64.
//
// The slave takes part in 24-bit addressing cycles with the standard (A24) address
// modifiers, user or supervisory, and answers single read and single write cycles
// of 16 bits or of one byte (even byte on DS1*, odd byte on DS0*), and BLT16 block
// transfers, in which AS* stays low and the address advances by two after every
// data transfer. It also carries out interrupt acknowledge cycles together with
// vme_interrupter. The board answers when A23..A16 equal its 8-bit board address
// (set by on-board switches), giving it a 64 KiB window.
//
// All bus inputs come through the board's bus buffers and are taken into the FPGA
// clock domain with two-stage synchronisers on AS*, DS0*, DS1*, IACK* and IACKIN*;
// address, AM, WRITE*, LWORD* and data are sampled once the synchronised strobe is
// seen, by which time the bus protocol guarantees them stable. Towards the board
// the slave drives a local bus (vmedac64_pkg::lbus_req_t): a one-clock write strobe,
// or a one-clock read strobe whose data (lrdata) is taken one clock later. DTACK*
// is driven low once a write has been done or the read data is on the bus, and
// released, together with the data drivers, when both data strobes have risen.
// Cycles with LWORD* low (D32) or with other address modifiers are ignored.
//
// The A24:D16:D08(EO) capability, single cycles, BLT16 and the interrupter follow
// the board description; the synchronous design, the address window size and the
// handling of unsupported cycles (no response rather than BERR*) are this design's.
module vme_slave
  import vmedac64_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  board_addr,   // compared with A23..A16
  // VMEbus, after the buffers
  input  logic        as_n,
  input  logic [1:0]  ds_n,         // {DS1*, DS0*}
  input  logic        write_n,
  input  logic        lword_n,
  input  logic        iack_n,
  input  logic        iackin_n,
  input  logic [5:0]  am,
  input  logic [23:1] addr,
  input  logic [15:0] data_in,
  output logic [15:0] data_out,
  output logic        data_oe,      // enables the data buffers towards the bus
  output logic        dtack_n,
  // local bus
  output lbus_req_t   lreq,
  input  logic [15:0] lrdata,
  // interrupter
  output logic        iack_active,
  output logic [2:0]  ack_level,
  output logic        iackin_sync_n,
  input  logic        iack_respond,
  input  logic [7:0]  irq_vector,
  output logic        iack_done
);

  typedef enum logic [2:0] {
    S_IDLE,    // waiting for AS*
    S_ADDR,    // selected, waiting for a data strobe
    S_RDWAIT,  // read issued, data arrives next clock
    S_ACK,     // DTACK* low, waiting for the data strobes to rise
    S_IACK,    // interrupt acknowledge cycle
    S_IACKACK, // status/ID on the bus, DTACK* low
    S_WAITAS   // not (or no longer) ours, waiting for AS* to rise
  } state_t;

  state_t state;

  // two-stage synchronisers
  logic [1:0] as_sr, iack_sr, iackin_sr;
  logic [1:0] ds0_sr, ds1_sr;
  logic       as_s, iack_s, ds_any_s, ds_none_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_sr     <= '1;
      iack_sr   <= '1;
      iackin_sr <= '1;
      ds0_sr    <= '1;
      ds1_sr    <= '1;
    end else begin
      as_sr     <= {as_sr[0], as_n};
      iack_sr   <= {iack_sr[0], iack_n};
      iackin_sr <= {iackin_sr[0], iackin_n};
      ds0_sr    <= {ds0_sr[0], ds_n[0]};
      ds1_sr    <= {ds1_sr[0], ds_n[1]};
    end
  end

  assign as_s          = !as_sr[1];
  assign iack_s        = !iack_sr[1];
  assign ds_any_s      = !ds0_sr[1] || !ds1_sr[1];
  assign ds_none_s     = ds0_sr[1] && ds1_sr[1];
  assign iackin_sync_n = iackin_sr[1];

  logic [23:1] cur_addr;
  logic        blt;

  function automatic logic am_ok(input logic [5:0] m);
    return m == AM_A24_USER_DATA || m == AM_A24_SUP_DATA ||
           m == AM_A24_USER_BLT  || m == AM_A24_SUP_BLT;
  endfunction

  assign iack_active = (state == S_IACK) || (state == S_IACKACK);
  assign ack_level   = cur_addr[3:1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cur_addr  <= '0;
      blt       <= 1'b0;
      lreq      <= '0;
      data_out  <= '0;
      data_oe   <= 1'b0;
      dtack_n   <= 1'b1;
      iack_done <= 1'b0;
    end else begin
      lreq.wr   <= 1'b0;
      lreq.rd   <= 1'b0;
      iack_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          dtack_n <= 1'b1;
          data_oe <= 1'b0;
          if (as_s) begin
            cur_addr <= addr;
            blt      <= (am == AM_A24_USER_BLT) || (am == AM_A24_SUP_BLT);
            if (iack_s)                                  state <= S_IACK;
            else if (am_ok(am) && addr[23:16] == board_addr) state <= S_ADDR;
            else                                         state <= S_WAITAS;
          end
        end
        S_ADDR: begin
          dtack_n <= 1'b1;
          data_oe <= 1'b0;
          if (!as_s) state <= S_IDLE;
          else if (ds_any_s) begin
            if (!lword_n) state <= S_WAITAS;  // D32 is not supported
            else begin
              lreq.addr  <= {cur_addr[15:1], 1'b0};
              lreq.be    <= {!ds1_sr[1], !ds0_sr[1]};
              lreq.wdata <= data_in;
              if (!write_n) begin
                lreq.wr <= 1'b1;
                dtack_n <= 1'b0;
                state   <= S_ACK;
              end else begin
                lreq.rd <= 1'b1;
                state   <= S_RDWAIT;
              end
            end
          end
        end
        S_RDWAIT: begin
          // the read strobe was issued on the previous clock; data is valid now
          if (lreq.rd == 1'b0) begin
            data_out <= lrdata;
            data_oe  <= 1'b1;
            dtack_n  <= 1'b0;
            state    <= S_ACK;
          end
        end
        S_ACK: begin
          if (ds_none_s) begin
            dtack_n <= 1'b1;
            data_oe <= 1'b0;
            if (blt) cur_addr <= cur_addr + 23'd1;  // next 16-bit word
            state <= S_ADDR;
          end
        end
        S_IACK: begin
          if (!as_s) state <= S_IDLE;
          else if (iack_respond && ds_any_s) begin
            data_out  <= {8'd0, irq_vector};
            data_oe   <= 1'b1;
            dtack_n   <= 1'b0;
            iack_done <= 1'b1;
            state     <= S_IACKACK;
          end
        end
        S_IACKACK: begin
          if (ds_none_s) begin
            dtack_n <= 1'b1;
            data_oe <= 1'b0;
            state   <= S_WAITAS;
          end
        end
        S_WAITAS: begin
          dtack_n <= 1'b1;
          data_oe <= 1'b0;
          if (!as_s) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // DTACK* is never driven while no data strobe is (or has just been) low.
  a_no_data_without_dtack: assert property (@(posedge clk) disable iff (!rst_n)
                                            data_oe |-> !dtack_n);

endmodule
