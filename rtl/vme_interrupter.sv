// vme_interrupter: the VMEbus interrupter of the VMEDAC64 (release on
// acknowledge, D08(O) status/ID).
//
// An interrupt request (a one-clock pulse, here the end of a refresh pass) sets a
// pending flag, which drives the IRQ line of the level programmed in the CSR
// (irq_n[1] is IRQ1*, ..., irq_n[7] is IRQ7*; level 0 keeps all lines released
// and drops the request). In an interrupt acknowledge cycle the slave reports the
// acknowledged level (address lines A3..A1) and the synchronised IACKIN* daisy
// chain input. When IACKIN* arrives this block decides once per cycle:
//   - it has a request pending at the acknowledged level: respond is raised and
//     the slave puts the status/ID on D7..D0; the request is released when the
//     slave reports ack_done;
//   - otherwise IACKOUT* is driven low to pass the acknowledge down the chain.
// Both stay in force until the slave reports the end of the IACK cycle
// (iack_active low, i.e. AS* released).
//
// The document states only that the interface has an interrupter with a
// configurable interrupt level; the release-on-acknowledge behaviour and the
// interrupt source are this design's choices.
module vme_interrupter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       irq_req,      // one-clock request pulse
  input  logic [2:0] irq_level,    // 0 = off, 1..7 = IRQ1*..IRQ7*
  // IACK cycle, from the slave
  input  logic       iack_active,  // an IACK cycle is in progress (AS* low, IACK* low)
  input  logic [2:0] ack_level,    // A3..A1 of the IACK cycle
  input  logic       iackin_n,     // synchronised IACKIN*
  input  logic       ack_done,     // status/ID has been transferred
  output logic       respond,      // this board answers the IACK cycle
  output logic       iackout_n,
  output logic [7:1] irq_n,
  output logic       pending
);

  logic decided;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= 1'b0;
    end else if (irq_level == 3'd0 || ack_done) begin
      pending <= 1'b0;
    end else if (irq_req) begin
      pending <= 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      decided   <= 1'b0;
      respond   <= 1'b0;
      iackout_n <= 1'b1;
    end else if (!iack_active) begin
      decided   <= 1'b0;
      respond   <= 1'b0;
      iackout_n <= 1'b1;
    end else if (!decided && !iackin_n) begin
      decided <= 1'b1;
      if (pending && irq_level != 3'd0 && ack_level == irq_level) respond <= 1'b1;
      else iackout_n <= 1'b0;
    end
  end

  always_comb begin
    for (int l = 1; l <= 7; l++) irq_n[l] = !(pending && irq_level == 3'(l));
  end

  // The acknowledge is never both answered and passed on.
  a_one_owner: assert property (@(posedge clk) disable iff (!rst_n) !(respond && !iackout_n));

endmodule
