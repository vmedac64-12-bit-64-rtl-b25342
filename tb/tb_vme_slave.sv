// tb_vme_slave: self-checking test of the A24:D16:D08(EO) VME slave.
//
// A behavioural local memory (one-clock read latency, byte enables) sits on the
// slave's local bus; a vme_master drives the bus. Checked: word and byte writes
// land at the right local address and byte lanes, reads return the stored data,
// BLT16 writes and reads advance the address word by word, other board addresses
// and non-A24 address modifiers get no DTACK* and cause no local access, and an
// IACK cycle returns the status/ID only when the interrupter says to respond.
module tb_vme_slave;
  import vmedac64_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  logic        as_n, write_n, lword_n, iack_n, iackin_n;
  logic [1:0]  ds_n;
  logic [5:0]  am;
  logic [23:1] addr;
  logic [15:0] mdata, sdata, lrdata;
  logic        data_oe, dtack_n;
  lbus_req_t   lreq;
  logic        iack_active, iackin_sync_n, iack_done;
  logic [2:0]  ack_level;
  logic        iack_respond = 1'b0;
  logic [7:0]  irq_vector = 8'hA5;
  localparam logic [7:0] BOARD = 8'h42;

  vme_slave dut (
    .clk, .rst_n, .board_addr(BOARD),
    .as_n, .ds_n, .write_n, .lword_n, .iack_n, .iackin_n, .am, .addr,
    .data_in(mdata), .data_out(sdata), .data_oe, .dtack_n,
    .lreq, .lrdata,
    .iack_active, .ack_level, .iackin_sync_n, .iack_respond, .irq_vector, .iack_done
  );

  vme_master bus (
    .clk, .as_n, .ds_n, .write_n, .lword_n, .iack_n, .iackin_n, .am, .addr,
    .data(mdata), .slave_data(sdata), .slave_oe(data_oe), .dtack_n
  );

  // local memory model
  logic [15:0] lmem [32768];
  int writes = 0, reads = 0;
  initial for (int i = 0; i < 32768; i++) lmem[i] = 16'(i * 7);
  always_ff @(posedge clk) begin
    if (lreq.wr) begin
      writes <= writes + 1;
      if (lreq.be[1]) lmem[lreq.addr[15:1]][15:8] <= lreq.wdata[15:8];
      if (lreq.be[0]) lmem[lreq.addr[15:1]][7:0]  <= lreq.wdata[7:0];
    end
    if (lreq.rd) reads <= reads + 1;
    lrdata <= lmem[lreq.addr[15:1]];
  end

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic ok;
  logic [15:0] rd;
  logic [7:0] vec;
  logic [15:0] blk [];
  logic [15:0] got [];
  int w0;

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // word write, then read back
    bus.write({BOARD, 16'h0010}, 16'h1234, 2'b11, ok);
    check(ok, "word write acknowledged");
    check(lmem[16'h0010 >> 1] == 16'h1234, "word write stored");
    bus.read({BOARD, 16'h0010}, 2'b11, rd, ok);
    check(ok && rd == 16'h1234, $sformatf("word read back %h", rd));

    // byte writes: even byte then odd byte (supervisory AM)
    bus.write({BOARD, 16'h0020}, 16'hAB00, 2'b10, ok, 6'h3D);
    check(ok, "even byte write acknowledged");
    bus.write({BOARD, 16'h0021}, 16'h00CD, 2'b01, ok, 6'h3D);
    check(ok, "odd byte write acknowledged");
    check(lmem[16'h0010] == 16'hABCD, $sformatf("byte lanes %h", lmem[16'h0010]));
    bus.read({BOARD, 16'h0021}, 2'b01, rd, ok);
    check(ok && rd[7:0] == 8'hCD, "odd byte read");

    // another board address: no DTACK, no local write
    w0 = writes;
    bus.write({8'h43, 16'h0010}, 16'hFFFF, 2'b11, ok);
    check(!ok, "other board not acknowledged");
    check(writes == w0 && lmem[8] == 16'h1234, "other board caused no write");

    // A16 address modifier: ignored
    bus.write({BOARD, 16'h0010}, 16'hEEEE, 2'b11, ok, 6'h29);
    check(!ok, "A16 AM not acknowledged");
    check(lmem[8] == 16'h1234, "A16 AM caused no write");

    // BLT16 write of 8 words and BLT16 read back
    blk = new[8];
    foreach (blk[i]) blk[i] = 16'hC000 + 16'(i * 3);
    bus.blt_write({BOARD, 16'h0400}, blk, ok);
    check(ok, "BLT write acknowledged");
    for (int i = 0; i < 8; i++)
      check(lmem[(16'h0400 >> 1) + i] == blk[i], $sformatf("BLT word %0d stored", i));
    bus.blt_read({BOARD, 16'h0400}, 8, got, ok);
    check(ok, "BLT read acknowledged");
    for (int i = 0; i < 8; i++)
      check(got[i] == blk[i], $sformatf("BLT word %0d read %h", i, got[i]));

    // IACK: respond when told to
    iack_respond = 1'b1;
    bus.iack(3'd3, vec, ok);
    check(ok && vec == 8'hA5, $sformatf("IACK status/ID %h", vec));
    iack_respond = 1'b0;
    bus.iack(3'd3, vec, ok);
    check(!ok, "IACK not answered when not responding");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // level seen by the interrupter during IACK
  always @(posedge clk) if (iack_active && !iackin_sync_n) begin
    if (ack_level != 3'd3) begin failures++; $display("FAIL: ack level %0d", ack_level); end
  end

  int iack_pulses = 0;
  always @(posedge clk) if (iack_done) iack_pulses++;
  final if (iack_pulses != 1) $display("note: iack_done pulses %0d", iack_pulses);

endmodule
