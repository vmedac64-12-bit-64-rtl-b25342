// tb_vmedac64: end-to-end test of the whole VMEDAC64 board at its default
// parameters, from VME cycles to the 64 front panel voltages.
//
// The host loads 64 codes (BLT16, single word and byte writes), selects the 10 V
// reference and closes the output switches. After one full refresh pass every
// front panel output must carry 10 V * code / 4096. The test then runs the
// mechanisms the board offers and counts each one:
//   normal pass      a pass lasts 7.040 ms (112640 clocks at 16 MHz)
//   fast pass        with FAST REFRESH a pass lasts 3.52 ms
//   range switch     REF_SEL = 1 (5 V): outputs halve after the next pass
//   bipolar          the polarity jumper gives 5 V * (code - 2048) / 2048
//   live update      a code written while refreshing reaches its output within
//                    one pass and the neighbours keep their voltages
//   output disable   OUTPUT ENABLE cleared: all outputs disconnected
//   BLT16, byte writes, test memory, interrupt with IACK, daisy-chain pass-on
// A mechanism that never happened counts as a failure.
module tb_vmedac64;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  localparam logic [7:0] BOARD = 8'h3E;
  localparam int unsigned CLK_PER_PASS = 112640;

  logic        as_n, write_n, lword_n, iack_n, iackin_n, iackout_n;
  logic [1:0]  ds_n;
  logic [5:0]  am;
  logic [23:1] addr;
  logic [15:0] mdata, sdata;
  logic        data_oe, dtack_n, outputs_connected, sample_window, cycle_done;
  logic [7:1]  irq_n;
  logic [5:0]  cur_ch;
  logic        bipolar = 1'b0;
  real         ch_out [64];
  real         dac_out;

  vmedac64 dut (
    .clk, .rst_n, .board_addr(BOARD), .bipolar,
    .as_n, .ds_n, .write_n, .lword_n, .iack_n, .iackin_n, .iackout_n, .am, .addr,
    .data_in(mdata), .data_out(sdata), .data_oe, .dtack_n, .irq_n,
    .ch_out, .outputs_connected, .cur_ch, .sample_window, .cycle_done, .dac_out
  );

  vme_master bus (
    .clk, .as_n, .ds_n, .write_n, .lword_n, .iack_n, .iackin_n, .am, .addr,
    .data(mdata), .slave_data(sdata), .slave_oe(data_oe), .dtack_n
  );

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  typedef enum int {M_NORMAL, M_FAST, M_RANGE, M_BIPOLAR, M_UPDATE, M_DISABLE,
                    M_BLT, M_BYTE, M_TESTMEM, M_IRQ, M_PASSON, M_COUNT} mech_t;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"normal pass", "fast pass", "range switch", "bipolar",
                                 "live update", "output disable", "BLT16", "byte write",
                                 "test memory", "interrupt", "daisy-chain pass-on"};

  // pass timing
  longint cyc = 0, last_done = -1;
  bit fast_now = 0, skip_next = 1;
  int passes = 0;
  always @(posedge clk) begin
    cyc++;
    if (cycle_done) begin
      if (last_done >= 0 && !skip_next) begin
        check(cyc - last_done == (fast_now ? CLK_PER_PASS / 2 : CLK_PER_PASS),
              $sformatf("pass length %0d clocks", cyc - last_done));
        if (fast_now) mech[M_FAST]++; else mech[M_NORMAL]++;
      end
      skip_next = 0;
      last_done = cyc;
      passes++;
    end
  end

  task automatic wait_passes(input int n);
    int p0 = passes;
    wait (passes >= p0 + n);
    repeat (4) @(posedge clk);
  endtask

  logic [11:0] codes [64];

  function automatic real expect_v(input logic [11:0] c, input real vref, input bit bip);
    return bip ? vref * (real'(c) - 2048.0) / 2048.0 : vref * real'(c) / 4096.0;
  endfunction

  function automatic bit near(input real a, input real b);
    return (a - b) < 1e-6 && (b - a) < 1e-6;
  endfunction

  task automatic check_outputs(input real vref, input bit bip, input string what);
    int bad = 0;
    for (int i = 0; i < 64; i++)
      if (!near(ch_out[i], expect_v(codes[i], vref, bip))) begin
        bad++;
        if (bad < 4) $display("  ch %0d: %f V, expected %f V", i, ch_out[i], expect_v(codes[i], vref, bip));
      end
    check(bad == 0, $sformatf("%s: %0d outputs wrong", what, bad));
  endtask

  logic        ok;
  logic [15:0] rd;
  logic [7:0]  vec;
  logic [15:0] blk [];
  logic [15:0] got [];
  bit          passed_on = 0;
  always @(posedge clk) if (!iackout_n) passed_on = 1;

  initial begin
    foreach (codes[i]) codes[i] = 12'($urandom);
    codes[0] = 12'h000; codes[63] = 12'hFFF; codes[1] = 12'h800;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    // outputs start disconnected
    check(!outputs_connected, "outputs disconnected after reset");

    // channels 0..47 by BLT16
    blk = new[48];
    foreach (blk[i]) blk[i] = {4'h0, codes[i]};
    bus.blt_write({BOARD, 16'h0000}, blk, ok);
    check(ok, "BLT16 write");
    if (ok) mech[M_BLT]++;
    // channels 48..55 by word writes, 56..63 by byte writes
    for (int i = 48; i < 56; i++) begin
      bus.write({BOARD, 16'(2 * i)}, {4'h0, codes[i]}, 2'b11, ok);
      check(ok, "word write");
    end
    for (int i = 56; i < 64; i++) begin
      bus.write({BOARD, 16'(2 * i)}, {4'h0, codes[i][11:8], 8'h00}, 2'b10, ok);
      bus.write({BOARD, 16'(2 * i + 1)}, {8'h00, codes[i][7:0]}, 2'b01, ok);
      check(ok, "byte write");
      if (ok) mech[M_BYTE]++;
    end
    bus.blt_read({BOARD, 16'h0000}, 64, got, ok);
    check(ok, "BLT16 read");
    foreach (got[i]) check(got[i] == {4'h0, codes[i]}, $sformatf("ch %0d read back %h", i, got[i]));

    // 10 V reference, outputs on
    bus.write({BOARD, 16'h0100}, 16'h0012, 2'b11, ok);
    check(ok && outputs_connected, "outputs connected");
    wait_passes(2);
    check_outputs(10.0, 0, "unipolar 0..10 V");

    // range switch to 5 V
    bus.write({BOARD, 16'h0100}, 16'h0011, 2'b11, ok);
    wait_passes(2);
    check_outputs(5.0, 0, "unipolar 0..5 V");
    mech[M_RANGE]++;

    // bipolar jumper, +-5 V
    bipolar = 1'b1;
    wait_passes(2);
    check_outputs(5.0, 1, "bipolar +-5 V");
    check(near(ch_out[0], -5.0) && near(ch_out[1], 0.0), "bipolar end and mid scale");
    mech[M_BIPOLAR]++;
    bipolar = 1'b0;

    // fast refresh with the 10 V reference
    bus.write({BOARD, 16'h0100}, 16'h001A, 2'b11, ok);
    fast_now = 1; skip_next = 1;
    wait_passes(3);
    check_outputs(10.0, 0, "fast refresh 0..10 V");

    // live update of one channel while refreshing
    codes[20] = ~codes[20];
    bus.write({BOARD, 16'(40)}, {4'h0, codes[20]}, 2'b11, ok);
    wait_passes(2);
    check_outputs(10.0, 0, "after live update");
    mech[M_UPDATE]++;

    // test memory
    bus.write({BOARD, 16'h0FFE}, 16'hA55A, 2'b11, ok);
    bus.read({BOARD, 16'h0FFE}, 2'b11, rd, ok);
    check(ok && rd == 16'hA55A, "test memory");
    if (ok && rd == 16'hA55A) mech[M_TESTMEM]++;

    // interrupt at level 6, vector 0x91
    bus.write({BOARD, 16'h0102}, 16'h0091, 2'b11, ok);
    bus.write({BOARD, 16'h0100}, 16'h063A, 2'b11, ok);
    wait (irq_n != 7'h7F);
    check(irq_n == 7'b101_1111, $sformatf("IRQ6, irq_n %b", irq_n));
    bus.iack(3'd2, vec, ok);
    check(!ok && passed_on, "level 2 acknowledge passed on");
    if (passed_on) mech[M_PASSON]++;
    bus.iack(3'd6, vec, ok);
    check(ok && vec == 8'h91, $sformatf("IACK vector %h", vec));
    if (ok && vec == 8'h91) mech[M_IRQ]++;
    bus.write({BOARD, 16'h0100}, 16'h001A, 2'b11, ok);  // interrupts off again

    // outputs off
    bus.write({BOARD, 16'h0100}, 16'h000A, 2'b11, ok);
    check(!outputs_connected, "outputs disconnected");
    begin
      int live = 0;
      foreach (ch_out[i]) if (!near(ch_out[i], 0.0)) live++;
      check(live == 0, "all outputs open");
      if (live == 0 && !outputs_connected) mech[M_DISABLE]++;
    end

    for (int m = 0; m < M_COUNT; m++) begin
      $display("%-20s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, $sformatf("mechanism '%s' never happened", mech_name[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
