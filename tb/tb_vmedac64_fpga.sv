// tb_vmedac64_fpga: end-to-end test of the FPGA logic at its default parameters
// (16 MHz clock, 110 us / 55 us channel slots).
//
// A VME master loads all 64 channel codes (single word writes, byte writes and a
// BLT16 block), reads them back with BLT16, programs the CSR, exercises the test
// memory, the status register and an unmapped offset. The DAC and distributor pins
// are then watched for full refresh passes: the code presented at each DAC write
// strobe must be the one the host wrote for that channel, the demultiplexer
// enable and address must select that channel, and a pass must take 7.040 ms
// (112640 clocks), or 3.52 ms with FAST REFRESH. Finally the end-of-pass
// interrupt is raised at the programmed level and acknowledged with the vector,
// and an acknowledge at another level is passed down the daisy chain.
module tb_vmedac64_fpga;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  localparam logic [7:0] BOARD = 8'hC1;
  localparam int unsigned CLK_PER_PASS = 112640;  // 7.040 ms at 16 MHz

  logic        as_n, write_n, lword_n, iack_n, iackin_n, iackout_n;
  logic [1:0]  ds_n;
  logic [5:0]  am;
  logic [23:1] addr;
  logic [15:0] mdata, sdata;
  logic        data_oe, dtack_n;
  logic [7:1]  irq_n;
  logic [11:0] dac_data;
  logic        dac_cs_n, dac_wr_n, output_en, sample_window, cycle_done;
  logic [2:0]  ref_sel, mux_a;
  logic [7:0]  mux_en;
  logic [5:0]  cur_ch;

  vmedac64_fpga dut (
    .clk, .rst_n, .board_addr(BOARD),
    .as_n, .ds_n, .write_n, .lword_n, .iack_n, .iackin_n, .iackout_n, .am, .addr,
    .data_in(mdata), .data_out(sdata), .data_oe, .dtack_n, .irq_n,
    .dac_data, .dac_cs_n, .dac_wr_n, .ref_sel, .mux_a, .mux_en, .output_en,
    .cur_ch, .sample_window, .cycle_done
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
    repeat (1200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected codes
  logic [15:0] codes [64];

  // pin monitor, armed by the stimulus
  bit     monitor = 0;
  int     dac_loads = 0, window_checks = 0, passes_normal = 0, passes_fast = 0;
  longint cyc = 0, last_done = -1;
  logic   p_wr = 1;
  bit     fast_now = 0, skip_next = 1;

  always @(posedge clk) begin
    cyc++;
    #1;
    if (monitor) begin
      if (p_wr && !dac_wr_n) begin
        dac_loads++;
        check(dac_data == codes[cur_ch][11:0],
              $sformatf("ch %0d DAC code %h exp %h", cur_ch, dac_data, codes[cur_ch][11:0]));
      end
      if (sample_window && (cyc % 97) == 0) begin
        window_checks++;
        check(mux_en == 8'(1 << cur_ch[5:3]) && mux_a == cur_ch[2:0],
              $sformatf("ch %0d mux_en %b mux_a %0d", cur_ch, mux_en, mux_a));
      end
      if (!sample_window) check(mux_en == 0, "demux off outside window");
      if (cycle_done) begin
        if (last_done >= 0 && !skip_next) begin
          check(cyc - last_done == (fast_now ? CLK_PER_PASS / 2 : CLK_PER_PASS),
                $sformatf("pass %0d clocks", cyc - last_done));
          if (fast_now) passes_fast++; else passes_normal++;
        end
        skip_next = 0;
        last_done = cyc;
      end
    end
    p_wr = dac_wr_n;
  end

  logic        ok;
  logic [15:0] rd;
  logic [7:0]  vec;
  logic [15:0] blk [];
  logic [15:0] got [];
  bit          passed_on = 0;

  always @(posedge clk) if (!iackout_n) passed_on = 1;

  initial begin
    foreach (codes[i]) codes[i] = 16'($urandom) & 16'h0FFF;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    // channels 0..15: single word writes
    for (int i = 0; i < 16; i++) begin
      bus.write({BOARD, 16'(2 * i)}, codes[i], 2'b11, ok);
      check(ok, $sformatf("write ch %0d", i));
    end
    // channels 16..31: even byte then odd byte
    for (int i = 16; i < 32; i++) begin
      bus.write({BOARD, 16'(2 * i)}, {codes[i][15:8], 8'h00}, 2'b10, ok);
      check(ok, "even byte write");
      bus.write({BOARD, 16'(2 * i + 1)}, {8'h00, codes[i][7:0]}, 2'b01, ok);
      check(ok, "odd byte write");
    end
    // channels 32..63: one BLT16 block
    blk = new[32];
    foreach (blk[i]) blk[i] = codes[32 + i];
    bus.blt_write({BOARD, 16'h0040}, blk, ok);
    check(ok, "BLT write");
    // read all 64 back in one BLT16 block
    bus.blt_read({BOARD, 16'h0000}, 64, got, ok);
    check(ok, "BLT read");
    foreach (got[i]) check(got[i] == codes[i], $sformatf("read back ch %0d %h", i, got[i]));

    // CSR: REF_SEL = 2, OUTPUT ENABLE
    bus.write({BOARD, 16'h0100}, 16'h0012, 2'b11, ok);
    check(ok && ref_sel == 3'd2 && output_en, "CSR drives REF_SEL and OUTPUT ENABLE");
    bus.read({BOARD, 16'h0100}, 2'b11, rd, ok);
    check(ok && rd == 16'h0012, "CSR read back");

    // test memory and unmapped offset
    bus.write({BOARD, 16'h0A02}, 16'hBEEF, 2'b11, ok);
    bus.read({BOARD, 16'h0A02}, 2'b11, rd, ok);
    check(ok && rd == 16'hBEEF, "test memory");
    bus.read({BOARD, 16'h0010}, 2'b11, rd, ok);
    check(ok && rd == codes[8], "test memory write left RAM alone");
    bus.read({BOARD, 16'h0600}, 2'b11, rd, ok);
    check(ok && rd == 16'h0000, "unmapped offset reads zero");

    // status register follows the refresh channel
    bus.read({BOARD, 16'h0104}, 2'b11, rd, ok);
    check(ok && (rd[5:0] == cur_ch || rd[5:0] + 6'd1 == cur_ch), "status channel");

    // watch two normal passes, then two fast passes
    monitor = 1;
    wait (passes_normal == 2);
    bus.write({BOARD, 16'h0100}, 16'h001A, 2'b11, ok);
    fast_now = 1; skip_next = 1;
    wait (passes_fast == 2);
    check(dac_loads >= 64 * 4, $sformatf("%0d DAC loads", dac_loads));
    check(window_checks > 64, "windows observed");

    // interrupt at level 3 with vector 0x5C at the end of a pass
    bus.write({BOARD, 16'h0102}, 16'h005C, 2'b11, ok);
    bus.write({BOARD, 16'h0100}, 16'h033A, 2'b11, ok);  // IRQ level 3, enabled, fast
    wait (irq_n != 7'h7F);
    check(irq_n == 7'b111_1011, $sformatf("IRQ3 asserted, irq_n %b", irq_n));
    bus.iack(3'd5, vec, ok);
    check(!ok && passed_on, "level 5 acknowledge passed down the chain");
    bus.iack(3'd3, vec, ok);
    check(ok && vec == 8'h5C, $sformatf("vector %h", vec));
    check(irq_n[3] == 1'b1 || cycle_done, "IRQ3 released on acknowledge");
    bus.read({BOARD, 16'h0104}, 2'b11, rd, ok);
    check(ok, "status read after IACK");

    $display("normal passes %0d, fast passes %0d, DAC loads %0d", passes_normal, passes_fast, dac_loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
