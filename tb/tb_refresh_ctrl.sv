// tb_refresh_ctrl: self-checking test of the refresh control logic.
//
// The 0.5 us tick is given every second clock, and a behavioural RAM with random
// 12-bit codes answers the DAC port with one clock of latency. Watching the DAC
// and distributor pins, the test checks in every channel slot: channels come in
// order 0..63, the DAC data at the write strobe is that channel's word, CS* is low
// for 4 ticks (2 us), WEN* low for 1 tick (0.5 us) inside it, the sample window
// opens 20 ticks (10 us) after CS* falls and stays open 200 ticks (100 us), or 90
// (45 us) in FAST REFRESH, and slots repeat every 110 us (55 us). It also checks
// that a full pass, measured between cycle_done pulses, is 7.040 ms and, in FAST
// REFRESH, 3.52 ms.
module tb_refresh_ctrl;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  logic        tick = 0, fast_refresh = 0;
  logic        ram_rd;
  logic [5:0]  ram_addr, ch;
  logic [15:0] ram_rdata;
  logic [11:0] dac_data;
  logic        dac_cs_n, dac_wr_n, sample_window, cycle_done;

  refresh_ctrl dut (.clk, .rst_n, .tick, .fast_refresh, .ram_rd, .ram_addr, .ram_rdata,
                    .dac_data, .dac_cs_n, .dac_wr_n, .ch, .sample_window, .cycle_done);

  logic [15:0] mem [64];
  initial foreach (mem[i]) mem[i] = 16'($urandom);
  always_ff @(posedge clk) if (ram_rd) ram_rdata <= mem[ram_addr];

  always @(posedge clk) tick <= rst_n && !tick;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // tick counter and edge bookkeeping
  longint tk = 0;
  longint cs_fall = -1, wr_fall = -1, win_rise = -1, last_cs_fall = -1, last_done = -1;
  logic   p_cs = 1, p_wr = 1, p_win = 0;
  int     exp_ch = 0, slots = 0, passes_normal = 0, passes_fast = 0;
  logic   mode_at_slot;
  int     sh_ticks, slot_ticks;
  bit     settle_pass = 0;  // first pass after a mode change is not measured

  always @(posedge clk) begin
    if (tick) tk++;
    #1;
    sh_ticks   = fast_refresh ? 90 : 200;
    slot_ticks = 20 + sh_ticks;
    if (p_cs && !dac_cs_n) begin
      cs_fall = tk;
      check(ch == 6'(exp_ch), $sformatf("channel order: got %0d exp %0d", ch, exp_ch));
      exp_ch = (exp_ch + 1) % 64;
      if (last_cs_fall >= 0 && !settle_pass)
        check(cs_fall - last_cs_fall == slot_ticks,
              $sformatf("slot length %0d ticks", cs_fall - last_cs_fall));
      last_cs_fall = cs_fall;
      slots++;
    end
    if (!p_cs && dac_cs_n)
      check(tk - cs_fall == 4, $sformatf("CS low %0d ticks", tk - cs_fall));
    if (p_wr && !dac_wr_n) begin
      wr_fall = tk;
      check(!dac_cs_n && wr_fall - cs_fall == 1, "WEN falls 1 tick into CS");
      check(dac_data == mem[ch][11:0], $sformatf("ch %0d DAC data %h exp %h", ch, dac_data, mem[ch][11:0]));
    end
    if (!p_wr && dac_wr_n)
      check(tk - wr_fall == 1, $sformatf("WEN low %0d ticks", tk - wr_fall));
    if (!p_win && sample_window) begin
      win_rise = tk;
      check(win_rise - cs_fall == 20, $sformatf("window opens %0d ticks after CS", win_rise - cs_fall));
    end
    if (p_win && !sample_window && !settle_pass)
      check(tk - win_rise == sh_ticks, $sformatf("window %0d ticks", tk - win_rise));
    if (cycle_done) begin
      check(ch == 6'd0 && exp_ch == 1, "cycle_done as channel 63 hands over to channel 0");
      if (last_done >= 0 && !settle_pass) begin
        // ticks are 0.5 us: 7.040 ms = 14080 ticks, 3.52 ms = 7040 ticks
        check((tk - last_done) == (fast_refresh ? 7040 : 14080),
              $sformatf("pass took %0.1f us", real'(tk - last_done) * 0.5));
        if (fast_refresh) passes_fast++; else passes_normal++;
      end
      if (last_done >= 0) settle_pass = 0;
      last_done = tk;
    end
    p_cs = dac_cs_n; p_wr = dac_wr_n; p_win = sample_window;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (passes_normal == 2);
    @(negedge clk);
    fast_refresh = 1;
    settle_pass = 1;
    wait (passes_fast == 2);
    repeat (10) @(posedge clk);
    check(slots > 64 * 5, "enough slots seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
