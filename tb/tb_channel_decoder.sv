// tb_channel_decoder: exhaustive test of the one-of-64 channel decoder.
//
// For every channel, with the sample window closed and open, checks that
// MUX_A2..0 carry the low three channel bits and that exactly the enable
// MUX_EN(ch/8 + 1) is raised, and only while the window is open.
module tb_channel_decoder;
  logic [5:0] ch;
  logic       window;
  logic [2:0] mux_a;
  logic [7:0] mux_en;

  channel_decoder dut (.ch, .window, .mux_a, .mux_en);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 64; c++) begin
      for (int w = 0; w < 2; w++) begin
        ch = 6'(c); window = w[0];
        #1;
        checks++;
        if (mux_a != 3'(c % 8)) begin failures++; $display("FAIL: ch %0d mux_a %0d", c, mux_a); end
        checks++;
        if (mux_en != (w == 1 ? 8'(1 << (c / 8)) : 8'h00)) begin
          failures++; $display("FAIL: ch %0d window %0d mux_en %b", c, w, mux_en);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
