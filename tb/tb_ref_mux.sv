// tb_ref_mux: checks that the 8-to-1 reference multiplexer model passes the input
// chosen by every select code.
module tb_ref_mux;
  real        vin [8];
  real        vout;
  logic [2:0] sel;
  ref_mux dut (.vin, .sel, .vout);
  int checks = 0, failures = 0;
  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 8; i++) vin[i] = 1.25 * real'(i + 1);
    for (int s = 0; s < 8; s++) begin
      sel = 3'(s);
      #1;
      checks++;
      if (vout != 1.25 * real'(s + 1)) begin failures++; $display("FAIL: sel %0d vout %f", s, vout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
