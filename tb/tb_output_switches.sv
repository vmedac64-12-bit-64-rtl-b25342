// tb_output_switches: checks the output switch model: with OUTPUT ENABLE set all
// 64 outputs carry their buffer voltages, with it clear all are disconnected.
module tb_output_switches;
  real  vin [64];
  logic enable = 0;
  logic closed;
  real  vout [64];
  output_switches dut (.vin, .enable, .closed, .vout);
  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    foreach (vin[i]) vin[i] = 0.5 + real'(i);
    #1;
    checks++; if (closed) begin failures++; $display("FAIL: closed while disabled"); end
    foreach (vout[i]) begin checks++; if (vout[i] != 0.0) begin failures++; $display("FAIL: ch %0d open", i); end end
    enable = 1; #1;
    checks++; if (!closed) begin failures++; $display("FAIL: open while enabled"); end
    foreach (vout[i]) begin checks++; if (vout[i] != vin[i]) begin failures++; $display("FAIL: ch %0d closed", i); end end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
