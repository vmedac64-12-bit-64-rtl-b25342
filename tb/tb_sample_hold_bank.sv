// tb_sample_hold_bank: checks the sample-and-hold model: a connected channel
// follows its input, a disconnected one keeps the last value while the input
// moves, and channels are independent.
module tb_sample_hold_bank;
  real         vin [64];
  logic [63:0] conn = 0;
  real         vhold [64];
  sample_hold_bank dut (.vin, .conn, .vhold);
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    foreach (vin[i]) vin[i] = 0.0;
    #1;
    for (int i = 0; i < 64; i++) begin
      vin[i] = real'(i) * 0.125 - 4.0;
      conn[i] = 1; #1;
      check(vhold[i] == vin[i], $sformatf("ch %0d tracks", i));
      conn[i] = 0; #1;
      vin[i] = 99.0; #1;
      check(vhold[i] == real'(i) * 0.125 - 4.0, $sformatf("ch %0d holds", i));
    end
    for (int i = 0; i < 64; i++)
      check(vhold[i] == real'(i) * 0.125 - 4.0, $sformatf("ch %0d kept", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
