// tb_reference_bank: checks that the reference bank model supplies 2.5 V, 5 V and
// 10 V on its three outputs.
module tb_reference_bank;
  real vref [3];
  reference_bank dut (.vref);
  int checks = 0, failures = 0;
  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1;
    checks++; if (vref[0] != 2.5)  begin failures++; $display("FAIL: vref0 %f", vref[0]); end
    checks++; if (vref[1] != 5.0)  begin failures++; $display("FAIL: vref1 %f", vref[1]); end
    checks++; if (vref[2] != 10.0) begin failures++; $display("FAIL: vref2 %f", vref[2]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
