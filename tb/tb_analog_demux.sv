// tb_analog_demux: checks the analog demultiplexer model: for every enable and
// address exactly output 8*k+a is connected and carries the input voltage, and
// with no enable raised nothing is connected.
module tb_analog_demux;
  real         vin = 3.3;
  logic [7:0]  en;
  logic [2:0]  a;
  logic [63:0] conn;
  real         vout [64];
  analog_demux dut (.vin, .en, .a, .conn, .vout);
  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    en = 0; a = 0; #1;
    checks++; if (conn != 0) begin failures++; $display("FAIL: connected with no enable"); end
    for (int k = 0; k < 8; k++) begin
      for (int j = 0; j < 8; j++) begin
        en = 8'(1 << k); a = 3'(j); vin = 0.1 * real'(8 * k + j); #1;
        checks++;
        if (conn != 64'(1) << (8 * k + j)) begin failures++; $display("FAIL: k %0d a %0d conn %h", k, j, conn); end
        checks++;
        if (vout[8 * k + j] != vin) begin failures++; $display("FAIL: k %0d a %0d voltage", k, j); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
