// tb_mdac12: checks the multiplying DAC model: the code is taken only while CS*
// and WEN* are both low and held afterwards, the unipolar output is
// vref*code/4096 and the bipolar output vref*(code-2048)/2048, and the output
// scales with the reference.
module tb_mdac12;
  logic [11:0] d = 0;
  logic        cs_n = 1, wr_n = 1, bipolar = 0;
  real         vref = 10.0, vout;
  mdac12 dut (.d, .cs_n, .wr_n, .bipolar, .vref, .vout);
  int checks = 0, failures = 0;
  task automatic check(input real exp_v, input string what);
    checks++;
    if (vout > exp_v + 1e-9 || vout < exp_v - 1e-9) begin
      failures++; $display("FAIL: %s: %f exp %f", what, vout, exp_v);
    end
  endtask
  task automatic load(input logic [11:0] c);
    d = c; #10 cs_n = 0; #10 wr_n = 0; #10 wr_n = 1; #10 cs_n = 1; #10;
  endtask
  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1;
    check(0.0, "power-up code 0");
    load(12'd2048);  check(5.0, "mid scale unipolar");
    load(12'hFFF);   check(10.0 * 4095.0 / 4096.0, "full scale unipolar");
    d = 12'd100; #10; check(10.0 * 4095.0 / 4096.0, "data ignored without CS/WEN");
    cs_n = 0; #10;   check(10.0 * 4095.0 / 4096.0, "data ignored with CS only");
    cs_n = 1; wr_n = 0; #10; check(10.0 * 4095.0 / 4096.0, "data ignored with WEN only");
    wr_n = 1;
    load(12'd1024);  check(2.5, "quarter scale");
    vref = 5.0; #1;  check(1.25, "follows reference");
    bipolar = 1; #1; check(-2.5, "bipolar quarter scale");
    load(12'd0);     check(-5.0, "bipolar zero code");
    load(12'd2048);  check(0.0, "bipolar mid scale");
    load(12'hFFF);   check(5.0 * 2047.0 / 2048.0, "bipolar full scale");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
