// tb_vme_interrupter: self-checking test of the VME interrupter.
//
// Checks that a request drives only the IRQ line of the programmed level, that an
// acknowledge at that level is answered (respond) and not passed on, that an
// acknowledge at another level, or with nothing pending, is passed down the daisy
// chain (IACKOUT*), that the request is released on acknowledge, and that level 0
// disables the interrupter.
module tb_vme_interrupter;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  logic       irq_req = 0, iack_active = 0, iackin_n = 1, ack_done = 0;
  logic [2:0] irq_level = 0, ack_level = 0;
  logic       respond, iackout_n, pending;
  logic [7:1] irq_n;

  vme_interrupter dut (.clk, .rst_n, .irq_req, .irq_level, .iack_active, .ack_level, .iackin_n,
                       .ack_done, .respond, .iackout_n, .irq_n, .pending);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic request();
    @(negedge clk); irq_req = 1; @(negedge clk); irq_req = 0;
  endtask

  // run an IACK cycle at level l; report what the interrupter did
  task automatic ack(input logic [2:0] l, output logic resp, output logic passed);
    @(negedge clk); iack_active = 1; ack_level = l;
    @(negedge clk); iackin_n = 0;
    repeat (2) @(negedge clk);
    resp = respond; passed = !iackout_n;
    if (resp) begin ack_done = 1; @(negedge clk); ack_done = 0; end
    @(negedge clk); iack_active = 0; iackin_n = 1;
    @(negedge clk);
  endtask

  logic r, p;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(irq_n == 7'h7F && !pending, "idle after reset");

    irq_level = 3'd4;
    request();
    check(pending && irq_n == 7'b111_0111, $sformatf("IRQ4 only, irq_n %b", irq_n));

    ack(3'd2, r, p);
    check(!r && p, "level 2 acknowledge passed on");
    check(pending, "still pending after foreign acknowledge");

    ack(3'd4, r, p);
    check(r && !p, "level 4 acknowledge answered, not passed");
    check(!pending && irq_n == 7'h7F, "released on acknowledge");

    ack(3'd4, r, p);
    check(!r && p, "nothing pending: acknowledge passed on");

    irq_level = 3'd7;
    request();
    check(irq_n == 7'b011_1111, "IRQ7");
    irq_level = 3'd0;
    @(negedge clk); @(negedge clk);
    check(!pending && irq_n == 7'h7F, "level 0 drops the request");
    request();
    check(!pending && irq_n == 7'h7F, "level 0 ignores requests");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
