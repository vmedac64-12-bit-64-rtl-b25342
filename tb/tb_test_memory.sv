// tb_test_memory: self-checking test of the 1024 x 16-bit test memory.
//
// Random word and byte writes are mirrored in a reference array; a read issued
// every clock is compared one clock later with the reference as it stood when the
// read was issued. All 1024 words are then written and read back in order.
module tb_test_memory;
  logic clk = 1'b0;
  always #5 clk = !clk;

  logic        wr;
  logic [1:0]  be;
  logic [9:0]  addr;
  logic [15:0] wdata, rdata;

  test_memory dut (.clk, .wr, .be, .addr, .wdata, .rdata);

  logic [15:0] ref_mem [1024];
  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] exp_d;

  task automatic step();
    exp_d = ref_mem[addr];
    if (wr) begin
      if (be[0]) ref_mem[addr][7:0]  = wdata[7:0];
      if (be[1]) ref_mem[addr][15:8] = wdata[15:8];
    end
    @(posedge clk);
    #1;
    checks++;
    if (rdata !== exp_d) begin
      failures++; $display("FAIL: addr %0d got %h exp %h", addr, rdata, exp_d);
    end
    @(negedge clk);
  endtask

  initial begin
    foreach (ref_mem[i]) ref_mem[i] = '0;
    wr = 0; be = 0; addr = 0; wdata = 0;
    @(negedge clk);
    for (int i = 0; i < 1024; i++) begin
      wr = 1; be = 2'b11; addr = 10'(i); wdata = 16'(i * 40503); step();
    end
    for (int n = 0; n < 4000; n++) begin
      wr = ($urandom_range(0, 2) == 0); be = 2'($urandom_range(1, 3));
      addr = 10'($urandom); wdata = 16'($urandom); step();
    end
    wr = 0;
    for (int i = 0; i < 1024; i++) begin addr = 10'(i); step(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
