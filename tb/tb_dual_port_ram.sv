// tb_dual_port_ram: self-checking test of the 64 x 16-bit dual-port DAC data RAM.
//
// Random word and byte writes on the VME port are mirrored in a reference array;
// every clock both ports are read at random addresses and the data returned one
// clock later is compared with the reference as it stood when the read was issued.
module tb_dual_port_ram;
  logic clk = 1'b0;
  always #5 clk = !clk;

  logic        a_wr, b_rd;
  logic [1:0]  a_be;
  logic [5:0]  a_addr, b_addr;
  logic [15:0] a_wdata, a_rdata, b_rdata;

  dual_port_ram dut (.clk, .a_wr, .a_be, .a_addr, .a_wdata, .a_rdata, .b_rd, .b_addr, .b_rdata);

  logic [15:0] ref_mem [64];
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] exp_a, exp_b;
  logic        b_was_rd;

  initial begin
    foreach (ref_mem[i]) ref_mem[i] = '0;
    a_wr = 0; b_rd = 0; a_be = 0; a_addr = 0; b_addr = 0; a_wdata = 0;
    @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      a_wr    = ($urandom_range(0, 2) == 0);
      a_be    = 2'($urandom_range(1, 3));
      a_addr  = 6'($urandom);
      a_wdata = 16'($urandom);
      b_rd    = ($urandom_range(0, 3) != 0);
      b_addr  = 6'($urandom);
      exp_a   = ref_mem[a_addr];
      exp_b   = ref_mem[b_addr];
      b_was_rd = b_rd;
      if (a_wr) begin
        if (a_be[0]) ref_mem[a_addr][7:0]  = a_wdata[7:0];
        if (a_be[1]) ref_mem[a_addr][15:8] = a_wdata[15:8];
      end
      @(posedge clk);
      #1;
      checks++;
      if (a_rdata !== exp_a) begin
        failures++; $display("FAIL: port A addr %0d got %h exp %h", a_addr, a_rdata, exp_a);
      end
      if (b_was_rd) begin
        checks++;
        if (b_rdata !== exp_b) begin
          failures++; $display("FAIL: port B addr %0d got %h exp %h", b_addr, b_rdata, exp_b);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
