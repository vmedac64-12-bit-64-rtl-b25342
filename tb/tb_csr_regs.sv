// tb_csr_regs: self-checking test of the control and status registers.
//
// Checks reset values, the field decode of the CSR (REF_SEL, FAST REFRESH, OUTPUT
// ENABLE, IRQ enable, IRQ level), that reserved bits read as zero, byte-enable
// writes, the vector register, and that the read-only status register reflects
// the refresh channel, the sample window and the pending interrupt and ignores
// writes. Reads return data one clock after the strobe.
module tb_csr_regs;
  import vmedac64_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  logic        wr = 0, rd = 0;
  logic [1:0]  idx = 0, be = 0;
  logic [15:0] wdata = 0, rdata;
  csr_t        csr;
  logic [7:0]  irq_vector;
  logic [5:0]  cur_ch = 6'd37;
  logic        sample_window = 1'b1, irq_pending = 1'b0;

  csr_regs dut (.clk, .rst_n, .wr, .rd, .idx, .be, .wdata, .rdata, .csr, .irq_vector,
                .cur_ch, .sample_window, .irq_pending);

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

  task automatic wreg(input logic [1:0] i, input logic [15:0] d, input logic [1:0] b);
    @(negedge clk); wr = 1; idx = i; wdata = d; be = b;
    @(negedge clk); wr = 0;
  endtask

  task automatic rreg(input logic [1:0] i, output logic [15:0] d);
    @(negedge clk); rd = 1; idx = i;
    @(negedge clk); rd = 0; d = rdata;
  endtask

  logic [15:0] v;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(csr == '0 && irq_vector == 0, "reset values");
    rreg(0, v); check(v == 16'h0000, "CSR reads zero after reset");

    wreg(0, 16'hFFFF, 2'b11);
    rreg(0, v); check(v == 16'h073F, $sformatf("reserved bits masked, got %h", v));
    check(csr.ref_sel == 3'd7 && csr.fast_refresh && csr.output_en && csr.irq_en && csr.irq_level == 3'd7,
          "all fields set");

    wreg(0, 16'h0000, 2'b01);
    rreg(0, v); check(v == 16'h0700, $sformatf("low byte cleared only, got %h", v));
    check(csr.ref_sel == 0 && !csr.fast_refresh && !csr.output_en && !csr.irq_en, "low fields clear");

    wreg(0, 16'h0012, 2'b11);
    check(csr.ref_sel == 3'd2 && !csr.fast_refresh && csr.output_en && csr.irq_level == 0,
          "REF_SEL=2, OUTPUT ENABLE");
    wreg(0, 16'h0308, 2'b11);
    check(csr.ref_sel == 0 && csr.fast_refresh && !csr.output_en && csr.irq_level == 3'd3,
          "FAST REFRESH, IRQ level 3");

    wreg(1, 16'h5AC3, 2'b11);
    check(irq_vector == 8'hC3, "vector written");
    rreg(1, v); check(v == 16'h00C3, "vector read");

    rreg(2, v); check(v == {1'b0, 6'd0, 1'b1, 2'd0, 6'd37}, $sformatf("status %h", v));
    irq_pending = 1; sample_window = 0; cur_ch = 6'd5;
    rreg(2, v); check(v == {1'b1, 6'd0, 1'b0, 2'd0, 6'd5}, $sformatf("status %h", v));
    wreg(2, 16'hFFFF, 2'b11);
    rreg(0, v); check(v == 16'h0308, "status write does not touch CSR");

    rst_n = 0; #1; rst_n = 1;
    check(csr == '0 && irq_vector == 0, "asynchronous reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
