// vme_master: a simple VMEbus master used by the testbenches to drive a slave
// through its buffered signals.
//
// Offers single 16-bit or byte writes and reads, BLT16 block writes and reads and
// interrupt acknowledge cycles. Every cycle waits for DTACK* for at most
// TIMEOUT clocks; a cycle that times out returns ok = 0. Strobes change on the
// falling clock edge and are held for a few clocks so that the slave's
// synchronisers see clean edges. be[1] selects the even byte (DS1*, D15..D8),
// be[0] the odd byte (DS0*, D7..D0).
module vme_master #(
  parameter int unsigned TIMEOUT = 200
) (
  input  logic        clk,
  output logic        as_n,
  output logic [1:0]  ds_n,
  output logic        write_n,
  output logic        lword_n,
  output logic        iack_n,
  output logic        iackin_n,
  output logic [5:0]  am,
  output logic [23:1] addr,
  output logic [15:0] data,
  input  logic [15:0] slave_data,
  input  logic        slave_oe,
  input  logic        dtack_n
);

  initial begin
    as_n = 1'b1; ds_n = 2'b11; write_n = 1'b1; lword_n = 1'b1;
    iack_n = 1'b1; iackin_n = 1'b1; am = 6'h00; addr = '0; data = '0;
  end

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic wait_dtack(output logic ok);
    int n = 0;
    ok = 1'b0;
    while (n < int'(TIMEOUT)) begin
      @(negedge clk);
      if (!dtack_n) begin ok = 1'b1; break; end
      n++;
    end
  endtask

  task automatic wait_release();
    int n = 0;
    while (!dtack_n && n < int'(TIMEOUT)) begin @(negedge clk); n++; end
  endtask

  task automatic start(input logic [23:0] a, input logic [5:0] m, input logic wr);
    @(negedge clk);
    addr = a[23:1]; am = m; write_n = !wr; lword_n = 1'b1; iack_n = 1'b1;
    idle(1);
    as_n = 1'b0;
    idle(1);
  endtask

  task automatic finish();
    idle(1);
    as_n = 1'b1; write_n = 1'b1;
    idle(3);
  endtask

  task automatic xfer(input logic wr, input logic [1:0] be, input logic [15:0] wd,
                      output logic [15:0] rd, output logic ok);
    data = wd;
    ds_n = ~be;
    wait_dtack(ok);
    rd = slave_oe ? slave_data : 16'hDEAD;
    idle(1);
    ds_n = 2'b11;
    wait_release();
    idle(1);
  endtask

  task automatic write(input logic [23:0] a, input logic [15:0] d, input logic [1:0] be,
                       output logic ok, input logic [5:0] m = 6'h39);
    logic [15:0] dummy;
    start(a, m, 1'b1);
    xfer(1'b1, be, d, dummy, ok);
    finish();
  endtask

  task automatic read(input logic [23:0] a, input logic [1:0] be, output logic [15:0] d,
                      output logic ok, input logic [5:0] m = 6'h39);
    start(a, m, 1'b0);
    xfer(1'b0, be, '0, d, ok);
    finish();
  endtask

  // BLT16 write of n words starting at a; ok is the AND of every transfer
  task automatic blt_write(input logic [23:0] a, input logic [15:0] d [], output logic ok);
    logic [15:0] dummy;
    logic o;
    ok = 1'b1;
    start(a, 6'h3B, 1'b1);
    foreach (d[i]) begin
      xfer(1'b1, 2'b11, d[i], dummy, o);
      ok &= o;
    end
    finish();
  endtask

  task automatic blt_read(input logic [23:0] a, input int n, output logic [15:0] d [],
                          output logic ok);
    logic o;
    d = new[n];
    ok = 1'b1;
    start(a, 6'h3B, 1'b0);
    for (int i = 0; i < n; i++) begin
      xfer(1'b0, 2'b11, '0, d[i], o);
      ok &= o;
    end
    finish();
  endtask

  // Interrupt acknowledge of the given level; returns the status/ID byte.
  task automatic iack(input logic [2:0] level, output logic [7:0] vec, output logic ok);
    logic [15:0] rd;
    @(negedge clk);
    addr = {20'd0, level}; am = 6'h00; write_n = 1'b1; lword_n = 1'b1; iack_n = 1'b0;
    idle(1);
    as_n = 1'b0;
    idle(1);
    iackin_n = 1'b0;
    xfer(1'b0, 2'b01, '0, rd, ok);
    vec = rd[7:0];
    idle(1);
    as_n = 1'b1; iack_n = 1'b1; iackin_n = 1'b1;
    idle(3);
  endtask

endmodule
