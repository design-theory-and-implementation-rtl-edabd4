// tb_io_port: self-checking test of one I/O port: latch resets to FFh, loads
// on the strobe only, drives pins_out, and a read returns the pin levels.
module tb_io_port;
  import sbus_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ld;
  word_t bus_in, pins_in, pins_out, rdata;

  io_port dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    word_t latch;
    ld = 0; bus_in = 0; pins_in = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(pins_out == 8'hFF, "reset latch FFh");
    latch = 8'hFF;
    for (int it = 0; it < 300; it++) begin
      logic l;
      l = 1'($urandom);
      ld = l; bus_in = 8'($urandom); pins_in = 8'($urandom);
      #1;
      check(rdata == pins_in, "read returns pins");
      @(posedge clk); #1;
      if (l) latch = bus_in;
      check(pins_out == latch, "latch");
      ld = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
