// tb_ir_reg: self-checking test of the instruction register: load on the
// strobe only, hold otherwise, and the one-clock fresh flag after a load.
module tb_ir_reg;
  import sbus_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ld, fresh;
  word_t bus_in, ir;

  ir_reg dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    word_t held;
    ld = 0; bus_in = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(ir == 0 && !fresh, "reset");
    held = 0;
    for (int it = 0; it < 300; it++) begin
      logic l;
      l = 1'($urandom);
      ld = l; bus_in = 8'($urandom);
      @(posedge clk); #1;
      if (l) held = bus_in;
      check(ir == held, "IR value");
      check(fresh == l, "fresh flag");
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
