// tb_pc_unit: self-checking test of the program counter.
//
// Checks the reset value, that each ROM read advances the PC by one, that a
// byte staged on PCH does not change the PC until PCL is loaded, and that the
// PCL load sets the full 16-bit jump target even in a clock with a ROM read.
module tb_pc_unit;
  import sbus_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ld_pcl, ld_pch, rom_rd;
  word_t bus_in;
  logic [15:0] pc;

  pc_unit dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [15:0] exp_pc;
    logic [15:0] tgt;
    ld_pcl = 0; ld_pch = 0; rom_rd = 0; bus_in = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(pc == 16'h0000, "reset PC");
    exp_pc = 0;
    for (int it = 0; it < 100; it++) begin
      int n;
      n = $urandom_range(1, 5);
      for (int i = 0; i < n; i++) begin
        rom_rd = 1; @(posedge clk); #1; rom_rd = 0; exp_pc++;
        check(pc == exp_pc, "increment on ROM read");
      end
      @(posedge clk); #1;
      check(pc == exp_pc, "hold without ROM read");
      tgt = 16'($urandom);
      bus_in = tgt[15:8]; ld_pch = 1; rom_rd = 1; @(posedge clk); #1; ld_pch = 0; exp_pc++;
      check(pc == exp_pc, "PCH staging leaves PC alone");
      bus_in = tgt[7:0]; ld_pcl = 1; rom_rd = 1; @(posedge clk); #1; ld_pcl = 0; rom_rd = 0;
      exp_pc = tgt;
      check(pc == tgt, $sformatf("jump to %h got %h", tgt, pc));
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
