// tb_timing_gen: self-checking test of the machine-cycle timing generator.
//
// Runs a sequence of instructions of 1, 2 and 4 machine cycles, loading each
// length one clock after the instruction starts, and checks every clock
// against a reference counter: stage S1..S6, phase alternating precharge /
// evaluation, the machine-cycle index, and instr_start / instr_last. Also
// checks the cycle count of each instruction: 12, 24 or 48 clocks.
module tb_timing_gen;
  import sbus_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic len_ld;
  ilen_e len;
  logic [2:0] stage;
  logic eval;
  logic [1:0] mcycle;
  logic instr_start, instr_last;

  timing_gen dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  ilen_e seq [10] = '{LEN1, LEN2, LEN4, LEN1, LEN4, LEN2, LEN2, LEN1, LEN4, LEN1};

  initial begin
    int ncyc, clocks;
    len_ld = 0; len = LEN1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 10; i++) begin
      ncyc = (seq[i] == LEN1) ? 1 : (seq[i] == LEN2) ? 2 : 4;
      clocks = 0;
      for (int m = 0; m < ncyc; m++)
        for (int s = 0; s < 6; s++)
          for (int p = 0; p < 2; p++) begin
            // length is decoded one clock into the instruction (S1 P2)
            len_ld = (m == 0 && s == 0 && p == 1);
            len    = seq[i];
            #1;
            check(stage == 3'(s), $sformatf("instr %0d stage %0d exp %0d", i, stage, s));
            check(eval == (p == 1), "phase");
            check(mcycle == 2'(m), $sformatf("instr %0d mcycle %0d exp %0d", i, mcycle, m));
            check(instr_start == (m == 0 && s == 0 && p == 0), "instr_start");
            check(instr_last == (m == ncyc - 1 && s == 5 && p == 1), "instr_last");
            @(posedge clk);
            #1;
            clocks++;
          end
      check(clocks == 12 * ncyc, "clocks per instruction");
      check(instr_start, "next instruction starts right after the last clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
