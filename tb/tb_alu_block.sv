// tb_alu_block: self-checking test of ACC, B, TMP1 and the ALU.
//
// Loads random ACC, B and TMP1 values, checks every ALU operation against a
// reference computed in the testbench, the carry of ADD/SUB, that MUL writes
// the high byte of ACC*B into B, and that results written back to ACC land.
module tb_alu_block;
  import sbus_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  alu_op_e op;
  logic ld_acc, ld_b, ld_tmp1, mul_wb, ld_cy;
  word_t bus_in, acc, b, result;
  logic cy, acc_zero;

  alu_block dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load(output logic strobe_dummy, input int which, input word_t v);
    strobe_dummy = 0;
    bus_in = v;
    ld_acc = (which == 0); ld_b = (which == 1); ld_tmp1 = (which == 2);
    @(posedge clk); #1;
    ld_acc = 0; ld_b = 0; ld_tmp1 = 0;
  endtask

  initial begin
    logic dummy;
    word_t a, bb, t, expr;
    logic [8:0] wide;
    logic [15:0] pr;
    op = ALU_ADD; ld_acc = 0; ld_b = 0; ld_tmp1 = 0; mul_wb = 0; ld_cy = 0; bus_in = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(acc == 0 && b == 0 && cy == 0 && acc_zero, "reset values");
    for (int it = 0; it < 200; it++) begin
      a = 8'($urandom); bb = 8'($urandom); t = 8'($urandom);
      load(dummy, 0, a); load(dummy, 1, bb); load(dummy, 2, t);
      check(acc == a && b == bb, "ACC/B load");
      check(acc_zero == (a == 0), "acc_zero");
      for (int o = 0; o <= 9; o++) begin
        op = alu_op_e'(o); #1;
        case (op)
          ALU_ADD: begin wide = {1'b0, a} + {1'b0, t}; expr = wide[7:0]; end
          ALU_SUB: begin wide = {1'b0, a} - {1'b0, t}; expr = wide[7:0]; end
          ALU_AND: expr = a & t;
          ALU_OR:  expr = a | t;
          ALU_XOR: expr = a ^ t;
          ALU_INC: expr = a + 1;
          ALU_DEC: expr = a - 1;
          ALU_CPL: expr = ~a;
          ALU_PASS: expr = t;
          default: begin pr = 16'(a) * 16'(bb); expr = pr[7:0]; end
        endcase
        check(result == expr, $sformatf("op %s %h,%h -> %h exp %h", op.name(), a, t, result, expr));
      end
      // ADD into ACC with carry
      op = ALU_ADD; ld_cy = 1; bus_in = result; #1; bus_in = result; ld_acc = 1;
      wide = {1'b0, a} + {1'b0, t};
      @(posedge clk); #1; ld_acc = 0; ld_cy = 0;
      check(acc == wide[7:0] && cy == wide[8], "ADD write-back and carry");
      // MUL: ACC <- low, B <- high
      load(dummy, 0, a);
      op = ALU_MUL; #1; bus_in = result; ld_acc = 1; mul_wb = 1; ld_cy = 1;
      pr = 16'(a) * 16'(bb);
      @(posedge clk); #1; ld_acc = 0; mul_wb = 0; ld_cy = 0;
      check(acc == pr[7:0] && b == pr[15:8] && cy == 0, "MUL write-back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
