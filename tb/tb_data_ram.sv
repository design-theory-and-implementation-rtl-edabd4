// tb_data_ram: self-checking test of the 128 x 8 data RAM and its RAR.
//
// Writes every word through the RAR/data sequence the bus uses (address
// transfer, then data transfer), then reads all of them back in a different
// order against a reference array; checks that RAR bit 7 does not select a
// different word and that a write needs the write strobe.
module tb_data_ram;
  import sbus_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ld_rar, we;
  word_t bus_in, rar, rdata;

  data_ram dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  word_t ref_mem [128];

  task automatic set_addr(word_t a);
    bus_in = a; ld_rar = 1; @(posedge clk); #1; ld_rar = 0;
  endtask

  initial begin
    ld_rar = 0; we = 0; bus_in = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(rar == 0, "RAR reset");
    for (int a = 0; a < 128; a++) begin
      ref_mem[a] = 8'($urandom);
      set_addr(8'(a));
      bus_in = ref_mem[a]; we = 1; @(posedge clk); #1; we = 0;
    end
    for (int i = 0; i < 128; i++) begin
      int a;
      a = (i * 37 + 11) % 128;
      set_addr(8'(a));
      check(rar == 8'(a), "RAR holds address");
      check(rdata == ref_mem[a], $sformatf("read %0d got %h exp %h", a, rdata, ref_mem[a]));
      set_addr(8'(a) | 8'h80);
      check(rdata == ref_mem[a], "bit 7 ignored");
    end
    set_addr(8'd5);
    bus_in = ~ref_mem[5]; @(posedge clk); #1;
    check(rdata == ref_mem[5], "no write without strobe");
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
