// tb_prog_rom: self-checking test of the 2K x 8 program ROM.
//
// Reads the ROM with its default content (the example program) and compares
// the bytes against the program listing written out here, checks that every
// address past the program reads 00h, and that the top address is reachable.
module tb_prog_rom;
  import sbus_pkg::*;

  logic [10:0] addr;
  word_t rdata;

  prog_rom dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // example program bytes, 0000h..0036h
  byte unsigned prog [55] = '{
    8'h74, 8'h5A, 8'hF5, 8'h30, 8'h04, 8'hF5, 8'h31, 8'h04, 8'hF5, 8'h32,
    8'hE5, 8'h30, 8'h64, 8'h5A, 8'hF5, 8'h90, 8'hE5, 8'h31, 8'h64, 8'h5B,
    8'hF5, 8'h90, 8'hE5, 8'h32, 8'h65, 8'h31, 8'hF5, 8'hA0, 8'hE5, 8'hB0,
    8'hF5, 8'hF0, 8'h74, 8'h0A, 8'hA4, 8'hF5, 8'h80, 8'hE5, 8'hF0, 8'h04,
    8'hF5, 8'h33, 8'hE5, 8'h33, 8'h64, 8'h01, 8'hF5, 8'hB0, 8'h74, 8'hA5,
    8'hF5, 8'h90, 8'h02, 8'h00, 8'h34};

  initial begin
    for (int a = 0; a < 2048; a++) begin
      addr = 11'(a);
      #1;
      if (a < 55) check(rdata == prog[a], $sformatf("ROM[%0h]=%h exp %h", a, rdata, prog[a]));
      else        check(rdata == 8'h00, $sformatf("ROM[%0h]=%h exp 00", a, rdata));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
