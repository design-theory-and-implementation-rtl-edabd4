// prog_rom: the 2K x 8 program ROM that holds the application program.
//
// It is a send-only bus device: in the evaluation phase in which the ROM is
// the sender, the byte at the program address drives the bus. The program
// address comes straight from the program counter, not over the bus. Content
// is read from a hex file at elaboration (INIT_FILE, relative to the directory
// the tools run in); locations it does not cover hold 00h. The 2K x 8 size
// follows the published chip; in the chip it is a ROM macro, here it is an array with
// an asynchronous read. A synthesis flow that does not apply $readmemh sees
// an all-zero ROM; a mask ROM would be generated from the same file.
module prog_rom
  import sbus_pkg::*;
#(
  parameter int unsigned DEPTH     = 2048,
  parameter string       INIT_FILE = "rtl/ap1_memtest.hex"
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  output word_t                    rdata
);

  word_t mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign rdata = mem[addr];

endmodule
