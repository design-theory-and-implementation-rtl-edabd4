// data_ram: the 128 x 8 internal data RAM with its RAM address register (RAR).
//
// Two bus endpoints reach it: RAR, which latches an address from the bus, and
// the RAM data port, which is written from the bus or read onto the bus at the
// address held in RAR. Only the low seven bits of RAR select a word.
// The 128 x 8 size follows the published chip; in the chip it is a RAM macro, here it
// is an array. Read is asynchronous (the word at RAR is on rdata in the same
// clock), write takes effect at the clock edge ending the evaluation phase.
// RAR resets to 0; the array contents are not reset.
module data_ram
  import sbus_pkg::*;
#(
  parameter int unsigned DEPTH = 128
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ld_rar,     // latch bus_in into RAR
  input  logic  we,         // write bus_in at RAR
  input  word_t bus_in,
  output word_t rar,
  output word_t rdata       // word at RAR
);

  localparam int unsigned AW = $clog2(DEPTH);

  word_t mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      rar <= '0;
    else if (ld_rar) rar <= bus_in;
  end

  always_ff @(posedge clk) begin
    if (we) mem[rar[AW-1:0]] <= bus_in;
  end

  assign rdata = mem[rar[AW-1:0]];

endmodule
