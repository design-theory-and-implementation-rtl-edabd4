// pc_unit: the 16-bit program counter with its program address output.
//
// The PC sits on its own bus segment. Its two bus endpoints are PCL and PCH.
// A byte received on PCH is held in a staging register; a byte received on
// PCL then loads the whole PC (staged high byte and new low byte) at once, so
// a two-byte jump target taken from the ROM over two transfers never leaves
// the PC half-updated. Every ROM read (rom_rd) advances the PC by one, except
// in the clock that loads a jump target. PCL and PCH can also be sent onto
// the bus (e.g. to save a return address). paddr is the program address given
// to the ROM. The published design names the PC and the program address register only;
// the staging scheme and the fetch-increment rule are this design's choices.
// Reset value 0000h.
module pc_unit
  import sbus_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ld_pcl,     // latch bus_in into PCL and the staged PCH into PCH
  input  logic        ld_pch,     // stage bus_in as the next PCH
  input  logic        rom_rd,     // ROM byte at pc is taken this clock
  input  word_t       bus_in,
  output logic [15:0] pc
);

  word_t pch_hold;   // staged high byte of a jump target

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= '0;
      pch_hold <= '0;
    end else begin
      if (ld_pch) pch_hold <= bus_in;
      if (ld_pcl)      pc <= {pch_hold, bus_in};
      else if (rom_rd) pc <= pc + 16'd1;
    end
  end

endmodule
