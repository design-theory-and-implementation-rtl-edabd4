// ir_reg: the instruction register.
//
// Receives the opcode byte from the bus in the opcode-fetch stage and holds it
// for the instruction decoder until the next fetch. It also flags, for the
// decoder, the clock right after a new opcode arrived (fresh), so that the
// decoder can issue the instruction length once per instruction.
// Loads at the clock edge that ends an evaluation phase; resets to 00h.
module ir_reg
  import sbus_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ld,
  input  word_t bus_in,
  output word_t ir,
  output logic  fresh
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir    <= '0;
      fresh <= 1'b0;
    end else begin
      fresh <= ld;
      if (ld) ir <= bus_in;
    end
  end

endmodule
