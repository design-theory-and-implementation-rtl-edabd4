// alu_block: accumulator, B register, operand register TMP1 and the ALU.
//
// The block sits on the ALU bus segment and is reached through four bus
// endpoints: ACC and B (send and receive), TMP1 (receive) and the ALU result
// (send). The ALU combines ACC with TMP1 under the operation the decoder
// gives with the transfer; the result is driven onto the bus when the ALU is
// the sender, typically into ACC. MUL forms the 16-bit product of ACC and B
// (operands of the 8-bit multiply), returns the low byte and writes the high
// byte into B in the same clock. ADD, SUB and MUL update the carry flag cy
// (MUL clears it, as an 8051-family MUL does).
//
// The published design names ACC, B, TMP1, TMP2 and the ALU but not their operations;
// the operation set and flags are this design's choice. TMP2, which holds a
// copy of ACC in front of the ALU, is folded into the ALU input here.
//
// Timing: all registers load at the clock edge ending an evaluation phase
// (ld_* strobes come from the top), the ALU output is combinational.
module alu_block
  import sbus_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  alu_op_e op,
  input  logic    ld_acc,    // latch bus_in into ACC
  input  logic    ld_b,      // latch bus_in into B
  input  logic    ld_tmp1,   // latch bus_in into TMP1
  input  logic    mul_wb,    // ALU result of a MUL is being taken: write high byte to B
  input  logic    ld_cy,     // ALU result of an ADD/SUB/MUL is being taken: update carry
  input  word_t   bus_in,
  output word_t   acc,
  output word_t   b,
  output word_t   result,    // ALU result
  output logic    cy,        // carry flag
  output logic    acc_zero
);

  word_t       tmp1;
  logic [15:0] prod;
  logic        c_next;

  assign prod = 16'(acc) * 16'(b);

  always_comb begin
    c_next = cy;
    unique case (op)
      ALU_ADD:  {c_next, result} = {1'b0, acc} + {1'b0, tmp1};
      ALU_SUB:  {c_next, result} = {1'b0, acc} - {1'b0, tmp1};
      ALU_AND:  result = acc & tmp1;
      ALU_OR:   result = acc | tmp1;
      ALU_XOR:  result = acc ^ tmp1;
      ALU_INC:  result = acc + 8'd1;
      ALU_DEC:  result = acc - 8'd1;
      ALU_CPL:  result = ~acc;
      ALU_PASS: result = tmp1;
      ALU_MUL:  begin result = prod[7:0]; c_next = 1'b0; end
      default:  result = acc;
    endcase
  end

  assign acc_zero = (acc == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      b    <= '0;
      tmp1 <= '0;
      cy   <= 1'b0;
    end else begin
      if (ld_acc)  acc  <= bus_in;
      if (ld_tmp1) tmp1 <= bus_in;
      if (ld_b)         b <= bus_in;
      else if (mul_wb)  b <= prod[15:8];
      if (ld_cy)   cy   <= c_next;
    end
  end

endmodule
