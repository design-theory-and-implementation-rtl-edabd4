// uc_decoder_model: behavioural stand-in for the instruction decoder and
// controller of the micro-controller, for simulation only.
//
// It decodes the handful of 8051-encoded instructions used by the example
// program and, for every stage, issues the bus transfer the datapath must
// make. Every instruction begins with the opcode fetch ROM -> IR in S1 of its
// first machine cycle; the remaining transfers are:
//   74 MOV A,#d      S2 ROM->ACC
//   F5 MOV dir,A     S2 ROM->RAR, S4 ACC->dir
//   E5 MOV A,dir     S2 ROM->RAR, S4 dir->ACC
//   64 XRL A,#d      S2 ROM->TMP1, S4 ALU(XOR)->ACC
//   65 XRL A,dir     S2 ROM->RAR, S3 dir->TMP1, S4 ALU(XOR)->ACC   (rare)
//   04 INC A         S2 ALU(INC)->ACC
//   A4 MUL AB        4 cycles, cycle 4 S4 ALU(MUL)->ACC             (rare)
//   02 LJMP a16      2 cycles, cycle 1 S2 ROM->PCH, cycle 2 S2 ROM->PCL
// dir is RAM below 80h, or the special registers P0 (80h), P1 (90h),
// P2 (A0h), P3 (B0h), ACC (E0h) and B (F0h). The instructions marked rare are
// the ones this program uses least; for them the model raises rare and lists
// the endpoints they touch, so the BSC controller keeps their segments joined
// for the whole instruction. With RARE_EN = 0 no instruction is classed as
// rare and every BSC signal follows stage and phase. Purely combinational.
module uc_decoder_model
  import sbus_pkg::*;
#(
  parameter bit RARE_EN = 1'b1
) (
  input  logic [2:0] stage,
  input  logic [1:0] mcycle,
  input  word_t      ir,
  input  logic       ir_fresh,
  input  word_t      rar,
  output xfer_t      xfer,
  output logic       len_ld,
  output ilen_e      len,
  output logic       rare,
  output ep_mask_t   rare_eps
);

  function automatic ep_e dir_ep(word_t a);
    if (a < 8'h80) return EP_RAM;
    unique case (a)
      8'h80:   return EP_P0;
      8'h90:   return EP_P1;
      8'hA0:   return EP_P2;
      8'hB0:   return EP_P3;
      8'hE0:   return EP_ACC;
      default: return EP_B;
    endcase
  endfunction

  function automatic xfer_t mk(ep_e s, ep_e d, alu_op_e op = ALU_PASS);
    return '{valid: 1'b1, src: s, dst: d, alu_op: op};
  endfunction

  logic fetch;
  assign fetch = (mcycle == 2'd0) && (stage == 3'd0);

  always_comb begin
    xfer = '{valid: 1'b0, src: EP_ROM, dst: EP_IR, alu_op: ALU_PASS};
    if (fetch) xfer = mk(EP_ROM, EP_IR);
    else begin
      unique case (ir)
        8'h74: if (mcycle == 0 && stage == 1) xfer = mk(EP_ROM, EP_ACC);
        8'hF5: begin
          if (mcycle == 0 && stage == 1) xfer = mk(EP_ROM, EP_RAR);
          if (mcycle == 0 && stage == 3) xfer = mk(EP_ACC, dir_ep(rar));
        end
        8'hE5: begin
          if (mcycle == 0 && stage == 1) xfer = mk(EP_ROM, EP_RAR);
          if (mcycle == 0 && stage == 3) xfer = mk(dir_ep(rar), EP_ACC);
        end
        8'h64: begin
          if (mcycle == 0 && stage == 1) xfer = mk(EP_ROM, EP_TMP1);
          if (mcycle == 0 && stage == 3) xfer = mk(EP_ALU, EP_ACC, ALU_XOR);
        end
        8'h65: begin
          if (mcycle == 0 && stage == 1) xfer = mk(EP_ROM, EP_RAR);
          if (mcycle == 0 && stage == 2) xfer = mk(dir_ep(rar), EP_TMP1);
          if (mcycle == 0 && stage == 3) xfer = mk(EP_ALU, EP_ACC, ALU_XOR);
        end
        8'h04: if (mcycle == 0 && stage == 1) xfer = mk(EP_ALU, EP_ACC, ALU_INC);
        8'hA4: if (mcycle == 3 && stage == 3) xfer = mk(EP_ALU, EP_ACC, ALU_MUL);
        8'h02: begin
          if (mcycle == 0 && stage == 1) xfer = mk(EP_ROM, EP_PCH);
          if (mcycle == 1 && stage == 1) xfer = mk(EP_ROM, EP_PCL);
        end
        default: ;
      endcase
    end
  end

  assign len_ld = ir_fresh;
  always_comb begin
    unique case (ir)
      8'hA4:   len = LEN4;
      8'h02:   len = LEN2;
      default: len = LEN1;
    endcase
  end

  always_comb begin
    rare     = 1'b0;
    rare_eps = '0;
    if (RARE_EN && !fetch) begin
      if (ir == 8'h65) begin
        rare = 1'b1;
        rare_eps[EP_ROM] = 1'b1; rare_eps[EP_RAR] = 1'b1; rare_eps[EP_RAM] = 1'b1;
        rare_eps[EP_TMP1] = 1'b1; rare_eps[EP_ALU] = 1'b1; rare_eps[EP_ACC] = 1'b1;
      end
      if (ir == 8'hA4) begin
        rare = 1'b1;
        rare_eps[EP_ACC] = 1'b1; rare_eps[EP_B] = 1'b1; rare_eps[EP_ALU] = 1'b1;
      end
    end
  end

endmodule
