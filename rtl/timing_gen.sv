// timing_gen: machine-cycle timing of the micro-controller.
//
// An instruction takes one, two or four machine cycles; a machine cycle has
// six stages (S1..S6) and each stage has two phases. With one clock per phase
// a machine cycle is twelve clocks. The first phase of a stage is the bus
// precharge phase and the second the evaluation phase, in which one bus
// transfer can take place; receivers latch at the clock edge that ends it.
// The stage/cycle/phase structure and the 1/2/4 cycle lengths follow the
// published design; mapping phase 1 to precharge and phase 2 to evaluation, one clock
// per phase, and the length-load handshake are this design's choices.
//
// Interface: the instruction decoder presents the length of the current
// instruction on len with len_ld high for one clock once it has decoded the
// opcode (any time during the first machine cycle). Until then the
// instruction is taken to be one cycle long. instr_start is high in the
// first clock of every instruction, instr_last in its last clock.
module timing_gen
  import sbus_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        len_ld,      // load the length of the current instruction
  input  ilen_e       len,
  output logic [2:0]  stage,       // 0..5 for S1..S6
  output logic        eval,        // 0: phase 1 (precharge), 1: phase 2 (evaluation)
  output logic [1:0]  mcycle,      // machine cycle within the instruction
  output logic        instr_start,
  output logic        instr_last
);

  logic [1:0] ncyc_q;      // machine cycles of the current instruction minus one
  logic [1:0] ncyc;

  always_comb begin
    ncyc = ncyc_q;
    if (len_ld) begin
      unique case (len)
        LEN1:    ncyc = 2'd0;
        LEN2:    ncyc = 2'd1;
        LEN4:    ncyc = 2'd3;
        default: ncyc = 2'd0;
      endcase
    end
  end

  assign instr_start = (stage == 3'd0) && !eval && (mcycle == 2'd0);
  assign instr_last  = (stage == 3'd5) && eval && (mcycle == ncyc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage  <= 3'd0;
      eval   <= 1'b0;
      mcycle <= 2'd0;
      ncyc_q <= 2'd0;
    end else begin
      eval <= !eval;
      if (eval) begin
        if (stage == 3'd5) begin
          stage <= 3'd0;
          if (mcycle == ncyc) begin
            mcycle <= 2'd0;
            ncyc_q <= 2'd0;
          end else begin
            mcycle <= mcycle + 2'd1;
            ncyc_q <= ncyc;
          end
        end else begin
          stage  <= stage + 3'd1;
          ncyc_q <= ncyc;
        end
      end else begin
        ncyc_q <= ncyc;
      end
    end
  end

  // A length load must not shorten the instruction below the cycle it is in.
  a_len_ld_in_time: assert property (@(posedge clk) disable iff (!rst_n)
    len_ld |-> (mcycle == 2'd0));

endmodule
