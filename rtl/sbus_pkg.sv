// sbus_pkg: shared types and the bus-tree topology of the segmented-bus
// micro-controller datapath.
//
// The internal 8-bit bus is split into nine dynamic bus segments that form a
// tree. Neighbouring segments are joined by a bus segmentation cell (BSC), a
// pass switch that either connects the two segments or isolates them. The
// tree below is the one drawn for the segmented micro-controller: four port
// segments (IB10, IB11, IB12 and the Port3 segment) hang off the ALU segment
// through BSC0..BSC3; BSC4 leads to the RAM segment, BSC5 from there to the
// ROM segment, and BSC6 and BSC7 branch from the ROM segment to the IR and
// the PC. The ALU segment is taken as the root of the tree.
//
// Every register that can send or receive on the bus is a bus endpoint
// (ep_e). Each endpoint sits on one segment (EP_SEG). A transfer from one
// endpoint to another needs exactly the BSCs on the tree path between their
// two segments: path_mask() computes that set as the exclusive-or of the two
// segments' paths to the root.
//
// The split of the ALU, RAM, ROM and PC blocks into several endpoints (ACC,
// B, TMP1, ALU result; RAM data, RAR; PCL, PCH) and the numeric encodings are
// this design's own choices.
package sbus_pkg;

  localparam int unsigned W    = 8;   // bus width in bits
  localparam int unsigned NSEG = 9;   // number of bus segments
  localparam int unsigned NBSC = 8;   // number of BSCs (tree edges)

  typedef enum logic [3:0] {
    SEG_IB10 = 4'd0,  // PORT0 segment
    SEG_IB11 = 4'd1,  // PORT1 segment
    SEG_IB12 = 4'd2,  // PORT2 segment
    SEG_P3   = 4'd3,  // PORT3 segment
    SEG_ALU  = 4'd4,  // ALU segment (tree root)
    SEG_RAM  = 4'd5,  // RAM segment
    SEG_ROM  = 4'd6,  // ROM segment
    SEG_IR   = 4'd7,  // IR segment
    SEG_PC   = 4'd8   // PC segment
  } seg_e;

  typedef logic [NBSC-1:0] bsc_mask_t;
  typedef logic [NSEG-1:0] seg_mask_t;
  typedef logic [W-1:0]    word_t;

  // BSC k joins segment BSC_CHILD[k] to segment BSC_PARENT[k].
  localparam int BSC_CHILD  [NBSC] = '{0, 1, 2, 3, 5, 6, 7, 8};
  localparam int BSC_PARENT [NBSC] = '{4, 4, 4, 4, 4, 5, 6, 6};

  // Bus endpoints: registers and units that drive or latch the bus.
  typedef enum logic [3:0] {
    EP_P0   = 4'd0,   // PORT0: write latch / read pins
    EP_P1   = 4'd1,   // PORT1
    EP_P2   = 4'd2,   // PORT2
    EP_P3   = 4'd3,   // PORT3
    EP_ACC  = 4'd4,   // accumulator
    EP_B    = 4'd5,   // B register
    EP_TMP1 = 4'd6,   // ALU operand register (receive only)
    EP_ALU  = 4'd7,   // ALU result (send only)
    EP_RAM  = 4'd8,   // RAM data at the address held in RAR
    EP_RAR  = 4'd9,   // RAM address register (receive only)
    EP_ROM  = 4'd10,  // program ROM data at PC (send only)
    EP_IR   = 4'd11,  // instruction register (receive only)
    EP_PCL  = 4'd12,  // PC low byte; receiving it completes a jump
    EP_PCH  = 4'd13   // PC high byte
  } ep_e;

  localparam int unsigned NEP = 14;
  typedef logic [NEP-1:0] ep_mask_t;

  localparam int EP_SEG [NEP] = '{0, 1, 2, 3, 4, 4, 4, 4, 5, 5, 6, 7, 8, 8};

  // ALU operations. Result = op(ACC, TMP1); MUL also writes the high byte to B.
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_AND  = 4'd2,
    ALU_OR   = 4'd3,
    ALU_XOR  = 4'd4,
    ALU_INC  = 4'd5,
    ALU_DEC  = 4'd6,
    ALU_CPL  = 4'd7,
    ALU_PASS = 4'd8,
    ALU_MUL  = 4'd9
  } alu_op_e;

  // One bus transfer, issued by the instruction decoder for the current stage.
  typedef struct packed {
    logic    valid;
    ep_e     src;
    ep_e     dst;
    alu_op_e alu_op;
  } xfer_t;

  // Instruction length in machine cycles.
  typedef enum logic [1:0] {
    LEN1 = 2'd0,
    LEN2 = 2'd1,
    LEN4 = 2'd2
  } ilen_e;

  // Set of BSCs between a segment and the root segment.
  function automatic bsc_mask_t root_mask(int seg);
    bsc_mask_t m;
    int        s;
    m = '0;
    s = seg;
    for (int step = 0; step < NSEG; step++) begin
      for (int k = 0; k < NBSC; k++) begin
        if (BSC_CHILD[k] == s && !m[k]) begin
          m[k] = 1'b1;
          s    = BSC_PARENT[k];
        end
      end
    end
    return m;
  endfunction

  typedef bsc_mask_t root_tab_t [NSEG];

  function automatic root_tab_t calc_root_tab();
    root_tab_t t;
    for (int s = 0; s < NSEG; s++) t[s] = root_mask(s);
    return t;
  endfunction

  // Root path of every segment, computed once at elaboration.
  localparam root_tab_t ROOT_TAB = calc_root_tab();

  // Set of BSCs that must conduct to join segments a and b.
  function automatic bsc_mask_t path_mask(int unsigned a, int unsigned b);
    return ROOT_TAB[a] ^ ROOT_TAB[b];
  endfunction

  function automatic int ep_seg(ep_e ep);
    return EP_SEG[int'(ep)];
  endfunction

endpackage
