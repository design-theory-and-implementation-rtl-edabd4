// bsc_ctrl: generates the on/off signals of the bus segmentation cells.
//
// Normal instructions: in the evaluation phase of a stage that carries a bus
// transfer, exactly the BSCs on the tree path between the sender's and the
// receiver's segments conduct; all others are off, and all are off in the
// precharge phase (every segment has its own precharge). The BSC signals are
// thus a function of instruction, machine cycle, stage and phase, through the
// transfer the decoder issues for that stage.
//
// Rarely used instructions (rare = 1): stage and phase are left out of the BSC
// logic. For the whole instruction the BSCs of the smallest subtree joining
// every endpoint the instruction uses (eps) conduct. This is smaller logic at
// the price of switching segments that a given stage does not need. The
// per-stage path is still added, so a transfer the decoder did not list in eps
// is carried correctly.
//
// Both schemes follow the published design (the second is its option of removing stage
// information from the BSC signals of rarely used instructions); forming the
// rare mask as the union of tree paths from the lowest-numbered endpoint of
// eps is this design's own construction. Purely combinational.
module bsc_ctrl
  import sbus_pkg::*;
(
  input  logic      eval,        // evaluation phase
  input  logic      xfer_valid,  // the current stage carries a transfer
  input  ep_e       xfer_src,    // its sender
  input  ep_e       xfer_dst,    // its receiver
  input  logic      rare,        // current instruction is a rarely used one
  input  ep_mask_t  eps,         // endpoints a rarely used instruction touches
  output bsc_mask_t bsc_en
);

  bsc_mask_t stage_mask;
  bsc_mask_t rare_mask;

  always_comb begin
    stage_mask = '0;
    if (eval && xfer_valid)
      stage_mask = path_mask(ep_seg(xfer_src), ep_seg(xfer_dst));
  end

  always_comb begin
    int anchor;
    anchor    = -1;
    rare_mask = '0;
    for (int e = 0; e < NEP; e++) begin
      if (eps[e]) begin
        if (anchor < 0) anchor = EP_SEG[e];
        else            rare_mask = rare_mask | path_mask(anchor, EP_SEG[e]);
      end
    end
    if (!rare) rare_mask = '0;
  end

  assign bsc_en = stage_mask | rare_mask;

endmodule
