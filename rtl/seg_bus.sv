// seg_bus: dynamic (precharged) bus split into segments that are joined by
// bus segmentation cells (BSCs).
//
// Each segment has its own precharge device. During the precharge phase
// (precharge = 1) every bit of every segment is charged high. During the
// evaluation phase a sending device discharges the bits of its segment: as in
// the published device circuit of the segmented bus, a bit is pulled low through two
// series switches, one driven by the device's Control (drv_en) and one by its
// DataOut bit (drv_dat). A conducting BSC joins two segments into one node,
// so a discharge spreads to every segment reachable through conducting BSCs;
// segments behind an open BSC keep their charge and cost no switching power.
//
// The charge of each segment is kept in lvl_q: once discharged, a bit stays
// low until the next precharge, as on a real dynamic bus. A receiver reads the
// complement of the level (seg_dat), so a DataOut of 1 arrives as a 1.
//
// seg_active marks the segments that belong to the node of a sender in the
// current evaluation phase: the segments whose capacitance the transfer
// switches (the n of the k1(n-1)+k2 cost of one transfer).
//
// Connectivity is resolved combinationally over NSEG-1 relaxation rounds,
// enough for any tree of NSEG segments. Timing: seg_dat is valid in the same
// clock as the drive; receivers latch it at the clock edge that ends the
// evaluation phase. The topology comes from sbus_pkg and can be overridden
// through the BSC_CHILD/BSC_PARENT parameters.
module seg_bus
  import sbus_pkg::*;
#(
  parameter int unsigned NS = NSEG,
  parameter int unsigned NB = NBSC,
  parameter int unsigned DW = W,
  parameter int CHILD  [NB] = BSC_CHILD,
  parameter int PARENT [NB] = BSC_PARENT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 precharge,          // 1: precharge phase, 0: evaluation
  input  logic [NS-1:0]        drv_en,             // Control of the sender on each segment
  input  logic [NS-1:0][DW-1:0] drv_dat,           // DataOut of the sender on each segment
  input  logic [NB-1:0]        bsc_en,             // 1: BSC conducts
  output logic [NS-1:0][DW-1:0] seg_dat,           // data seen by receivers on each segment
  output logic [NS-1:0]        seg_active          // segment joined to a sender this phase
);

  logic [NS-1:0][DW-1:0] lvl_q;      // stored charge, 1 = charged
  logic [NS-1:0][DW-1:0] pull;       // bits discharged on the node of each segment
  logic [NS-1:0]         live;       // node of the segment contains a sender
  logic [NS-1:0][DW-1:0] lvl;        // present level of each segment

  always_comb begin
    logic [NS-1:0][DW-1:0] p;
    logic [NS-1:0]         a;
    for (int s = 0; s < NS; s++) begin
      p[s] = drv_en[s] ? drv_dat[s] : '0;
      a[s] = drv_en[s];
    end
    for (int r = 0; r < int'(NS) - 1; r++) begin
      for (int k = 0; k < NB; k++) begin
        if (bsc_en[k]) begin
          p[CHILD[k]]  = p[CHILD[k]]  | p[PARENT[k]];
          p[PARENT[k]] = p[PARENT[k]] | p[CHILD[k]];
          a[CHILD[k]]  = a[CHILD[k]]  | a[PARENT[k]];
          a[PARENT[k]] = a[PARENT[k]] | a[CHILD[k]];
        end
      end
    end
    pull = p;
    live = a;
  end

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      lvl[s]     = precharge ? '1 : (lvl_q[s] & ~pull[s]);
      seg_dat[s] = ~lvl[s];
    end
    seg_active = precharge ? '0 : live;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lvl_q <= '1;
    else        lvl_q <= lvl;
  end

endmodule
