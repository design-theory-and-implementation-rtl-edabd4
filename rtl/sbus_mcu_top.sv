// sbus_mcu_top: datapath of an 8-bit micro-controller whose internal bus is
// split into low-power segments.
//
// A single shared, precharged bus makes every transfer charge and discharge
// the whole bus. Here the bus is a tree of nine segments joined by eight bus
// segmentation cells (BSC0..BSC7). Devices that talk often sit on the same or
// neighbouring segments, and for each transfer only the BSCs on the path from
// sender to receiver conduct, so only the segments on that path switch:
//
//   PORT0 -BSC0-+                                      +-BSC6- IR
//   PORT1 -BSC1-+                                      |
//   PORT2 -BSC2-+- ALU seg -BSC4- RAM seg -BSC5- ROM seg
//   PORT3 -BSC3-+  (ACC,B,TMP1,ALU) (RAM,RAR)   (ROM)  +-BSC7- PC
//
// Blocks: timing_gen (machine cycle = 6 stages x 2 phases, instructions of
// 1, 2 or 4 cycles), bsc_ctrl (BSC signals), seg_bus (segments, precharge,
// BSC switches), and the bus devices alu_block, data_ram (128 x 8), prog_rom
// (2K x 8), pc_unit, ir_reg and io_port x4.
//
// The instruction decoder is outside this module. Each stage it presents the
// transfer to make (xfer: sender, receiver, ALU operation); once per
// instruction, after the opcode reaches the IR (ir_fresh), it gives the length
// (len_ld, len). For instructions it classes as rarely used it raises rare and
// lists in rare_eps every endpoint the instruction touches; the BSCs joining
// those endpoints then stay on for the whole instruction. rar is brought out
// for the decoder's special-register address decode.
//
// Timing: one clock per phase. In a stage's first clock (precharge) every
// segment charges; in its second (evaluation) the sender discharges its bits
// on the conducting segments and the receiver latches at the clock edge that
// ends it. A ROM read advances the PC. seg_active shows which segments switch
// in an evaluation phase; xfer_err flags a transfer whose receiver is not
// joined to its sender (a decoder or BSC fault).
//
// The bus tree, the device set, the 8-bit width, the memory sizes, the
// stage/phase timing and the two BSC control schemes follow the published design; the
// endpoint split, encodings and one-transfer-per-stage rule are this design's.
module sbus_mcu_top
  import sbus_pkg::*;
#(
  parameter string ROM_INIT = "rtl/ap1_memtest.hex"
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // instruction decoder interface
  input  xfer_t                 xfer,
  input  logic                  len_ld,
  input  ilen_e                 len,
  input  logic                  rare,
  input  ep_mask_t              rare_eps,
  output word_t                 ir,
  output logic                  ir_fresh,
  output word_t                 rar,
  output logic                  acc_zero,
  output logic                  cy,
  // timing
  output logic [2:0]            stage,
  output logic                  eval,
  output logic [1:0]            mcycle,
  output logic                  instr_start,
  output logic                  instr_last,
  // ports
  input  logic [3:0][W-1:0]     port_in,
  output logic [3:0][W-1:0]     port_out,
  // bus observation
  output bsc_mask_t             bsc_en,
  output seg_mask_t             seg_active,
  output logic                  xfer_err
);

  // ---------------------------------------------------------------- timing
  timing_gen u_tg (
    .clk, .rst_n, .len_ld, .len,
    .stage, .eval, .mcycle, .instr_start, .instr_last
  );

  // ------------------------------------------------------------ BSC control
  bsc_ctrl u_bscc (
    .eval, .xfer_valid(xfer.valid), .xfer_src(xfer.src), .xfer_dst(xfer.dst),
    .rare, .eps(rare_eps), .bsc_en
  );

  // ------------------------------------------------------------ bus devices
  logic  go;               // a transfer takes place this clock
  word_t rx;               // data seen at the receiver's segment
  word_t tx;               // data of the sender
  word_t acc, b, alu_res, ram_rd, rom_rd;
  logic [15:0] pc;
  word_t [3:0] port_rd;

  assign go = eval && xfer.valid;

  function automatic logic rcv(ep_e ep);
    return go && (xfer.dst == ep);
  endfunction

  alu_block u_alu (
    .clk, .rst_n,
    .op      (xfer.alu_op),
    .ld_acc  (rcv(EP_ACC)),
    .ld_b    (rcv(EP_B)),
    .ld_tmp1 (rcv(EP_TMP1)),
    .mul_wb  (go && xfer.src == EP_ALU && xfer.alu_op == ALU_MUL),
    .ld_cy   (go && xfer.src == EP_ALU &&
              xfer.alu_op inside {ALU_ADD, ALU_SUB, ALU_MUL}),
    .bus_in  (rx),
    .acc, .b,
    .result  (alu_res),
    .cy, .acc_zero
  );

  data_ram u_ram (
    .clk, .rst_n,
    .ld_rar (rcv(EP_RAR)),
    .we     (rcv(EP_RAM)),
    .bus_in (rx),
    .rar,
    .rdata  (ram_rd)
  );

  prog_rom #(.INIT_FILE(ROM_INIT)) u_rom (
    .addr  (pc[10:0]),
    .rdata (rom_rd)
  );

  pc_unit u_pc (
    .clk, .rst_n,
    .ld_pcl (rcv(EP_PCL)),
    .ld_pch (rcv(EP_PCH)),
    .rom_rd (go && xfer.src == EP_ROM),
    .bus_in (rx),
    .pc
  );

  ir_reg u_ir (
    .clk, .rst_n,
    .ld     (rcv(EP_IR)),
    .bus_in (rx),
    .ir,
    .fresh  (ir_fresh)
  );

  for (genvar p = 0; p < 4; p++) begin : g_port
    io_port u_port (
      .clk, .rst_n,
      .ld       (rcv(ep_e'(p))),
      .bus_in   (rx),
      .pins_in  (port_in[p]),
      .pins_out (port_out[p]),
      .rdata    (port_rd[p])
    );
  end

  // Data of the sending endpoint.
  always_comb begin
    unique case (xfer.src)
      EP_P0:   tx = port_rd[0];
      EP_P1:   tx = port_rd[1];
      EP_P2:   tx = port_rd[2];
      EP_P3:   tx = port_rd[3];
      EP_ACC:  tx = acc;
      EP_B:    tx = b;
      EP_ALU:  tx = alu_res;
      EP_RAM:  tx = ram_rd;
      EP_ROM:  tx = rom_rd;
      EP_PCL:  tx = pc[7:0];
      EP_PCH:  tx = pc[15:8];
      default: tx = '0;        // receive-only endpoints never send
    endcase
  end

  // ------------------------------------------------------- segmented bus
  logic [NSEG-1:0]        drv_en;
  logic [NSEG-1:0][W-1:0] drv_dat;
  logic [NSEG-1:0][W-1:0] seg_dat;

  always_comb begin
    for (int s = 0; s < NSEG; s++) begin
      drv_en[s]  = go && (ep_seg(xfer.src) == s);
      drv_dat[s] = tx;
    end
  end

  seg_bus u_bus (
    .clk, .rst_n,
    .precharge (!eval),
    .drv_en, .drv_dat, .bsc_en,
    .seg_dat, .seg_active
  );

  assign rx       = seg_dat[ep_seg(xfer.dst)];
  assign xfer_err = go && !seg_active[ep_seg(xfer.dst)];

  // A receiver must be joined to its sender, and a receive-only endpoint
  // cannot send.
  a_rx_joined: assert property (@(posedge clk) disable iff (!rst_n) !xfer_err);
  a_src_sends: assert property (@(posedge clk) disable iff (!rst_n)
    go |-> !(xfer.src inside {EP_TMP1, EP_RAR, EP_IR}));

endmodule
