// tb_ap1_workload: runs a RAM-test application program over all 128 data-RAM
// words on two copies of the datapath and compares their bus activity.
//
// Copy A uses stage- and phase-qualified BSC signals for every instruction;
// copy B classes XRL A,dir and MUL AB as rarely used, so their BSCs follow the
// instruction only. Both must compute the same results: 128 passing words
// (P1 written with 00h each time), P2 = 7Fh xor 55h, P0 = low byte of
// 3 * 2Ah, and the A5h done mark at the expected clock (651 machine cycles of
// 12 clocks, plus 8). The testbench sums, per evaluation phase with a
// transfer, the number of bus segments switched, for both copies and for an
// unsegmented bus (all nine segments), and checks that copy A switches no
// more than copy B and both far fewer than a single bus.
module tb_ap1_workload;
  import sbus_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #20 clk = ~clk;                 // 25 MHz

  // copy A
  xfer_t a_xfer; logic a_len_ld, a_rare; ilen_e a_len; ep_mask_t a_rare_eps;
  logic a_ir_fresh, a_acc_zero, a_cy, a_eval, a_instr_start, a_instr_last, a_xfer_err;
  word_t a_ir, a_rar; logic [2:0] a_stage; logic [1:0] a_mcycle;
  logic [3:0][W-1:0] a_port_out; bsc_mask_t a_bsc_en; seg_mask_t a_seg_active;
  // copy B
  xfer_t b_xfer; logic b_len_ld, b_rare; ilen_e b_len; ep_mask_t b_rare_eps;
  logic b_ir_fresh, b_acc_zero, b_cy, b_eval, b_instr_start, b_instr_last, b_xfer_err;
  word_t b_ir, b_rar; logic [2:0] b_stage; logic [1:0] b_mcycle;
  logic [3:0][W-1:0] b_port_out; bsc_mask_t b_bsc_en; seg_mask_t b_seg_active;
  logic [3:0][W-1:0] port_in = '0;

  sbus_mcu_top #(.ROM_INIT("tb/ap1_full_ramtest.hex")) dut_a (
    .clk, .rst_n, .xfer(a_xfer), .len_ld(a_len_ld), .len(a_len), .rare(a_rare), .rare_eps(a_rare_eps),
    .ir(a_ir), .ir_fresh(a_ir_fresh), .rar(a_rar), .acc_zero(a_acc_zero), .cy(a_cy), .stage(a_stage),
    .eval(a_eval), .mcycle(a_mcycle), .instr_start(a_instr_start), .instr_last(a_instr_last),
    .port_in, .port_out(a_port_out), .bsc_en(a_bsc_en), .seg_active(a_seg_active), .xfer_err(a_xfer_err));
  uc_decoder_model #(.RARE_EN(1'b0)) dec_a (
    .stage(a_stage), .mcycle(a_mcycle), .ir(a_ir), .ir_fresh(a_ir_fresh), .rar(a_rar),
    .xfer(a_xfer), .len_ld(a_len_ld), .len(a_len), .rare(a_rare), .rare_eps(a_rare_eps));

  sbus_mcu_top #(.ROM_INIT("tb/ap1_full_ramtest.hex")) dut_b (
    .clk, .rst_n, .xfer(b_xfer), .len_ld(b_len_ld), .len(b_len), .rare(b_rare), .rare_eps(b_rare_eps),
    .ir(b_ir), .ir_fresh(b_ir_fresh), .rar(b_rar), .acc_zero(b_acc_zero), .cy(b_cy), .stage(b_stage),
    .eval(b_eval), .mcycle(b_mcycle), .instr_start(b_instr_start), .instr_last(b_instr_last),
    .port_in, .port_out(b_port_out), .bsc_en(b_bsc_en), .seg_active(b_seg_active), .xfer_err(b_xfer_err));
  uc_decoder_model #(.RARE_EN(1'b1)) dec_b (
    .stage(b_stage), .mcycle(b_mcycle), .ir(b_ir), .ir_fresh(b_ir_fresh), .rar(b_rar),
    .xfer(b_xfer), .len_ld(b_len_ld), .len(b_len), .rare(b_rare), .rare_eps(b_rare_eps));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int seg_a = 0, seg_b = 0, seg_single = 0, bsc_on_a = 0, bsc_on_b = 0;
  int p1_zero = 0, p1_other = 0, cyc = 0, done_cyc = -1, n_rare = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    check(!a_xfer_err && !b_xfer_err, "receiver joined to sender");
    bsc_on_a += $countones(a_bsc_en);
    bsc_on_b += $countones(b_bsc_en);
    if (a_eval && a_xfer.valid) begin
      seg_a += $countones(a_seg_active);
      seg_single += NSEG;
      if (a_xfer.dst == EP_P1) begin
        if (dut_a.acc == 8'h00) p1_zero++; else p1_other++;
      end
    end
    if (b_eval && b_xfer.valid) seg_b += $countones(b_seg_active);
    if (b_rare) n_rare++;
    if (done_cyc < 0 && a_port_out[1] == 8'hA5) done_cyc = cyc;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done_cyc >= 0);
    repeat (40) @(posedge clk);
    check(done_cyc == 651 * 12 + 9, $sformatf("done mark seen at edge %0d, expected %0d", done_cyc, 651*12+9));
    check(p1_zero == 128, $sformatf("%0d of 128 RAM words passed", p1_zero));
    check(p1_other == 1, "one non-zero P1 write (the done mark)");
    for (int i = 0; i < 128; i++) begin
      check(dut_a.u_ram.mem[i] == 8'(i ^ 8'h55), "RAM word copy A");
      check(dut_b.u_ram.mem[i] == 8'(i ^ 8'h55), "RAM word copy B");
    end
    check(a_port_out == b_port_out, "both copies give the same port values");
    check(a_port_out[2] == (8'h7F ^ 8'h55), "P2 = RAM[7Fh]");
    check(a_port_out[0] == 8'(16'(8'h7F ^ 8'h55) * 16'd3), "P0 = 3 * 2Ah");
    check(b_port_out[1] == 8'hA5, "done mark");
    check(n_rare > 0, "rarely used instructions executed in copy B");
    check(seg_a <= seg_b, "stage-qualified BSC control switches no more segments");
    check(bsc_on_a < bsc_on_b, "rare-instruction BSCs stay on longer");
    check(seg_a * 2 < seg_single, "segmented bus switches under half of a single bus");
    $display("segments switched: single bus %0d, per-stage BSC control %0d (%0d%%), rare-instruction BSC control %0d (%0d%%)",
             seg_single, seg_a, seg_a * 100 / seg_single, seg_b, seg_b * 100 / seg_single);
    $display("BSC-on clocks: per-stage %0d, rare-instruction %0d", bsc_on_a, bsc_on_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
