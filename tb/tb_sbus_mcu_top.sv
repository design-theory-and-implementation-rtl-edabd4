// tb_sbus_mcu_top: end-to-end test of the segmented-bus micro-controller
// datapath at its default parameters, running the example data-RAM test
// program held in the program ROM.
//
// A behavioural instruction decoder (uc_decoder_model) issues the per-stage
// transfers. The testbench checks, against values worked out by hand from
// the program: the port results (P1 00h per passing RAM word and A5h done
// mark, P2 = 5Ch xor 5Bh, P0/P3 from the MUL of the P3 pins), the RAM words,
// and the clock at which the done mark appears (30 machine cycles of 12 clocks
// plus 8 clocks into the last instruction). On every transfer it checks that
// exactly the BSCs on the tree path conduct (more for rarely used
// instructions), that the receiver is joined to the sender, and it sums the
// segments switched against an unsegmented bus. It counts the mechanisms:
// local and multi-segment transfers, each BSC used, rarely used instruction
// mode, 1/2/4-cycle instructions, port reads and writes, RAM reads and writes.
module tb_sbus_mcu_top;
  import sbus_pkg::*;

  localparam word_t P3_PINS = 8'h37;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #20 clk = ~clk;                 // 25 MHz

  xfer_t     xfer;
  logic      len_ld, rare, ir_fresh, acc_zero, cy, eval, instr_start, instr_last, xfer_err;
  ilen_e     len;
  ep_mask_t  rare_eps;
  word_t     ir, rar;
  logic [2:0] stage;
  logic [1:0] mcycle;
  logic [3:0][W-1:0] port_in, port_out;
  bsc_mask_t bsc_en;
  seg_mask_t seg_active;

  sbus_mcu_top dut (.*);

  uc_decoder_model u_dec (
    .stage, .mcycle, .ir, .ir_fresh, .rar,
    .xfer, .len_ld, .len, .rare, .rare_eps
  );

  assign port_in = {P3_PINS, 8'h00, 8'h00, 8'h00};

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Independent reference of the tree: segment of each endpoint and the path
  // between two segments, written out from the published bus tree.
  function automatic int seg_of(ep_e e);
    case (e)
      EP_P0: return 0;  EP_P1: return 1;  EP_P2: return 2;  EP_P3: return 3;
      EP_ACC, EP_B, EP_TMP1, EP_ALU: return 4;
      EP_RAM, EP_RAR: return 5;
      EP_ROM: return 6;
      EP_IR: return 7;
      default: return 8;
    endcase
  endfunction
  function automatic bsc_mask_t ref_root(int s);
    case (s)
      0: return 8'b0000_0001;
      1: return 8'b0000_0010;
      2: return 8'b0000_0100;
      3: return 8'b0000_1000;
      4: return 8'b0000_0000;
      5: return 8'b0001_0000;
      6: return 8'b0011_0000;
      7: return 8'b0111_0000;
      default: return 8'b1011_0000;
    endcase
  endfunction

  // mechanism counters
  int n_local = 0, n_multi = 0, n_rare_extra = 0, n_alu_ram = 0;
  int n_len[3] = '{0, 0, 0};
  int n_bsc[NBSC];
  int n_port_wr = 0, n_port_rd = 0, n_ram_wr = 0, n_ram_rd = 0;
  int seg_sum = 0, n_xfer = 0, p1_writes = 0;
  int cyc = 0, done_cyc = -1;
  word_t p1_prev;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (eval && xfer.valid) begin
      bsc_mask_t need;
      need = ref_root(seg_of(xfer.src)) ^ ref_root(seg_of(xfer.dst));
      n_xfer++;
      seg_sum += $countones(seg_active);
      check(!xfer_err, "receiver joined to sender");
      if (!rare) check(bsc_en == need, $sformatf("BSCs %b for %s->%s, expected %b",
                                                  bsc_en, xfer.src.name(), xfer.dst.name(), need));
      else begin
        check((bsc_en & need) == need, "rare mode keeps the needed path");
        if (bsc_en != need) n_rare_extra++;
      end
      check($countones(seg_active) == $countones(bsc_en) + 1, "active segments = conducting BSCs + 1");
      if (need == '0) n_local++; else n_multi++;
      for (int k = 0; k < NBSC; k++) if (bsc_en[k]) n_bsc[k]++;
      if (!rare && ((xfer.src == EP_RAM && xfer.dst == EP_ACC) || (xfer.src == EP_ACC && xfer.dst == EP_RAM))) begin
        n_alu_ram++;
        check(bsc_en == 8'b0001_0000, "ALU<->RAM uses BSC4 only");
      end
      if (xfer.dst inside {EP_P0, EP_P1, EP_P2, EP_P3}) n_port_wr++;
      if (xfer.src inside {EP_P0, EP_P1, EP_P2, EP_P3}) n_port_rd++;
      if (xfer.dst == EP_RAM) n_ram_wr++;
      if (xfer.src == EP_RAM) n_ram_rd++;
    end else if (eval) begin
      check(bsc_en == '0 || rare, "no BSC on without a transfer");
    end
    if (len_ld) n_len[len]++;
    if (port_out[1] != p1_prev) begin
      if (port_out[1] == 8'hA5 && done_cyc < 0) done_cyc = cyc;
    end
    p1_prev = port_out[1];
  end

  // Every write to P1 before the done mark must carry 00h (RAM word passed).
  always @(posedge clk) if (rst_n && eval && xfer.valid && xfer.dst == EP_P1) begin
    p1_writes++;
    if (p1_writes < 3) check(dut.acc == 8'h00, "RAM read-back XOR is zero");
  end

  initial begin
    for (int k = 0; k < NBSC; k++) n_bsc[k] = 0;
    p1_prev = 8'hFF;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done_cyc >= 0);
    repeat (60) @(posedge clk);

    // The port latches at the edge ending clock 30*12+7; this monitor samples
    // it one edge later.
    check(done_cyc == 30 * 12 + 9, $sformatf("done mark seen at edge %0d, expected %0d", done_cyc, 30*12+9));
    check(port_out[1] == 8'hA5, "P1 done mark");
    check(port_out[2] == (8'h5C ^ 8'h5B), "P2 = 5Ch xor 5Bh");
    check(port_out[0] == 8'((16'(P3_PINS) * 16'd10) & 16'hFF), "P0 = low byte of P3 pins * 10");
    check(port_out[3] == ((8'((16'(P3_PINS) * 16'd10) >> 8) + 8'd1) ^ 8'h01), "P3 = (high byte + 1) xor 1");
    check(dut.u_ram.mem[7'h30] == 8'h5A, "RAM[30h]");
    check(dut.u_ram.mem[7'h31] == 8'h5B, "RAM[31h]");
    check(dut.u_ram.mem[7'h32] == 8'h5C, "RAM[32h]");
    check(dut.u_ram.mem[7'h33] == 8'((16'(P3_PINS) * 16'd10) >> 8) + 8'd1, "RAM[33h]");
    check(p1_writes == 3, "three writes to P1");

    // mechanisms
    check(n_local > 0, "local (single-segment) transfer");
    check(n_multi > 0, "transfer through BSCs");
    check(n_rare_extra > 0, "rarely used instruction switched extra segments");
    check(n_alu_ram > 0, "ALU/RAM transfer");
    check(n_len[0] > 0 && n_len[1] > 0 && n_len[2] > 0, "1, 2 and 4 cycle instructions");
    for (int k = 0; k < NBSC; k++) check(n_bsc[k] > 0, $sformatf("BSC%0d used", k));
    check(n_port_wr > 0 && n_port_rd > 0, "port write and read");
    check(n_ram_wr > 0 && n_ram_rd > 0, "RAM write and read");
    check(seg_sum < n_xfer * NSEG, "fewer segments switched than on a single bus");

    $display("transfers=%0d local=%0d multi=%0d rare_extra=%0d len1/2/4=%0d/%0d/%0d",
             n_xfer, n_local, n_multi, n_rare_extra, n_len[0], n_len[1], n_len[2]);
    $display("segments switched: %0d, single bus would switch %0d (%0d%%)",
             seg_sum, n_xfer * NSEG, seg_sum * 100 / (n_xfer * NSEG));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
