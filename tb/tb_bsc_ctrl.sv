// tb_bsc_ctrl: self-checking test of the BSC signal generator.
//
// For every sender/receiver pair it checks the BSC set against a path table
// written out by hand from the bus tree (including the case that only BSC4
// conducts between the ALU and the RAM), that nothing conducts in the
// precharge phase or without a transfer, and that for a rarely used
// instruction the BSCs joining all its listed endpoints conduct in every
// phase, on top of the path of the current transfer.
module tb_bsc_ctrl;
  import sbus_pkg::*;

  logic      eval, xfer_valid, rare;
  ep_e       xfer_src, xfer_dst;
  ep_mask_t  eps;
  bsc_mask_t bsc_en;

  bsc_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // root path of the segment of each endpoint, from the published bus tree
  function automatic bsc_mask_t rp(int e);
    case (e)
      0: return 8'h01;  1: return 8'h02;  2: return 8'h04;  3: return 8'h08;
      4, 5, 6, 7: return 8'h00;
      8, 9: return 8'h10;
      10: return 8'h30;
      11: return 8'h70;
      default: return 8'hB0;
    endcase
  endfunction

  initial begin
    eval = 0; xfer_valid = 0; rare = 0; eps = '0; xfer_src = EP_ROM; xfer_dst = EP_IR;
    for (int s = 0; s < NEP; s++)
      for (int d = 0; d < NEP; d++) begin
        xfer_src = ep_e'(s); xfer_dst = ep_e'(d);
        eval = 1; xfer_valid = 1; #1;
        check(bsc_en == (rp(s) ^ rp(d)), $sformatf("path %0d->%0d got %b", s, d, bsc_en));
        eval = 0; #1;
        check(bsc_en == '0, "off in precharge");
        eval = 1; xfer_valid = 0; #1;
        check(bsc_en == '0, "off without transfer");
      end
    // ALU <-> RAM: only BSC4
    xfer_src = EP_ACC; xfer_dst = EP_RAM; xfer_valid = 1; eval = 1; #1;
    check(bsc_en == 8'b0001_0000, "ACC->RAM only BSC4");
    // rarely used instruction: ROM, RAM, ACC listed -> BSC4, BSC5 for the whole instruction
    rare = 1; eps = '0; eps[EP_ROM] = 1; eps[EP_RAM] = 1; eps[EP_ACC] = 1;
    eval = 0; xfer_valid = 0; #1;
    check(bsc_en == 8'b0011_0000, "rare: subtree on in precharge");
    eval = 1; #1;
    check(bsc_en == 8'b0011_0000, "rare: subtree on with no transfer");
    xfer_valid = 1; xfer_src = EP_ROM; xfer_dst = EP_IR; #1;
    check(bsc_en == 8'b0111_0000, "rare: subtree plus stage path");
    // random subsets against the union of pairwise paths
    for (int t = 0; t < 300; t++) begin
      bsc_mask_t exp;
      int first;
      eps = ep_mask_t'($urandom);
      xfer_valid = 0;
      exp = '0; first = -1;
      for (int e = 0; e < NEP; e++)
        if (eps[e]) begin
          if (first < 0) first = e;
          for (int f = 0; f < NEP; f++) if (eps[f]) exp |= rp(e) ^ rp(f);
        end
      #1;
      check(bsc_en == exp, $sformatf("rare subtree eps=%b got %b exp %b", eps, bsc_en, exp));
    end
    rare = 0; #1;
    check(bsc_en == '0, "rare off: nothing without a transfer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
