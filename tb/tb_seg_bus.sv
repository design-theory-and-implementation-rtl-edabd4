// tb_seg_bus: self-checking test of the segmented dynamic bus.
//
// Random BSC settings and one random sender per evaluation phase; the expected
// node of each segment is found by a reference flood fill over the tree
// written out from the published bus tree (not the design's tables). Checks: a
// segment joined to the sender sees the sent byte and is marked active, any
// other segment stays precharged (reads 00h) and inactive; in precharge all
// segments read 00h. Also checks the dynamic-bus retention: two evaluation
// clocks without a precharge between them leave the OR of both bytes
// discharged, and a precharge restores the bus.
module tb_seg_bus;
  import sbus_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                    precharge;
  logic [NSEG-1:0]         drv_en;
  logic [NSEG-1:0][W-1:0]  drv_dat;
  bsc_mask_t               bsc_en;
  logic [NSEG-1:0][W-1:0]  seg_dat;
  seg_mask_t               seg_active;

  seg_bus dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference tree: edge k joins ea[k] and eb[k]
  int ea [8] = '{0, 1, 2, 3, 5, 6, 7, 8};
  int eb [8] = '{4, 4, 4, 4, 4, 5, 6, 6};

  function automatic seg_mask_t reach(int from, bsc_mask_t on);
    seg_mask_t r = '0;
    r[from] = 1'b1;
    for (int it = 0; it < 9; it++)
      for (int k = 0; k < 8; k++)
        if (on[k] && (r[ea[k]] || r[eb[k]])) begin r[ea[k]] = 1'b1; r[eb[k]] = 1'b1; end
    return r;
  endfunction

  int n_isolated = 0, n_joined = 0;

  initial begin
    int src;
    word_t d, d2;
    seg_mask_t r;
    precharge = 1'b1; drv_en = '0; drv_dat = '0; bsc_en = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      // precharge phase
      precharge = 1'b1; drv_en = '0; bsc_en = 8'($urandom);
      #1;
      for (int s = 0; s < NSEG; s++) check(seg_dat[s] == '0, "precharged segment reads 00h");
      check(seg_active == '0, "no active segment in precharge");
      @(posedge clk);
      // evaluation phase
      src = $urandom_range(NSEG - 1);
      d = 8'($urandom);
      precharge = 1'b0; drv_en = '0; drv_en[src] = 1'b1;
      for (int s = 0; s < NSEG; s++) drv_dat[s] = 8'($urandom);
      drv_dat[src] = d;
      #1;
      r = reach(src, bsc_en);
      for (int s = 0; s < NSEG; s++) begin
        check(seg_dat[s] == (r[s] ? d : 8'h00), $sformatf("seg %0d data %h (src %0d bsc %b)", s, seg_dat[s], src, bsc_en));
        check(seg_active[s] == r[s], "active flag");
        if (r[s] && s != src) n_joined++;
        if (!r[s]) n_isolated++;
      end
      @(posedge clk);
      // second evaluation without precharge every 8th round: retention
      if (t % 8 == 0) begin
        d2 = 8'($urandom);
        drv_dat[src] = d2;
        #1;
        for (int s = 0; s < NSEG; s++)
          if (r[s]) check(seg_dat[s] == (d | d2), "charge lost stays lost until precharge");
        @(posedge clk);
      end
    end
    check(n_joined > 0 && n_isolated > 0, "both joined and isolated segments seen");
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
