// tb_seg_bus_fig2: the segmented bus configured for the published seven-device
// example and driven with its communication weights.
//
// seg_bus is instantiated with seven segments, one per device 1..7, joined as
// the example bus tree 1-2, 2-3, 2-6, 6-7, 6-5, 5-4 (segment index = device
// number - 1). The example graph's edge weights (communication frequencies)
// are scaled by ten into transfer counts: (1,2) 10, (1,6) 5, (2,3) 4, (2,6) 7,
// (3,6) 8, (3,5) 2, (3,4) 2, (5,4) 3, (6,5) 1, (7,6) 2. Each transfer closes the
// BSCs on its tree path, sends a random byte and checks that the receiver gets
// it. Summing (n - 1) over all transfers, where n is the number of switched
// segments reported by seg_active, gives ten times the linear-arrangement cost
// of the tree. The testbench checks it against 67, worked out by hand both as
// sum(weight * distance) and as the sum of the cut weights of the tree edges
// (1.5 + 1.6 + 2.4 + 0.2 + 0.5 + 0.5 = 6.7).
module tb_seg_bus_fig2;

  localparam int unsigned NS = 7, NB = 6, DW = 8;
  localparam int CH [NB] = '{0, 2, 5, 6, 4, 3};   // devices 1, 3, 6, 7, 5, 4
  localparam int PA [NB] = '{1, 1, 1, 5, 5, 4};   // devices 2, 2, 2, 6, 6, 5

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                  precharge;
  logic [NS-1:0]         drv_en;
  logic [NS-1:0][DW-1:0] drv_dat;
  logic [NB-1:0]         bsc_en;
  logic [NS-1:0][DW-1:0] seg_dat;
  logic [NS-1:0]         seg_active;

  seg_bus #(.NS(NS), .NB(NB), .DW(DW), .CHILD(CH), .PARENT(PA)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // path from a segment to the root (device 2), as a BSC set
  function automatic logic [NB-1:0] up(int s);
    case (s)
      0: return 6'b000001;   // 1 -> 2
      1: return 6'b000000;   // 2
      2: return 6'b000010;   // 3 -> 2
      5: return 6'b000100;   // 6 -> 2
      6: return 6'b001100;   // 7 -> 6 -> 2
      4: return 6'b010100;   // 5 -> 6 -> 2
      default: return 6'b110100; // 4 -> 5 -> 6 -> 2
    endcase
  endfunction

  int ea [10] = '{1, 1, 2, 2, 3, 3, 3, 5, 6, 7};
  int eb [10] = '{2, 6, 3, 6, 6, 5, 4, 4, 5, 6};
  int wt [10] = '{10, 5, 4, 7, 8, 2, 2, 3, 1, 2};

  initial begin
    int cost;
    logic [DW-1:0] d;
    cost = 0;
    precharge = 1; drv_en = '0; drv_dat = '0; bsc_en = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 10; e++)
      for (int r = 0; r < wt[e]; r++) begin
        int s, t;
        s = (r % 2 == 0) ? ea[e] - 1 : eb[e] - 1;   // alternate direction
        t = (r % 2 == 0) ? eb[e] - 1 : ea[e] - 1;
        precharge = 1; drv_en = '0; bsc_en = '0;
        @(posedge clk);
        d = DW'($urandom);
        precharge = 0; bsc_en = up(s) ^ up(t);
        drv_en = '0; drv_en[s] = 1'b1; drv_dat = '0; drv_dat[s] = d;
        #1;
        check(seg_dat[t] == d, $sformatf("device %0d -> %0d", s + 1, t + 1));
        cost += $countones(seg_active) - 1;
        @(posedge clk);
      end
    check(cost == 67, $sformatf("linear-arrangement cost x10 = %0d, expected 67", cost));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
