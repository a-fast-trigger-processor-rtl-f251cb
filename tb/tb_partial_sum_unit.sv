// tb_partial_sum_unit: self-checking test of the partial sum path.
//
// Feeds random cycles of bus counts with random end-of-group marks, a random
// per-bus maximum and random group thresholds, and compares each group
// write (address and sum), the group count and the block overflow flag with
// a reference model in the testbench: buses above the maximum are skipped,
// sums saturate at 4095, a group sum above its threshold sets the flag, and
// groups past the 16th are ignored. Counts how often a bus was discarded,
// a group overflowed and a sum saturated; each must happen.
module tb_partial_sum_unit;
  import lst_pkg::*;
  localparam int NGRP = 16;

  logic clk = 1'b0, rst_n = 1'b0, cycle_start = 1'b0, bus_valid = 1'b0, eog = 1'b0;
  logic [CNT_W-1:0] sigma_b = '0, busmax = '1;
  logic thr_clr = 1'b0, thr_wr = 1'b0, thr_ok;
  logic [SUM_W-1:0] thr_data = '0;
  logic grp_wr;
  logic [3:0] grp_idx;
  logic [SUM_W-1:0] grp_sum;
  logic [4:0] n_groups;
  logic block_ovf;
  int checks = 0, failures = 0;
  int thr [NGRP];
  int n_discard = 0, n_ovf = 0, n_sat = 0, n_extra = 0;

  always #50 clk = ~clk;

  partial_sum_unit #(.NGRP(NGRP)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic write_thresholds(input int base, input int spread);
    @(negedge clk); thr_clr = 1'b1; @(negedge clk); thr_clr = 1'b0;
    for (int g = 0; g < NGRP; g++) begin
      thr[g] = base + ($urandom % spread);
      if (thr[g] > 4095) thr[g] = 4095;
      @(negedge clk); thr_wr = 1'b1; thr_data = SUM_W'(thr[g]);
      check(thr_ok, "threshold table full too early");
    end
    @(negedge clk); thr_wr = 1'b0;
    check(!thr_ok, "threshold table not full after 16 writes");
  endtask

  task automatic run_cycle(input int nbus, input int maxcnt, input int eog_pct);
    int psum = 0, ngrp = 0;
    bit ovf = 0;
    @(negedge clk); cycle_start = 1'b1;
    @(negedge clk); cycle_start = 1'b0;
    for (int i = 0; i < nbus; i++) begin
      int sb;
      bit last;
      sb   = $urandom % (maxcnt + 1);
      last = (i == nbus - 1) || (($urandom % 100) < eog_pct);
      bus_valid = 1'b1; eog = last; sigma_b = CNT_W'(sb);
      if (sb <= int'(busmax)) psum += sb; else n_discard++;
      if (psum > 4095) begin psum = 4095; n_sat++; end
      #1;
      if (last) begin
        if (ngrp < NGRP) begin
          check(grp_wr && grp_idx == 4'(ngrp) && int'(grp_sum) == psum,
                $sformatf("group %0d: wr=%0d idx=%0d sum=%0d exp %0d", ngrp, grp_wr, grp_idx, grp_sum, psum));
          if (psum > thr[ngrp]) begin ovf = 1; n_ovf++; end
          ngrp++;
        end else begin
          check(!grp_wr, "write for a group past the 16th");
          n_extra++;
        end
        psum = 0;
      end else begin
        check(!grp_wr, "group write without end of group");
      end
      @(negedge clk);
    end
    bus_valid = 1'b0; eog = 1'b0;
    #1;
    check(int'(n_groups) == ngrp, $sformatf("n_groups %0d exp %0d", n_groups, ngrp));
    check(block_ovf == ovf, $sformatf("block_ovf %0d exp %0d", block_ovf, ovf));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    write_thresholds(300, 800);
    for (int t = 0; t < 40; t++) begin
      busmax = CNT_W'(($urandom % 2) ? 255 : 100 + $urandom % 150);
      run_cycle(20 + $urandom % 100, (t % 3 == 0) ? 255 : 60, 10 + $urandom % 20);
    end
    write_thresholds(3000, 2000);
    busmax = '1;
    run_cycle(112, 255, 3);      // large groups: saturation at 4095
    run_cycle(112, 255, 60);     // many short groups: more than 16 groups
    check(n_discard > 0, "no bus was discarded");
    check(n_ovf > 0, "no block overflow happened");
    check(n_sat > 0, "no saturation happened");
    check(n_extra > 0, "no group past the 16th");
    $display("discarded=%0d overflows=%0d saturations=%0d extra_groups=%0d", n_discard, n_ovf, n_sat, n_extra);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
