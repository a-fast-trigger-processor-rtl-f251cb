// tb_global_sum_unit: self-checking test of the global sum and the final
// decision. For random cycles it adds random group sums, sets a random
// acceptance window and block overflow flag, issues STOP and checks the
// global sum, the trigger/clear pulses one clock after STOP, their one-clock
// width, the held status, and the CLEAR inhibit. Counts triggers, clears,
// below-window, above-window, overflow rejects, inhibited clears and
// saturations; each must happen.
module tb_global_sum_unit;
  import lst_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, cycle_start = 1'b0, grp_wr = 1'b0, stop = 1'b0;
  logic block_ovf = 1'b0, clear_inh = 1'b0;
  logic [SUM_W-1:0] grp_sum = '0, glob_lo = '0, glob_hi = '1;
  logic [SUM_W-1:0] sum_tot;
  logic trig_status, trigger, clear, done;
  int checks = 0, failures = 0;
  int n_trig = 0, n_clear = 0, n_low = 0, n_high = 0, n_ovf = 0, n_inh = 0, n_sat = 0;

  always #50 clk = ~clk;

  global_sum_unit dut (.*);

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

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      int tot, ng, maxg;
      bit ok;
      tot  = 0;
      ng   = 1 + $urandom % 16;
      maxg = (t % 10 == 0) ? 4096 : 400;
      glob_lo   = SUM_W'($urandom % 3000);
      glob_hi   = SUM_W'(glob_lo + $urandom % 2000);
      block_ovf = ($urandom % 6) == 0;
      clear_inh = ($urandom % 5) == 0;
      @(negedge clk); cycle_start = 1'b1;
      @(negedge clk); cycle_start = 1'b0;
      check(sum_tot == '0 && !trig_status, "not cleared at cycle start");
      for (int g = 0; g < ng; g++) begin
        int s;
        s = $urandom % maxg;
        grp_wr = 1'b1; grp_sum = SUM_W'(s);
        tot += s;
        if (tot > 4095) begin tot = 4095; n_sat++; end
        @(negedge clk);
        grp_wr = 1'b0;
        if ($urandom % 2) @(negedge clk);   // gaps between groups
      end
      check(int'(sum_tot) == tot, $sformatf("sum_tot %0d exp %0d", sum_tot, tot));
      ok = (tot >= int'(glob_lo)) && (tot <= int'(glob_hi)) && !block_ovf;
      if (!ok) begin
        if (block_ovf) n_ovf++;
        else if (tot < int'(glob_lo)) n_low++;
        else n_high++;
        if (clear_inh) n_inh++;
      end
      stop = 1'b1; #1;
      check(!trigger && !clear && !done, "decision before the clock after stop");
      @(negedge clk); stop = 1'b0;
      check(done, "done missing");
      check(trigger == ok, $sformatf("trigger %0d exp %0d (tot %0d lo %0d hi %0d ovf %0d)", trigger, ok, tot, glob_lo, glob_hi, block_ovf));
      check(clear == (!ok && !clear_inh), "clear wrong");
      check(trig_status == ok, "trigger status wrong");
      if (trigger) n_trig++;
      if (clear) n_clear++;
      @(negedge clk);
      check(!trigger && !clear && !done, "pulse longer than one clock");
      check(trig_status == ok && int'(sum_tot) == tot, "status not held");
    end
    check(n_trig > 0 && n_clear > 0 && n_low > 0 && n_high > 0 && n_ovf > 0 && n_inh > 0 && n_sat > 0,
          "a decision case never happened");
    $display("trig=%0d clear=%0d low=%0d high=%0d ovf=%0d inhibited=%0d sat=%0d", n_trig, n_clear, n_low, n_high, n_ovf, n_inh, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
