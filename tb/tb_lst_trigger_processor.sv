// tb_lst_trigger_processor: end-to-end test of the whole trigger processor
// at its default size (7 pre-adders x 16 buses, buses of 1024 channels,
// 10 MHz clock, 5 MHz read-out strobe).
//
// For each event it programs the master adder over CAMAC, shifts out all
// 1024 channels of all 112 buses with random hit patterns (some buses
// crowded beyond the 8-bit counter range), keeps its own count per bus, and
// after the gate falls checks the decision, the time from the gate's fall to
// the decision (bus words + 2 clocks, 11.4 us for all 112 buses), the
// status word and all partial sums against the reference model. It also
// checks that a full read-out takes 204.8 us. Mechanisms counted and
// required: trigger, clear, crowded bus discarded, pre-adder counter
// saturation, block overflow, global sum below and above the window, CLEAR
// inhibit, START inhibit and an F9 abort.
module tb_lst_trigger_processor;
  import lst_pkg::*;
  `include "tb_lst_model.svh"
  localparam int N_PA  = N_PA_MAX;
  localparam int NCHAN = 1024;

  logic clk = 1'b0, rst_n = 1'b0, gate = 1'b0, ro_stb = 1'b0, cmd = 1'b0;
  logic [BUS_PER_PA-1:0] hit [N_PA];
  logic [4:0] f = '0;
  logic [3:0] a = '0;
  logic [CAMAC_W-1:0] w = '0, r;
  logic q, x, trigger, clear, done, busy;
  int checks = 0, failures = 0;
  counts_t cnt;
  int prob [N_PA][BUS_PER_PA];
  pattern_t pat [$];
  int thr [MAX_GROUPS];
  int busmax, lo, hi;
  int n_trig = 0, n_clear = 0, n_discard = 0, n_ovf = 0, n_low = 0, n_high = 0;
  int n_inh_clear = 0, n_inh_start = 0, n_abort = 0, n_pa_sat = 0;

  always #50 clk = ~clk;

  lst_trigger_processor dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic naf(input int fn, input int sa, input int data,
                     output logic [CAMAC_W-1:0] rd, output logic rq);
    @(negedge clk);
    cmd = 1'b1; f = 5'(fn); a = 4'(sa); w = CAMAC_W'(data);
    #1 rd = r; rq = q;
    @(negedge clk);
    cmd = 1'b0;
  endtask

  task automatic program_all(input int nbus, input int eog_pct);
    logic [CAMAC_W-1:0] rd;
    logic rq;
    pattern_t all [$];
    all.delete();
    for (int p = 0; p < N_PA; p++)
      for (int b = 0; b < BUS_PER_PA; b++) all.push_back(pattern_t'({1'b0, 3'(p), 4'(b)}));
    all.shuffle();
    pat.delete();
    for (int i = 0; i < nbus; i++) begin
      pattern_t e;
      e = all[i];
      e.eog = (i == nbus - 1) || (($urandom % 100) < eog_pct);
      pat.push_back(e);
    end
    pat.push_back(pattern_t'({1'b0, PA_STOP, 4'd0}));
    naf(9, 0, 0, rd, rq);
    naf(16, 0, busmax, rd, rq);
    naf(16, 3, lo, rd, rq);
    naf(16, 4, hi, rd, rq);
    foreach (pat[i]) naf(16, 1, int'(pat[i]), rd, rq);
    for (int g = 0; g < MAX_GROUPS; g++) naf(16, 2, thr[g], rd, rq);
  endtask

  // Shift out NCHAN channels on every bus; prob is the hit probability in
  // units of 1/1024 per channel. Returns the gate length in clocks.
  task automatic readout(output int gate_clocks);
    for (int p = 0; p < N_PA; p++)
      for (int b = 0; b < BUS_PER_PA; b++) cnt[p][b] = 0;
    @(negedge clk); gate = 1'b1;
    gate_clocks = 1;
    for (int c = 0; c < NCHAN; c++) begin
      @(negedge clk);
      ro_stb = 1'b1;
      for (int p = 0; p < N_PA; p++)
        for (int b = 0; b < BUS_PER_PA; b++) begin
          hit[p][b] = ($urandom % 1024) < prob[p][b];
          if (hit[p][b] && cnt[p][b] < 255) cnt[p][b]++;
        end
      @(negedge clk);
      ro_stb = 1'b0;
      gate_clocks += 2;
    end
    @(negedge clk);
    gate = 1'b0;
    for (int p = 0; p < N_PA; p++) hit[p] = '0;
  endtask

  task automatic run_event(input bit inhibit_clear);
    result_t res;
    logic [CAMAC_W-1:0] rd;
    logic rq;
    int lat, gclk;
    if (inhibit_clear) naf(25, 0, 0, rd, rq);
    readout(gclk);
    check(gclk * 100 >= 204800 && gclk * 100 <= 205000, $sformatf("read-out took %0d ns", gclk * 100));
    res = model(cnt, pat, busmax, thr, lo, hi);
    for (int p = 0; p < N_PA; p++)
      for (int b = 0; b < BUS_PER_PA; b++) if (cnt[p][b] == 255) n_pa_sat++;
    lat = 0;
    while (!done && lat < 400) begin
      check(!trigger && !clear, "decision before done");
      @(posedge clk); lat++; #1;
    end
    check(lat == res.nbus + 2, $sformatf("decision after %0d clocks, expected %0d", lat, res.nbus + 2));
    check(lat * 100 <= 11400, $sformatf("decision %0d ns after the read-out", lat * 100));
    check(trigger == res.trig, $sformatf("trigger %0d expected %0d (tot %0d ovf %0d)", trigger, res.trig, res.tot, res.ovf));
    check(clear == (!res.trig && !inhibit_clear), "clear output wrong");
    if (trigger) n_trig++;
    if (clear) n_clear++;
    if (!res.trig && inhibit_clear) n_inh_clear++;
    if (res.ovf) n_ovf++;
    else if (res.tot < lo) n_low++;
    else if (res.tot > hi) n_high++;
    n_discard += res.n_discard;
    naf(2, 0, 0, rd, rq);
    check(rq && int'(rd[11:0]) == res.tot && rd[12] == res.trig && rd[14] == res.ovf,
          $sformatf("status word %h: tot %0d trig %0d ovf %0d", rd, res.tot, res.trig, res.ovf));
    for (int g = 0; g <= res.ngrp; g++) begin
      naf(2, 1, 0, rd, rq);
      if (g < res.ngrp)
        check(rq && int'(rd[11:0]) == res.psum[g], $sformatf("partial sum %0d: %0d expected %0d", g, rd[11:0], res.psum[g]));
      else
        check(!rq, "Q high after the last group");
    end
    if (inhibit_clear) naf(9, 0, 0, rd, rq);
  endtask

  // Hit probabilities: a few buses crowded (most channels hit), the rest
  // at a per-event activity level.
  task automatic set_activity(input int level, input int crowd_pct);
    for (int p = 0; p < N_PA; p++)
      for (int b = 0; b < BUS_PER_PA; b++)
        begin
          int r100;
          r100 = int'($urandom % 100);
          if (r100 < crowd_pct) prob[p][b] = 300 + int'($urandom % 700);
          else                  prob[p][b] = int'($urandom % (level + 1));
        end
  endtask

  initial begin
    logic [CAMAC_W-1:0] rd;
    logic rq;
    int gclk;
    for (int p = 0; p < N_PA; p++) hit[p] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 8; t++) begin
      busmax = 100 + $urandom % 150;
      lo = 100 + $urandom % 200;
      hi = 600 + $urandom % 1500;
      if (t == 5) begin lo = 3000; hi = 4000; end   // rejected, with CLEAR inhibited
      for (int g = 0; g < MAX_GROUPS; g++) thr[g] = (t % 3 == 1) ? 20 + int'($urandom % 60) : 4095;
      program_all((t % 2 == 0) ? 112 : 20 + $urandom % 90, 8 + $urandom % 10);
      set_activity((t % 4 == 0) ? 1 : (t % 4 == 2) ? 60 : 15, 4);
      run_event(t == 5);
    end
    // START inhibited
    naf(24, 0, 0, rd, rq);
    readout(gclk);
    repeat (300) begin
      @(posedge clk); #1;
      check(!busy && !done, "cycle started while START inhibited");
    end
    n_inh_start++;
    naf(26, 0, 0, rd, rq);
    // F9 aborts a running cycle
    readout(gclk);
    repeat (20) @(negedge clk);
    check(busy, "cycle not running before abort");
    naf(9, 0, 0, rd, rq);
    repeat (300) begin
      @(posedge clk); #1;
      check(!busy && !done && !trigger && !clear, "decision after abort");
    end
    n_abort++;
    $display("trig=%0d clear=%0d discard=%0d pa_sat=%0d blockovf=%0d low=%0d high=%0d inh_clear=%0d inh_start=%0d abort=%0d",
             n_trig, n_clear, n_discard, n_pa_sat, n_ovf, n_low, n_high, n_inh_clear, n_inh_start, n_abort);
    check(n_trig > 0, "no trigger");
    check(n_clear > 0, "no clear");
    check(n_discard > 0, "no crowded bus discarded");
    check(n_pa_sat > 0, "no pre-adder counter saturated");
    check(n_ovf > 0, "no block overflow");
    check(n_low > 0, "global sum never below the window");
    check(n_high > 0, "global sum never above the window");
    check(n_inh_clear > 0, "CLEAR inhibit never used");
    check(n_inh_start > 0 && n_abort > 0, "START inhibit or abort not run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
