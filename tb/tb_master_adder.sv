// tb_master_adder: self-checking test of the master adder with a
// behavioural stand-in for the pre-adder cards (an array of bus counts
// answering on the common bus in the same cycle).
//
// Programs the module over its CAMAC port (bus maximum, window, pattern,
// group thresholds), lets the gate fall, and checks against the reference
// model: trigger or clear, the time from the gate's fall to the decision
// (bus words + 2 clocks), the global sum, trigger status and overflow bits
// of the F2-A0 word, and every partial sum read with F2-A1 until Q drops.
// Also exercises START inhibit/enable (F24/F26), CLEAR inhibit (F25) and a
// reset (F9) that aborts a running cycle. Counts each mechanism and fails
// if one never happened.
module tb_master_adder;
  import lst_pkg::*;
  `include "tb_lst_model.svh"
  localparam int N_PA = 7;

  logic clk = 1'b0, rst_n = 1'b0, gate = 1'b0, cmd = 1'b0;
  logic [N_PA-1:0] pa_sel;
  logic [BUS_AW-1:0] cnt_addr;
  logic [CNT_W-1:0] pa_data;
  logic [4:0] f = '0;
  logic [3:0] a = '0;
  logic [CAMAC_W-1:0] w = '0, r;
  logic q, x, trigger, clear, done, busy;
  int checks = 0, failures = 0;
  counts_t cnt;
  pattern_t pat [$];
  int thr [MAX_GROUPS];
  int busmax, lo, hi;
  int n_trig = 0, n_clear = 0, n_discard = 0, n_ovf = 0, n_low = 0, n_high = 0;
  int n_inh_clear = 0, n_inh_start = 0, n_abort = 0, n_sat = 0;

  always #50 clk = ~clk;

  master_adder #(.N_PA(N_PA)) dut (.*);

  // pre-adder cards: the selected one drives the addressed count
  always_comb begin
    pa_data = '0;
    for (int p = 0; p < N_PA; p++)
      if (pa_sel[p]) pa_data |= CNT_W'(cnt[p][cnt_addr]);
  end

  initial begin
    repeat (200000) @(posedge clk);
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
      e = all[i % all.size()];
      e.eog = (i == nbus - 1) || (($urandom % 100) < eog_pct);
      pat.push_back(e);
    end
    pat.push_back(pattern_t'({1'b0, PA_STOP, 4'd0}));
    naf(9, 0, 0, rd, rq);
    naf(16, 0, busmax, rd, rq);
    naf(16, 3, lo, rd, rq);
    naf(16, 4, hi, rd, rq);
    foreach (pat[i]) begin
      naf(16, 1, int'(pat[i]), rd, rq);
      check(rq, "pattern write refused");
    end
    for (int g = 0; g < MAX_GROUPS; g++) naf(16, 2, thr[g], rd, rq);
  endtask

  task automatic pulse_gate();
    @(negedge clk); gate = 1'b1;
    repeat (5) @(negedge clk);
    gate = 1'b0;
  endtask

  task automatic run_event(input bit inhibit_clear);
    result_t res;
    logic [CAMAC_W-1:0] rd;
    logic rq;
    int lat;
    res = model(cnt, pat, busmax, thr, lo, hi);
    if (inhibit_clear) naf(25, 0, 0, rd, rq);
    pulse_gate();
    lat = 0;
    while (!done && lat < 400) begin
      check(!trigger && !clear, "decision before done");
      @(posedge clk); lat++; #1;
    end
    check(lat == res.nbus + 2, $sformatf("decision after %0d clocks, expected %0d", lat, res.nbus + 2));
    check(trigger == res.trig, $sformatf("trigger %0d expected %0d (tot %0d ovf %0d)", trigger, res.trig, res.tot, res.ovf));
    check(clear == (!res.trig && !inhibit_clear), "clear output wrong");
    if (trigger) n_trig++;
    if (clear) n_clear++;
    if (!res.trig && inhibit_clear) n_inh_clear++;
    if (res.ovf) n_ovf++;
    else if (res.tot < lo) n_low++;
    else if (res.tot > hi) n_high++;
    n_discard += res.n_discard;
    n_sat += res.n_sat;
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

  task automatic random_counts(input int crowd_pct, input int maxc);
    for (int p = 0; p < N_PA; p++)
      for (int b = 0; b < BUS_PER_PA; b++)
        begin
          int r100;
          r100 = int'($urandom % 100);
          if (r100 < crowd_pct) cnt[p][b] = 200 + int'($urandom % 56);
          else                  cnt[p][b] = int'($urandom % (maxc + 1));
        end
  endtask

  initial begin
    logic [CAMAC_W-1:0] rd;
    logic rq;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      busmax = 150 + $urandom % 100;
      lo = $urandom % 400;
      hi = lo + 200 + $urandom % 2000;
      for (int g = 0; g < MAX_GROUPS; g++) thr[g] = 100 + $urandom % 600;
      if (t % 8 == 0) for (int g = 0; g < MAX_GROUPS; g++) thr[g] = 4095;
      program_all((t % 4 == 0) ? 112 : 1 + $urandom % 150, 5 + $urandom % 25);
      random_counts(5, (t % 5 == 0) ? 120 : 30);
      run_event(t % 7 == 3);
    end
    // START inhibited: a falling gate must not start a cycle
    naf(24, 0, 0, rd, rq);
    pulse_gate();
    repeat (300) begin
      @(posedge clk); #1;
      check(!busy && !done, "cycle started while START inhibited");
    end
    n_inh_start++;
    naf(26, 0, 0, rd, rq);
    // F9 aborts a running cycle
    pulse_gate();
    repeat (20) @(negedge clk);
    check(busy, "cycle not running before abort");
    naf(9, 0, 0, rd, rq);
    repeat (300) begin
      @(posedge clk); #1;
      check(!busy && !done && !trigger && !clear, "decision after abort");
    end
    n_abort++;
    $display("trig=%0d clear=%0d discard=%0d blockovf=%0d low=%0d high=%0d inh_clear=%0d inh_start=%0d abort=%0d sat=%0d",
             n_trig, n_clear, n_discard, n_ovf, n_low, n_high, n_inh_clear, n_inh_start, n_abort, n_sat);
    check(n_trig > 0 && n_clear > 0 && n_discard > 0 && n_ovf > 0 && n_low > 0 && n_high > 0 &&
          n_inh_clear > 0 && n_inh_start > 0 && n_abort > 0 && n_sat > 0, "a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
