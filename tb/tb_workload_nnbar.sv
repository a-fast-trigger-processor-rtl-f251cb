// tb_workload_nnbar: the processor in the configuration of the reactor
// neutron-antineutron experiment it was built for: 7 pre-adders, all 112
// buses in 16 groups of 7, a read-out of 775 channels per bus (155 us at
// 5 MHz), and a global acceptance window whose lower cut removes the
// low-activity beam-related events and whose upper cut is 2500 hits (a
// second run uses the 400-hit upper cut of the published histogram).
// Events of three kinds are generated: low activity (beam background),
// high activity (candidates) and candidates with a discharging, crowded
// bus. Each decision is compared with the reference model, and the time
// from the start of the read-out to the decision must stay within 166.5 us
// (155.1 us gate + 112 bus words and 2 clocks at 10 MHz).
module tb_workload_nnbar;
  import lst_pkg::*;
  `include "tb_lst_model.svh"
  localparam int N_PA  = N_PA_MAX;
  localparam int NCHAN = 775;

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
  int n_bkg_rejected = 0, n_cand_accepted = 0, n_crowd_discarded = 0;

  always #50 clk = ~clk;

  lst_trigger_processor dut (.*);

  initial begin
    repeat (1000000) @(posedge clk);
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
    pat.delete();
    for (int i = 0; i < nbus; i++) begin
      pattern_t e;
      e = all[i];
      e.eog = (i % eog_pct) == eog_pct - 1;
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

  // kind 0: beam background, 1: candidate, 2: candidate with a crowded bus
  task automatic run_event(input int kind);
    result_t res;
    logic [CAMAC_W-1:0] rd;
    logic rq;
    int lat, gclk;
    for (int p = 0; p < N_PA; p++)
      for (int b = 0; b < BUS_PER_PA; b++)
        prob[p][b] = (kind == 0) ? int'($urandom % 2) : int'($urandom % 24);
    if (kind == 2) prob[$urandom % N_PA][$urandom % BUS_PER_PA] = 900;
    readout(gclk);
    res = model(cnt, pat, busmax, thr, lo, hi);
    lat = 0;
    while (!done && lat < 400) begin
      @(posedge clk); lat++; #1;
    end
    check((gclk + lat) * 100 <= 166500,
          $sformatf("decision %0d ns after the start of the read-out", (gclk + lat) * 100));
    check(trigger == res.trig && clear == !res.trig,
          $sformatf("kind %0d: trigger %0d expected %0d (tot %0d)", kind, trigger, res.trig, res.tot));
    if (kind == 0 && clear) n_bkg_rejected++;
    if (kind != 0 && trigger) n_cand_accepted++;
    if (kind == 2 && res.n_discard > 0) n_crowd_discarded++;
    naf(2, 0, 0, rd, rq);
    check(int'(rd[11:0]) == res.tot, "global sum read-out");
  endtask

  initial begin
    for (int p = 0; p < N_PA; p++) hit[p] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      busmax = 100;
      lo = 150;
      hi = (run == 0) ? 2500 : 400;
      for (int g = 0; g < MAX_GROUPS; g++) thr[g] = 4095;
      program_all(N_PA * BUS_PER_PA, 7);
      for (int ev = 0; ev < 6; ev++) run_event(ev % 3);
    end
    $display("background rejected=%0d candidates accepted=%0d crowded buses discarded=%0d",
             n_bkg_rejected, n_cand_accepted, n_crowd_discarded);
    check(n_bkg_rejected > 0, "no background event rejected");
    check(n_cand_accepted > 0, "no candidate accepted");
    check(n_crowd_discarded > 0, "no crowded bus discarded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
