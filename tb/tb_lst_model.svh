// tb_lst_model.svh: reference model of the master adder cycle, used by the
// testbenches to work out the expected sums and decision independently of
// the RTL. Given the bus counts of every pre-adder, the pattern sequence and
// the programmed thresholds, it walks the sequence as the source design
// describes: skip buses above the per-bus maximum, close a group on its
// end-of-group word, add it to the global sum, flag a group above its
// threshold, and accept the event if the global sum is inside the window and
// no group overflowed. Sums saturate at 4095; groups past the 16th are
// ignored; the last pattern address acts as STOP.
// Included inside a testbench module that imports lst_pkg.

  typedef struct {
    int psum [MAX_GROUPS];
    int ngrp;
    int tot;
    bit ovf;
    bit trig;
    int nbus;        // bus words before STOP
    int n_discard;   // buses skipped as crowded
    int n_sat;       // sums that saturated
  } result_t;

  typedef int counts_t [N_PA_MAX][BUS_PER_PA];

  function automatic result_t model(input counts_t cnt, input pattern_t pat [$],
                                    input int busmax, input int thr [MAX_GROUPS],
                                    input int lo, input int hi);
    result_t res;
    int s;
    res.ngrp = 0; res.tot = 0; res.ovf = 0; res.nbus = 0; res.n_discard = 0; res.n_sat = 0;
    for (int g = 0; g < MAX_GROUPS; g++) res.psum[g] = 0;
    s = 0;
    for (int i = 0; i < pat.size() && i < PAT_DEPTH - 1; i++) begin
      int c;
      if (pat[i].pa == PA_STOP) break;
      res.nbus++;
      c = (int'(pat[i].pa) < N_PA_MAX) ? cnt[pat[i].pa][pat[i].bus] : 0;
      if (c <= busmax) s += c; else res.n_discard++;
      if (s > 4095) begin s = 4095; res.n_sat++; end
      if (pat[i].eog) begin
        if (res.ngrp < MAX_GROUPS) begin
          res.psum[res.ngrp] = s;
          if (s > thr[res.ngrp]) res.ovf = 1;
          res.tot += s;
          if (res.tot > 4095) begin res.tot = 4095; res.n_sat++; end
          res.ngrp++;
        end
        s = 0;
      end
    end
    res.trig = (res.tot >= lo) && (res.tot <= hi) && !res.ovf;
    return res;
  endfunction
