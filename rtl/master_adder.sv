// master_adder: the master adder (MA) module. After the pre-adders have
// counted the hits on every bus, it walks through a programmed sequence of
// buses, adds their counts into partial sums per group of buses and into a
// global sum, and decides between a trigger and a fast clear.
//
// Cycle: when the read-out gate line falls (the last read-out controller has
// released it) and the START input is enabled, a cycle starts: the sums and
// the status are cleared and the pattern unit presents one bus per clock on
// the pre-adder bus (pa_sel one-hot, cnt_addr); the selected pre-adder
// answers on pa_data in the same cycle. Buses whose count exceeds the
// per-bus maximum are skipped; at each end of group the partial sum is
// stored, added to the global sum and checked against the group's upper
// threshold. At the STOP word the decision logic pulses trigger or clear one
// clock later. With a 10 MHz clock and n buses in the sequence the decision
// comes n + 2 clocks after the gate falls.
//
// Interface: clk/rst_n (synchronous, active low); gate; the pre-adder bus;
// the CAMAC command port described in camac_if; trigger, clear (pulses),
// done (decision taken, pulse), busy (cycle running). A start while busy
// is ignored; CAMAC F9 aborts it.
module master_adder
  import lst_pkg::*;
#(
  parameter int unsigned N_PA  = N_PA_MAX,
  parameter int unsigned DEPTH = PAT_DEPTH
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               gate,
  // common bus to the pre-adders
  output logic [N_PA-1:0]    pa_sel,
  output logic [BUS_AW-1:0]  cnt_addr,
  input  logic [CNT_W-1:0]   pa_data,
  // CAMAC
  input  logic               cmd,
  input  logic [4:0]         f,
  input  logic [3:0]         a,
  input  logic [CAMAC_W-1:0] w,
  output logic [CAMAC_W-1:0] r,
  output logic               q,
  output logic               x,
  // decision
  output logic               trigger,
  output logic               clear,
  output logic               done,       // decision taken, one cycle
  output logic               busy
);

  logic                gate_q, start;
  logic [CNT_W-1:0]    busmax;
  logic [SUM_W-1:0]    glob_lo, glob_hi, thr_data, sum_tot, grp_sum, psum_data;
  logic                start_en, clear_inh, f9_reset;
  logic                pat_wr, pat_ok, thr_wr, thr_ok, psum_rd, psum_q;
  pattern_t            pat_data;
  logic                trig_status, block_ovf;
  logic                bus_valid, eog, stop, grp_wr;
  logic [GRP_AW-1:0]   grp_idx;
  logic [GRP_AW:0]     n_groups;

  // START: falling edge of the gate line, when enabled and idle.
  always_ff @(posedge clk) begin
    if (!rst_n) gate_q <= 1'b0;
    else        gate_q <= gate;
  end
  assign start = gate_q && !gate && start_en && !busy && !f9_reset;

  camac_if u_camac (
    .clk, .rst_n, .cmd, .f, .a, .w, .r, .q, .x,
    .busmax, .glob_lo, .glob_hi, .start_en, .clear_inh,
    .f9_reset, .pat_wr, .pat_data, .pat_ok, .thr_wr, .thr_data, .thr_ok,
    .psum_rd, .sum_tot, .trig_status, .block_ovf, .psum_data, .psum_q
  );

  pattern_unit #(.DEPTH(DEPTH), .N_PA(N_PA)) u_pattern (
    .clk, .rst_n, .clr(f9_reset), .wr(pat_wr), .wr_data(pat_data), .wr_ok(pat_ok),
    .start, .seq_abort(f9_reset), .busy, .pa_sel, .cnt_addr, .bus_valid, .eog, .stop
  );

  partial_sum_unit #(.NGRP(MAX_GROUPS)) u_psum (
    .clk, .rst_n, .cycle_start(start || f9_reset), .bus_valid, .eog,
    .sigma_b(pa_data), .busmax,
    .thr_clr(f9_reset), .thr_wr, .thr_data, .thr_ok,
    .grp_wr, .grp_idx, .grp_sum, .n_groups, .block_ovf
  );

  partial_sum_memory #(.NGRP(MAX_GROUPS)) u_pmem (
    .clk, .rst_n, .wr(grp_wr), .wr_addr(grp_idx), .wr_data(grp_sum),
    .n_valid(n_groups), .ptr_clr(start || f9_reset), .rd(psum_rd),
    .rd_data(psum_data), .rd_q(psum_q)
  );

  global_sum_unit u_gsum (
    .clk, .rst_n, .cycle_start(start || f9_reset), .grp_wr, .grp_sum, .stop,
    .block_ovf, .glob_lo, .glob_hi, .clear_inh,
    .sum_tot, .trig_status, .trigger, .clear, .done
  );

endmodule
