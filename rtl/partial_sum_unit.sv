// partial_sum_unit: the partial-sum path of the master adder: the per-bus
// threshold comparator, the partial sum adder, the partial sum latch, the
// group upper thresholds and the block overflow flip-flop.
//
// For each bus word of the sequence (bus_valid), the bus count sigma_b read
// from a pre-adder is added to the running partial sum only if it does not
// exceed the "maximum meaningful number of hits per bus" (busmax); crowded
// buses are thereby discarded. On the last bus of a group (eog) the updated
// partial sum (this bus included) is offered on grp_sum with grp_wr high for
// one cycle, for the partial sum memory and the global sum adder; the latch
// is then cleared for the next group and the group index advances. In the
// same cycle the partial sum is compared with that group's upper threshold,
// and the block overflow flip-flop is set if it is exceeded.
//
// Group thresholds are written (CAMAC F16-A2) one after the other from
// group 0 after thr_clr; thr_ok is low once all groups are written.
//
// Timing: one bus per clock, no pipeline; grp_wr coincides with the eog bus.
// cycle_start clears the latch, the group index, the group count and the
// overflow flag.
//
// Design choices not fixed by the source: sums saturate at 2^SUM_W-1;
// groups beyond MAX_GROUPS are ignored; thresholds reset to the maximum
// (no limit); a bus is kept when sigma_b <= busmax.
module partial_sum_unit
  import lst_pkg::*;
#(
  parameter int unsigned NGRP = MAX_GROUPS,
  localparam int unsigned GAW = $clog2(NGRP)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cycle_start,
  input  logic             bus_valid,
  input  logic             eog,
  input  logic [CNT_W-1:0] sigma_b,
  input  logic [CNT_W-1:0] busmax,
  // group upper threshold programming
  input  logic             thr_clr,
  input  logic             thr_wr,
  input  logic [SUM_W-1:0] thr_data,
  output logic             thr_ok,
  // results
  output logic             grp_wr,
  output logic [GAW-1:0]   grp_idx,
  output logic [SUM_W-1:0] grp_sum,
  output logic [GAW:0]     n_groups,
  output logic             block_ovf
);

  logic [SUM_W-1:0] psum;
  logic [SUM_W-1:0] thr [NGRP];
  logic [GAW:0]     thr_ptr;
  logic             accept;
  logic             room;

  assign accept  = bus_valid && (sigma_b <= busmax);
  assign grp_sum = sat_add(psum, accept ? SUM_W'(sigma_b) : '0);
  assign room    = (n_groups < (GAW+1)'(NGRP));
  assign grp_wr  = bus_valid && eog && room;
  assign grp_idx = n_groups[GAW-1:0];
  assign thr_ok  = (thr_ptr < (GAW+1)'(NGRP));

  always_ff @(posedge clk) begin
    if (!rst_n || cycle_start) begin
      psum      <= '0;
      n_groups  <= '0;
      block_ovf <= 1'b0;
    end else if (bus_valid) begin
      if (eog) begin
        psum <= '0;
        if (room) begin
          n_groups <= n_groups + 1'b1;
          if (grp_sum > thr[grp_idx]) block_ovf <= 1'b1;
        end
      end else begin
        psum <= grp_sum;
      end
    end
  end

  // A group is only closed on a bus word.
  a_eog_on_bus: assert property (@(posedge clk) disable iff (!rst_n) eog |-> bus_valid);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      thr_ptr <= '0;
      for (int g = 0; g < NGRP; g++) thr[g] <= '1;
    end else if (thr_clr) begin
      thr_ptr <= '0;
    end else if (thr_wr && thr_ok) begin
      thr[thr_ptr[GAW-1:0]] <= thr_data;
      thr_ptr <= thr_ptr + 1'b1;
    end
  end

endmodule
