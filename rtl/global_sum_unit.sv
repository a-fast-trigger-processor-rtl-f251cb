// global_sum_unit: the master adder's total sum adder, global sum latch and
// final decision logic.
//
// Each finished group (grp_wr) adds its partial sum to the global sum latch.
// At the STOP of the sequence the decision is taken: if the global sum lies
// in the programmed acceptance window glob_lo <= sum_tot <= glob_hi and no
// block overflow occurred, trigger is pulsed; otherwise clear is pulsed,
// unless the CLEAR output is inhibited. The outcome stays in trig_status
// (and block_ovf in the partial sum unit) until the next cycle starts, for
// CAMAC read-out.
//
// Timing: trigger/clear/done are one-cycle pulses in the cycle after stop.
// cycle_start clears the global sum and the status.
//
// Design choices not fixed by the source: the window is inclusive at both
// ends, the global sum saturates at 2^SUM_W-1, and the outputs are
// single-clock pulses.
module global_sum_unit
  import lst_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cycle_start,
  input  logic             grp_wr,
  input  logic [SUM_W-1:0] grp_sum,
  input  logic             stop,
  input  logic             block_ovf,
  input  logic [SUM_W-1:0] glob_lo,
  input  logic [SUM_W-1:0] glob_hi,
  input  logic             clear_inh,
  output logic [SUM_W-1:0] sum_tot,
  output logic             trig_status,
  output logic             trigger,
  output logic             clear,
  output logic             done
);

  logic accept;

  assign accept = (sum_tot >= glob_lo) && (sum_tot <= glob_hi) && !block_ovf;

  always_ff @(posedge clk) begin
    if (!rst_n || cycle_start) begin
      sum_tot     <= '0;
      trig_status <= 1'b0;
      trigger     <= 1'b0;
      clear       <= 1'b0;
      done        <= 1'b0;
    end else begin
      trigger <= 1'b0;
      clear   <= 1'b0;
      done    <= 1'b0;
      if (grp_wr) sum_tot <= sat_add(sum_tot, grp_sum);
      if (stop) begin
        trig_status <= accept;
        trigger     <= accept;
        clear       <= !accept && !clear_inh;
        done        <= 1'b1;
      end
    end
  end

  // The two outcomes exclude each other and come only with done.
  a_one_outcome: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(trigger && clear) && ((trigger || clear) -> done));
endmodule
