// partial_sum_memory: the master adder's 12-bit partial sum RAM, one word
// per group of buses, with its CAMAC read-out pointer.
//
// During the master adder cycle each finished group is written at its group
// address (wr, wr_addr, wr_data). The sums stay readable until the next
// cycle: each CAMAC read strobe (F2-A1) returns the word at the read pointer
// and advances it, so the groups come out in order 0, 1, ... . rd_q is high
// while the pointer still addresses a group computed in the last cycle, and
// goes low afterwards, which ends a Q-stop/Q-scan block transfer.
//
// Timing: rd_data and rd_q are combinational from the pointer and are valid
// during the strobe; the pointer advances at the clock edge that ends it.
// ptr_clr (start of a new cycle, or CAMAC reset) returns it to group 0.
//
// Design choices not fixed by the source: the auto-increment read pointer
// and the use of Q to mark the end of the valid groups. The RAM is not reset.
module partial_sum_memory
  import lst_pkg::*;
#(
  parameter int unsigned NGRP = MAX_GROUPS,
  localparam int unsigned GAW = $clog2(NGRP)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr,
  input  logic [GAW-1:0]   wr_addr,
  input  logic [SUM_W-1:0] wr_data,
  input  logic [GAW:0]     n_valid,   // groups written in the last cycle
  input  logic             ptr_clr,
  input  logic             rd,
  output logic [SUM_W-1:0] rd_data,
  output logic             rd_q
);

  logic [SUM_W-1:0] mem [NGRP];
  logic [GAW:0]     rptr;

  always_ff @(posedge clk) begin
    if (wr) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || ptr_clr) rptr <= '0;
    else if (rd && rd_q)   rptr <= rptr + 1'b1;
  end

  assign rd_q    = (rptr < n_valid);
  assign rd_data = rd_q ? mem[rptr[GAW-1:0]] : '0;

endmodule
