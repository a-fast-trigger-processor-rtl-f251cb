// pre_adder: one pre-adder (PA) card, counting the hit channels of each of
// its front-end read-out buses while the buses are shifted out.
//
// There is one CNT_W-bit counter per bus. The rising edge of the read-out
// gate clears all counters and starts a new cycle (the source design does
// this with a capacitor-coupled pulse; here it is an edge detector). While
// the gate is high, every read-out clock strobe increments the counter of
// each bus whose hit line is active, so at the end of the read-out each
// counter holds the number of hit channels on its bus. The counters work in
// parallel, so the count is ready as soon as the read-out ends.
//
// Read side: when the master adder selects this card (sel, one line of the
// pre-adder address decoder) the counter addressed by cnt_addr is driven on
// data; when not selected, data is 0 so that the outputs of all cards can be
// OR-ed onto the common bus.
//
// Timing: one clock (clk); the read-out clock reaches the card as a one-cycle
// strobe ro_stb. A strobe that falls in the cycle of the gate's rising edge
// is counted. data is combinational from sel/cnt_addr.
//
// Design choices not fixed by the source: the counters saturate at their
// maximum instead of wrapping, so that a crowded bus always reads high and
// is discarded by the master adder's per-bus threshold; reset is
// synchronous and active low.
module pre_adder #(
  parameter int unsigned N_BUS = 16,
  parameter int unsigned CNT_W = 8,
  localparam int unsigned AW   = (N_BUS > 1) ? $clog2(N_BUS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             gate,      // STROC read-out gate, high during read-out
  input  logic             ro_stb,    // one pulse per read-out clock period
  input  logic [N_BUS-1:0] hit,       // hit activity of each bus at this strobe
  input  logic             sel,       // this card addressed by the master adder
  input  logic [AW-1:0]    cnt_addr,  // bus counter to drive on data
  output logic [CNT_W-1:0] data       // addressed counter, 0 when not selected
);

  logic [CNT_W-1:0] cnt [N_BUS];
  logic             gate_q;
  logic             gate_rise;

  assign gate_rise = gate && !gate_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gate_q <= 1'b0;
      for (int i = 0; i < N_BUS; i++) cnt[i] <= '0;
    end else begin
      gate_q <= gate;
      for (int i = 0; i < N_BUS; i++) begin
        if (gate_rise)
          cnt[i] <= CNT_W'(ro_stb && hit[i]);
        else if (gate && ro_stb && hit[i] && (cnt[i] != {CNT_W{1'b1}}))
          cnt[i] <= cnt[i] + 1'b1;
      end
    end
  end

  always_comb begin
    data = '0;
    if (sel && (32'(cnt_addr) < N_BUS)) data = cnt[cnt_addr];
  end

endmodule
