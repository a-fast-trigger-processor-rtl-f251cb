// pattern_unit: the master adder's PATTERN UNIT, a small RAM holding the
// programmed sequence of buses, and the sequencer that steps through it.
//
// Each 8-bit word (lst_pkg::pattern_t) names one bus: bits 3..0 are the bus
// counter address, bits 6..4 go through "decoder A" to select one of up to 7
// pre-adder cards, and bit 7 marks the last bus of a group. A word whose
// pre-adder field is 7 (the decoder's 8th output) is the STOP of the cycle.
//
// Programming: after clr (CAMAC reset), each wr pulse stores wr_data at the
// next address (auto-increment from 0). wr_ok is low once the memory is full
// and further writes are ignored.
//
// Run: start (one cycle, ignored while busy) restarts the read address at 0
// and sets busy. From the next cycle on, one word is presented per clock: the
// words are decoded combinationally into pa_sel (one-hot), cnt_addr,
// bus_valid and eog; on a STOP word, stop is high for one cycle and busy
// drops. At a 10 MHz clock this is the source's 100 ns per bus. seq_abort (CAMAC
// reset) ends a running sequence without a stop pulse.
//
// Design choices not fixed by the source: the RAM depth (256 words), the
// auto-increment write port, and that the last address always acts as a
// STOP so that a sequence without one cannot run forever.
module pattern_unit
  import lst_pkg::*;
#(
  parameter int unsigned DEPTH = PAT_DEPTH,
  parameter int unsigned N_PA  = N_PA_MAX,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  // programming (CAMAC F16-A1)
  input  logic               clr,        // reset the write address
  input  logic               wr,
  input  pattern_t           wr_data,
  output logic               wr_ok,      // memory not yet full
  // sequencing
  input  logic               start,
  input  logic               seq_abort,
  output logic               busy,
  output logic [N_PA-1:0]    pa_sel,     // decoder A, one-hot, 0 when idle
  output logic [BUS_AW-1:0]  cnt_addr,
  output logic               bus_valid,  // a bus word is presented this cycle
  output logic               eog,        // that bus ends its group
  output logic               stop        // end of sequence, one cycle
);

  pattern_t       mem [DEPTH];
  logic [AW:0]    wptr;
  logic [AW-1:0]  rptr;
  pattern_t       word;
  logic           is_stop;

  assign wr_ok = (wptr < (AW+1)'(DEPTH));

  always_ff @(posedge clk) begin
    if (wr && wr_ok) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) wptr <= '0;
    else if (wr && wr_ok) wptr <= wptr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || seq_abort) begin
      busy <= 1'b0;
      rptr <= '0;
    end else if (start && !busy) begin
      busy <= 1'b1;
      rptr <= '0;
    end else if (busy) begin
      if (is_stop) busy <= 1'b0;
      else         rptr <= rptr + 1'b1;
    end
  end

  assign word      = mem[rptr];
  assign is_stop   = (word.pa == PA_STOP) || (rptr == AW'(DEPTH - 1));
  assign stop      = busy && is_stop;
  assign bus_valid = busy && !is_stop;
  assign eog       = bus_valid && word.eog;
  assign cnt_addr  = word.bus;

  always_comb begin
    pa_sel = '0;
    if (bus_valid && (32'(word.pa) < N_PA)) pa_sel[word.pa] = 1'b1;
  end

  // At most one card is selected, and never on the STOP word.
  a_sel_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(pa_sel));
  a_stop_no_bus: assert property (@(posedge clk) disable iff (!rst_n) !(stop && bus_valid));

endmodule
