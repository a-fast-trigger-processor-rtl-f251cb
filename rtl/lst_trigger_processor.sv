// lst_trigger_processor: the complete fast trigger processor for a limited
// streamer tube detector: N_PA pre-adder cards and one master adder joined
// by the common pre-adder bus.
//
// During the read-out of the front-end buses (gate high) each pre-adder
// counts, in parallel, the hit channels of its 16 buses. When the gate
// falls the master adder sums the bus counts into programmed groups and a
// global sum and pulses trigger or clear. With 7 pre-adders the system
// covers 7 x 16 buses of 1024 channels (114 688 channels).
//
// Interface: clk (10 MHz in the source system) and rst_n; gate and ro_stb
// (one-cycle strobe per read-out clock period, delivered by the level
// adapter from the read-out controller); hit[p][b], the hit activity of
// bus b on pre-adder p at each strobe; the master adder's CAMAC command port;
// trigger, clear, done (decision taken) and busy.
//
// The common bus is modelled as the OR of the pre-adder data outputs, each
// of which is 0 unless its card is selected.
module lst_trigger_processor
  import lst_pkg::*;
#(
  parameter int unsigned N_PA  = N_PA_MAX,
  parameter int unsigned DEPTH = PAT_DEPTH
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  gate,
  input  logic                  ro_stb,
  input  logic [BUS_PER_PA-1:0] hit [N_PA],
  input  logic                  cmd,
  input  logic [4:0]            f,
  input  logic [3:0]            a,
  input  logic [CAMAC_W-1:0]    w,
  output logic [CAMAC_W-1:0]    r,
  output logic                  q,
  output logic                  x,
  output logic                  trigger,
  output logic                  clear,
  output logic                  done,
  output logic                  busy
);

  logic [N_PA-1:0]   pa_sel;
  logic [BUS_AW-1:0] cnt_addr;
  logic [CNT_W-1:0]  pa_out [N_PA];
  logic [CNT_W-1:0]  pa_data;

  for (genvar p = 0; p < N_PA; p++) begin : g_pa
    pre_adder #(.N_BUS(BUS_PER_PA), .CNT_W(CNT_W)) u_pa (
      .clk, .rst_n, .gate, .ro_stb, .hit(hit[p]),
      .sel(pa_sel[p]), .cnt_addr, .data(pa_out[p])
    );
  end

  always_comb begin
    pa_data = '0;
    for (int p = 0; p < N_PA; p++) pa_data |= pa_out[p];
  end

  master_adder #(.N_PA(N_PA), .DEPTH(DEPTH)) u_ma (
    .clk, .rst_n, .gate, .pa_sel, .cnt_addr, .pa_data,
    .cmd, .f, .a, .w, .r, .q, .x, .trigger, .clear, .done, .busy
  );

endmodule
