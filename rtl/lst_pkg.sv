// lst_pkg: types and constants shared by the limited-streamer-tube trigger processor.
//
// The processor counts hit channels on up to 7 x 16 front-end read-out buses
// (pre-adder cards), then a master adder sums the per-bus counts into up to
// 16 programmable groups of buses and into one global sum, and decides
// between a trigger and a fast clear. Widths that follow the source design:
// 8-bit per-bus counters, 16 buses per pre-adder, 12-bit partial and global
// sums, an 8-bit pattern word (4-bit bus address, 3-bit pre-adder address,
// end-of-group bit), up to 16 groups and up to 7 pre-adders (pre-adder code 7
// is the STOP code). The pattern memory depth (256 words) and the CAMAC word
// width (24 bits) are this design's choices.
package lst_pkg;

  localparam int unsigned BUS_PER_PA = 16;   // buses per pre-adder card
  localparam int unsigned BUS_AW     = 4;    // bus (count) address bits
  localparam int unsigned CNT_W      = 8;    // per-bus hit counter width
  localparam int unsigned SUM_W      = 12;   // partial and global sum width
  localparam int unsigned MAX_GROUPS = 16;   // groups of buses
  localparam int unsigned GRP_AW     = 4;    // group address bits
  localparam int unsigned PA_AW      = 3;    // pre-adder address bits
  localparam int unsigned N_PA_MAX   = 7;    // pre-adders on the common bus
  localparam int unsigned PAT_DEPTH  = 256;  // pattern memory words
  localparam int unsigned PAT_AW     = 8;    // pattern memory address bits
  localparam int unsigned CAMAC_W    = 24;   // CAMAC read/write data width

  // Pre-adder code that decodes to the 8th decoder output: end of sequence.
  localparam logic [PA_AW-1:0] PA_STOP = 3'd7;

  // One word of the pattern memory, in bit order 7..0.
  typedef struct packed {
    logic              eog;   // bit 7: last bus of the current group
    logic [PA_AW-1:0]  pa;    // bits 6..4: pre-adder address (7 = STOP)
    logic [BUS_AW-1:0] bus;   // bits 3..0: bus counter address
  } pattern_t;

  // CAMAC function codes used by the master adder.
  typedef enum logic [4:0] {
    F_READ    = 5'd2,    // read group 1
    F_RESET   = 5'd9,    // reset
    F_WRITE   = 5'd16,   // write group 1
    F_INHSTRT = 5'd24,   // inhibit START input
    F_INHCLR  = 5'd25,   // inhibit CLEAR output
    F_ENSTRT  = 5'd26    // enable START input
  } camac_f_e;

  // Saturating add of a value to a SUM_W-bit accumulator.
  function automatic logic [SUM_W-1:0] sat_add(input logic [SUM_W-1:0] acc,
                                               input logic [SUM_W-1:0] inc);
    logic [SUM_W:0] s;
    s = {1'b0, acc} + {1'b0, inc};
    return s[SUM_W] ? {SUM_W{1'b1}} : s[SUM_W-1:0];
  endfunction

endpackage
