// camac_if: the master adder's CAMAC dataway interface: decodes the
// function (F) and sub-address (A) of each command addressed to the module,
// holds the programmable registers, and builds the read word, Q and X.
//
// Functions (source function table):
//   F16-A0  write the maximum meaningful hits per bus (W bits 7..0)
//   F16-A1  store the next pattern word (W bits 7..0)  -> pat_wr
//   F16-A2  write the next group upper threshold (W 11..0) -> thr_wr
//   F16-A3  write the global lower threshold (W 11..0)
//   F16-A4  write the global upper threshold (W 11..0)
//   F2-A0   read global sum (R 11..0), trigger status (R12), overflow (R14)
//   F2-A1   read the next partial sum (R 11..0) -> psum_rd
//   F9      reset
//   F26/F24 enable/inhibit the START input; F25 inhibit the CLEAR output
//
// Interface: cmd is the one-clock strobe of a command addressed to this
// station (N and S1 of the dataway, synchronised to clk); f, a and w are
// valid with it. r, q and x are combinational and valid during cmd.
//
// Design choices not fixed by the source: the register reset values
// (bus maximum 255, window 0..4095, START enabled, CLEAR not inhibited);
// F9 clears the write pointers, the read pointer and the CLEAR inhibit,
// aborts a running cycle, and leaves the programmed tables in place;
// bit 13 of the status word reads 0. Write bits above 11 are not used by
// any function.
module camac_if
  import lst_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cmd,
  input  logic [4:0]         f,
  input  logic [3:0]         a,
  input  logic [CAMAC_W-1:0] w,
  output logic [CAMAC_W-1:0] r,
  output logic               q,
  output logic               x,
  // registers
  output logic [CNT_W-1:0]   busmax,
  output logic [SUM_W-1:0]   glob_lo,
  output logic [SUM_W-1:0]   glob_hi,
  output logic               start_en,
  output logic               clear_inh,
  // strobes to the tables
  output logic               f9_reset,
  output logic               pat_wr,
  output pattern_t           pat_data,
  input  logic               pat_ok,
  output logic               thr_wr,
  output logic [SUM_W-1:0]   thr_data,
  input  logic               thr_ok,
  output logic               psum_rd,
  // read sources
  input  logic [SUM_W-1:0]   sum_tot,
  input  logic               trig_status,
  input  logic               block_ovf,
  input  logic [SUM_W-1:0]   psum_data,
  input  logic               psum_q
);

  logic is_wr, is_rd;

  assign is_wr = cmd && (f == F_WRITE);
  assign is_rd = cmd && (f == F_READ);

  assign f9_reset = cmd && (f == F_RESET);
  assign pat_wr   = is_wr && (a == 4'd1);
  assign pat_data = pattern_t'(w[7:0]);
  assign thr_wr   = is_wr && (a == 4'd2);
  assign thr_data = w[SUM_W-1:0];
  assign psum_rd  = is_rd && (a == 4'd1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busmax    <= '1;
      glob_lo   <= '0;
      glob_hi   <= '1;
      start_en  <= 1'b1;
      clear_inh <= 1'b0;
    end else if (cmd) begin
      unique case (f)
        F_WRITE: begin
          if (a == 4'd0) busmax  <= w[CNT_W-1:0];
          if (a == 4'd3) glob_lo <= w[SUM_W-1:0];
          if (a == 4'd4) glob_hi <= w[SUM_W-1:0];
        end
        F_RESET:   clear_inh <= 1'b0;
        F_INHSTRT: start_en  <= 1'b0;
        F_ENSTRT:  start_en  <= 1'b1;
        F_INHCLR:  clear_inh <= 1'b1;
        default: ;
      endcase
    end
  end

  always_comb begin
    r = '0;
    q = 1'b0;
    x = 1'b0;
    if (cmd) begin
      unique case (f)
        F_WRITE: begin
          x = (a <= 4'd4);
          unique case (a)
            4'd1:    q = pat_ok;
            4'd2:    q = thr_ok;
            default: q = (a <= 4'd4);
          endcase
        end
        F_READ: begin
          x = (a <= 4'd1);
          if (a == 4'd0) begin
            r[SUM_W-1:0] = sum_tot;
            r[12]        = trig_status;
            r[14]        = block_ovf;
            q            = 1'b1;
          end else if (a == 4'd1) begin
            r[SUM_W-1:0] = psum_data;
            q            = psum_q;
          end
        end
        F_RESET, F_INHSTRT, F_INHCLR, F_ENSTRT: begin
          x = 1'b1;
          q = 1'b1;
        end
        default: ;
      endcase
    end
  end

endmodule
