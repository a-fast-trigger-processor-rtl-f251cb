// tb_camac_if: self-checking test of the CAMAC function decoder. Issues
// every implemented function and checks the registers it sets, the strobes
// it raises towards the tables, the read word layout (global sum in bits
// 11..0, trigger status in bit 12, overflow in bit 14), the partial-sum
// read path, and Q and X, including X low for functions and sub-addresses
// that are not implemented.
module tb_camac_if;
  import lst_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, cmd = 1'b0;
  logic [4:0] f = '0;
  logic [3:0] a = '0;
  logic [CAMAC_W-1:0] w = '0, r;
  logic q, x;
  logic [CNT_W-1:0] busmax;
  logic [SUM_W-1:0] glob_lo, glob_hi, thr_data;
  logic start_en, clear_inh, f9_reset, pat_wr, thr_wr, psum_rd;
  pattern_t pat_data;
  logic pat_ok = 1'b1, thr_ok = 1'b1, trig_status = 1'b0, block_ovf = 1'b0, psum_q = 1'b0;
  logic [SUM_W-1:0] sum_tot = '0, psum_data = '0;
  int checks = 0, failures = 0;

  always #50 clk = ~clk;

  camac_if dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Issue one command; the strobes and read data are sampled during it.
  task automatic naf(input int fn, input int sa, input int data,
                     output logic [CAMAC_W-1:0] rd, output logic rq, output logic rx,
                     output logic [5:0] strobes);
    @(negedge clk);
    cmd = 1'b1; f = 5'(fn); a = 4'(sa); w = CAMAC_W'(data);
    #1;
    rd = r; rq = q; rx = x;
    strobes = {f9_reset, pat_wr, thr_wr, psum_rd, 2'b00};
    @(negedge clk);
    cmd = 1'b0;
    #1 check(!f9_reset && !pat_wr && !thr_wr && !psum_rd && r == '0, "strobe without command");
  endtask

  initial begin
    logic [CAMAC_W-1:0] rd;
    logic rq, rx;
    logic [5:0] st;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    #1 check(busmax == 8'd255 && glob_lo == 0 && glob_hi == 4095 && start_en && !clear_inh, "reset values");
    naf(16, 0, 'hAB37, rd, rq, rx, st);
    check(busmax == 8'h37 && rq && rx, "F16-A0 bus maximum");
    naf(16, 3, 'h5123, rd, rq, rx, st);
    check(glob_lo == 12'h123 && rq && rx, "F16-A3 lower threshold");
    naf(16, 4, 'h79AB, rd, rq, rx, st);
    check(glob_hi == 12'h9AB && rq && rx, "F16-A4 upper threshold");
    for (int i = 0; i < 20; i++) begin
      int v;
      v = $urandom % 256;
      pat_ok = (i < 15);
      @(negedge clk);
      cmd = 1'b1; f = 5'd16; a = 4'd1; w = CAMAC_W'(v);
      #1 check(pat_wr && pat_data == pattern_t'(v) && q == pat_ok && x && !thr_wr, "F16-A1 pattern write");
      @(negedge clk); cmd = 1'b0;
    end
    for (int i = 0; i < 20; i++) begin
      int v;
      v = $urandom % 4096;
      thr_ok = (i < 16);
      @(negedge clk);
      cmd = 1'b1; f = 5'd16; a = 4'd2; w = CAMAC_W'(v);
      #1 check(thr_wr && thr_data == SUM_W'(v) && q == thr_ok && x && !pat_wr, "F16-A2 threshold write");
      @(negedge clk); cmd = 1'b0;
    end
    for (int i = 0; i < 20; i++) begin
      sum_tot = SUM_W'($urandom); trig_status = 1'($urandom); block_ovf = 1'($urandom);
      naf(2, 0, 0, rd, rq, rx, st);
      check(rd == {9'b0, block_ovf, 1'b0, trig_status, sum_tot} && rq && rx, "F2-A0 status word");
      psum_data = SUM_W'($urandom); psum_q = 1'($urandom);
      naf(2, 1, 0, rd, rq, rx, st);
      check(rd == {12'b0, psum_data} && rq == psum_q && rx && st[2], "F2-A1 partial sum read");
    end
    naf(24, 0, 0, rd, rq, rx, st);
    check(!start_en && rq && rx, "F24 inhibit START");
    naf(26, 0, 0, rd, rq, rx, st);
    check(start_en && rq && rx, "F26 enable START");
    naf(25, 0, 0, rd, rq, rx, st);
    check(clear_inh && rq && rx, "F25 inhibit CLEAR");
    naf(9, 0, 0, rd, rq, rx, st);
    check(!clear_inh && st[5] && rq && rx, "F9 reset");
    check(busmax == 8'h37 && glob_lo == 12'h123 && glob_hi == 12'h9AB, "F9 kept the thresholds");
    naf(16, 5, 'h12, rd, rq, rx, st);
    check(!rx && !rq && busmax == 8'h37, "F16-A5 not implemented");
    naf(2, 2, 0, rd, rq, rx, st);
    check(!rx && rd == '0, "F2-A2 not implemented");
    naf(0, 0, 0, rd, rq, rx, st);
    check(!rx && !rq, "F0 not implemented");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
