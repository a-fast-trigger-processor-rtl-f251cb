// tb_pattern_unit: self-checking test of the pattern memory and sequencer.
//
// Programs random bus sequences (random pre-adder and bus addresses, random
// end-of-group marks, a STOP word at the end), starts the sequence and checks
// on every clock the one-hot pre-adder select, the count address, the
// end-of-group and stop flags against the programmed list, and that the
// sequence takes exactly one clock per word. Also checks: a start while busy
// is ignored, the full flag after DEPTH writes, the write-pointer reset, and
// that a memory with no STOP word stops at its last address.
module tb_pattern_unit;
  import lst_pkg::*;
  localparam int DEPTH = 256;
  localparam int N_PA  = 7;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, wr = 1'b0, start = 1'b0, seq_abort = 1'b0;
  pattern_t wr_data = '0;
  logic wr_ok, busy, bus_valid, eog, stop;
  logic [N_PA-1:0] pa_sel;
  logic [BUS_AW-1:0] cnt_addr;
  int checks = 0, failures = 0;
  pattern_t prog [$];

  always #50 clk = ~clk;

  pattern_unit #(.DEPTH(DEPTH), .N_PA(N_PA)) dut (.*);

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

  task automatic program_seq(input int nbus, input bit with_stop);
    prog.delete();
    @(negedge clk); clr = 1'b1; @(negedge clk); clr = 1'b0;
    for (int i = 0; i < nbus; i++) begin
      pattern_t p;
      p.bus = 4'($urandom);
      p.pa  = 3'($urandom % N_PA);
      p.eog = ($urandom % 4) == 0;
      prog.push_back(p);
    end
    if (with_stop) prog.push_back(pattern_t'({1'b0, PA_STOP, 4'd0}));
    foreach (prog[i]) begin
      @(negedge clk); wr = 1'b1; wr_data = prog[i];
    end
    @(negedge clk); wr = 1'b0;
  endtask

  task automatic run_seq(input int nbus);
    int cyc;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    for (cyc = 0; cyc < nbus; cyc++) begin
      logic [N_PA-1:0] exp_sel;
      exp_sel = '0; exp_sel[prog[cyc].pa] = 1'b1;
      check(busy && bus_valid && !stop, $sformatf("word %0d not a bus", cyc));
      check(pa_sel == exp_sel, $sformatf("word %0d pa_sel %b exp %b", cyc, pa_sel, exp_sel));
      check(cnt_addr == prog[cyc].bus, $sformatf("word %0d cnt_addr", cyc));
      check(eog == prog[cyc].eog, $sformatf("word %0d eog", cyc));
      if (cyc == 3) start = 1'b1;   // must be ignored while busy
      @(negedge clk);
      start = 1'b0;
    end
    check(stop && !bus_valid && pa_sel == '0, $sformatf("no stop after %0d buses", nbus));
    @(negedge clk);
    check(!busy && !stop, "busy after stop");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    program_seq(112, 1'b1);
    run_seq(112);
    program_seq(10, 1'b1);
    run_seq(10);
    program_seq(1, 1'b1);
    run_seq(1);
    // fill the whole memory with bus words: the last address acts as STOP
    program_seq(DEPTH, 1'b0);
    check(!wr_ok, "memory full not flagged");
    run_seq(DEPTH - 1);
    // write-pointer reset makes room again
    @(negedge clk); clr = 1'b1; @(negedge clk); clr = 1'b0;
    check(wr_ok, "clr did not reset the write pointer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
