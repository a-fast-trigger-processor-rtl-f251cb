// tb_pre_adder: self-checking test of one pre-adder card.
//
// Runs read-out cycles with random hit patterns on 16 buses and a reference
// count per bus kept in the testbench (saturating at 255), then reads every
// counter back through the select/address port and checks that an
// unselected card drives 0. One bus is hit at every strobe of a long
// read-out so that its counter saturates; a second cycle checks that the
// gate's rising edge clears the counters. Read-out clock: one strobe every
// second clock (5 MHz read-out against a 10 MHz clock).
module tb_pre_adder;
  localparam int N_BUS = 16;
  localparam int CNT_W = 8;

  logic clk = 1'b0, rst_n = 1'b0, gate = 1'b0, ro_stb = 1'b0, sel = 1'b0;
  logic [N_BUS-1:0] hit = '0;
  logic [3:0] cnt_addr = '0;
  logic [CNT_W-1:0] data;
  int checks = 0, failures = 0;
  int ref_cnt [N_BUS];
  int saturations = 0;

  always #50 clk = ~clk;

  pre_adder #(.N_BUS(N_BUS), .CNT_W(CNT_W)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic readout(input int nch, input int density);
    for (int b = 0; b < N_BUS; b++) ref_cnt[b] = 0;
    @(negedge clk); gate = 1'b1;
    for (int c = 0; c < nch; c++) begin
      @(negedge clk);
      ro_stb = 1'b1;
      for (int b = 0; b < N_BUS; b++) begin
        hit[b] = (b == 5) ? 1'b1 : (($urandom % 100) < density);
        if (hit[b] && ref_cnt[b] < 255) ref_cnt[b]++;
      end
      @(negedge clk);
      ro_stb = 1'b0;
      hit = $urandom;   // hits between strobes must not count
    end
    @(negedge clk); gate = 1'b0; hit = '0;
  endtask

  task automatic check_all();
    @(negedge clk);
    sel = 1'b0; cnt_addr = 4'd5;
    #1 checks++;
    if (data !== '0) begin failures++; $display("unselected card drives %0d", data); end
    for (int b = 0; b < N_BUS; b++) begin
      @(negedge clk);
      sel = 1'b1; cnt_addr = 4'(b);
      #1 checks++;
      if (int'(data) != ref_cnt[b]) begin
        failures++;
        $display("bus %0d: count %0d expected %0d", b, data, ref_cnt[b]);
      end
      if (ref_cnt[b] == 255) saturations++;
    end
    sel = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    readout(300, 30);   // bus 5 saturates
    check_all();
    readout(100, 10);   // counters must restart from 0
    check_all();
    readout(1024, 3);   // a full 1024-channel bus
    check_all();
    checks++;
    if (saturations == 0) begin failures++; $display("no saturation seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
