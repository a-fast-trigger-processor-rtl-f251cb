// tb_partial_sum_memory: self-checking test of the partial sum RAM and its
// read pointer. Writes a random number of groups with random sums, then
// reads them back in order with read strobes, checking the data and that Q
// is high exactly for the groups written and low afterwards; repeats after
// a pointer clear, and checks that a read with Q low does not advance.
module tb_partial_sum_memory;
  import lst_pkg::*;
  localparam int NGRP = 16;

  logic clk = 1'b0, rst_n = 1'b0, wr = 1'b0, ptr_clr = 1'b0, rd = 1'b0;
  logic [3:0] wr_addr = '0;
  logic [SUM_W-1:0] wr_data = '0, rd_data;
  logic [4:0] n_valid = '0;
  logic rd_q;
  int checks = 0, failures = 0;
  int ref_mem [NGRP];

  always #50 clk = ~clk;

  partial_sum_memory #(.NGRP(NGRP)) dut (.*);

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

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 30; t++) begin
      int n;
      n = (t == 0) ? 16 : 1 + $urandom % 16;
      @(negedge clk); ptr_clr = 1'b1; n_valid = '0;
      @(negedge clk); ptr_clr = 1'b0;
      for (int g = 0; g < n; g++) begin
        ref_mem[g] = $urandom % 4096;
        wr = 1'b1; wr_addr = 4'(g); wr_data = SUM_W'(ref_mem[g]);
        @(negedge clk);
        n_valid = 5'(g + 1);
      end
      wr = 1'b0;
      for (int rep = 0; rep < 2; rep++) begin
        for (int g = 0; g <= n; g++) begin
          rd = 1'b1; #1;
          if (g < n) begin
            check(rd_q, $sformatf("Q low at group %0d of %0d", g, n));
            check(int'(rd_data) == ref_mem[g], $sformatf("group %0d read %0d exp %0d", g, rd_data, ref_mem[g]));
          end else begin
            check(!rd_q, "Q high past the last group");
          end
          @(negedge clk);
        end
        rd = 1'b0;
        @(negedge clk); ptr_clr = 1'b1; @(negedge clk); ptr_clr = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
