`timescale 1ps / 1ps

// tb_edge_time: self-checking testbench of the coarse time counter.
// Checks that reset clears the count, that the count rises by exactly one per
// clock over many clocks, that a second reset restarts it, and that a narrow
// instance wraps from all ones to zero.
module tb_edge_time;
  import tdc_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  coarse_t coarse;
  logic [3:0] cnt4;
  int checks = 0, failures = 0;

  always #2000 clk = ~clk;   // 250 MHz

  edge_time dut (.clk(clk), .rst(rst), .coarse_o(coarse));
  edge_time #(.WIDTH(4)) dut4 (.clk(clk), .rst(rst), .coarse_o(cnt4));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(coarse == 0, "count is zero in reset");
    rst = 1'b0;
    for (int i = 1; i <= 100; i++) begin
      @(negedge clk);
      check(coarse == coarse_t'(i), $sformatf("count %0d expected %0d", coarse, i));
      check(cnt4 == 4'(i), $sformatf("4-bit count %0d expected %0d", cnt4, i % 16));
    end
    rst = 1'b1;
    @(negedge clk);
    check(coarse == 0, "second reset clears count");
    rst = 1'b0;
    repeat (7) @(negedge clk);
    check(coarse == 7, "count restarts after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
