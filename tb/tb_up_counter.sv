// tb_up_counter: self-checking test of the cycle counter.
//
// Checks the power-up value, then drives random increment/clear patterns
// for 2000 cycles (including long increment runs that wrap the count) and
// compares the count with a reference value kept in the testbench after
// every clock edge. Also checks clear priority over increment explicitly.
module tb_up_counter;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int W = 5;
  logic clk = 1'b0;
  logic inc = 1'b0, clr = 1'b0;
  logic [W-1:0] count;
  int checks = 0, failures = 0;
  int unsigned ref_cnt = 0;
  int wraps = 0;

  up_counter #(.WIDTH(W)) dut (.clk, .inc, .clr, .count);

  always #10 clk = ~clk;

  task automatic check(string what, int unsigned got, int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 check("power-up count", count, 0);
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (i == 100) begin inc = 1'b1; clr = 1'b1; end         // clear wins
      else if (i >= 200 && i < 300) begin inc = 1'b1; clr = 1'b0; end  // long run, wraps
      else begin
        inc = ($urandom_range(0, 3) != 0);
        clr = ($urandom_range(0, 15) == 0);
      end
      @(posedge clk);
      if (clr) ref_cnt = 0;
      else if (inc) begin
        if (ref_cnt == (1 << W) - 1) wraps++;
        ref_cnt = (ref_cnt + 1) % (1 << W);
      end
      #1 check("count", count, ref_cnt);
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL count never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
