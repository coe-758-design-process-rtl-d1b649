// tb_match_comparator: self-checking test of the count comparator.
//
// Instantiates the three thresholds of the reset block (16, 24, 30) in the
// combinational form and the 16 threshold in the registered form. Sweeps
// every 5-bit count value, then random values, and checks that the
// combinational flag equals (count == VALUE) in the same cycle and the
// registered flag equals it one clock later.
module tb_match_comparator;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int W = 5;
  logic clk = 1'b0;
  logic [W-1:0] count = '0;
  logic m16, m24, m30, m16r;
  logic prev_eq16 = 1'b0;
  int checks = 0, failures = 0;
  int hits16 = 0;

  match_comparator #(.WIDTH(W), .VALUE(16)) u16 (.clk, .count, .match(m16));
  match_comparator #(.WIDTH(W), .VALUE(24)) u24 (.clk, .count, .match(m24));
  match_comparator #(.WIDTH(W), .VALUE(30)) u30 (.clk, .count, .match(m30));
  match_comparator #(.WIDTH(W), .VALUE(16), .REGISTERED(1'b1)) u16r (.clk, .count, .match(m16r));

  always #10 clk = ~clk;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: count=%0d got %b expected %b", what, count, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      count = (i < 32) ? W'(i) : W'($urandom_range(0, 31));
      #1;
      check("match16", m16, count == 16);
      check("match24", m24, count == 24);
      check("match30", m30, count == 30);
      if (count == 16) hits16++;
      @(posedge clk);
      #1 check("match16 registered", m16r, count == 16);
    end
    checks++;
    if (hits16 == 0) begin failures++; $display("FAIL value 16 never driven"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
