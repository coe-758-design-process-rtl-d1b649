// tb_reset_block: end-to-end test of the reset block at its default sizes.
//
// Runs the block with a 50 MHz clock through four phases:
//   1. a 4-cycle external reset pulse (the specified input), measuring how
//      many cycles each auxiliary reset stays high and when the block is
//      back at rest;
//   2. a second pulse that arrives while a sequence is running and must be
//      ignored;
//   3. an external reset held high for 250 cycles, which must retrigger the
//      block back to back every MATCH1+4 cycles;
//   4. random reset activity for 3000 cycles.
// Throughout, every output including the debug state, count and match
// flags is compared after each clock edge with a cycle model kept in the
// testbench, and each mechanism (trigger, each of the three releases, the
// counter clear, an ignored reset, a retrigger from a held reset) is
// counted; one that never happens is a failure.
module tb_reset_block;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int M3 = 16, M2 = 24, M1 = 30;
  localparam int LEN3 = M3 + 1, LEN2 = M2 + 1, LEN1 = M1 + 1;  // cycles high
  localparam int PERIOD = M1 + 4;                              // retrigger period

  logic clk = 1'b0;
  logic rst = 1'b0;
  logic a1, a2, a3, m16, m24, m30;
  logic [2:0] st;
  logic [4:0] cnt;
  int checks = 0, failures = 0;

  reset_block dut (.clk, .rst, .rstAux1(a1), .rstAux2(a2), .rstAux3(a3),
                   .debSt(st), .debC(cnt), .debM16(m16), .debM24(m24), .debM30(m30));

  always #10 clk = ~clk;  // 20 ns period, 50 MHz

  task automatic check(string what, int got, int exp);
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

  // ---------------------------------------------------------------------
  // Cycle model: phase of the sequence (0 = rest) and the counter.
  // In the model, phase p = 1 .. PERIOD-1 is the p-th cycle after the
  // triggering edge. Outputs are derived from p alone.
  int unsigned p = 0;
  int unsigned mcnt = 0;
  int n_trigger = 0, n_rel3 = 0, n_rel2 = 0, n_rel1 = 0, n_clear = 0;
  int n_ignored = 0, n_retrig = 0;
  logic prev_a1 = 0, prev_a2 = 0, prev_a3 = 0;

  function automatic int exp_state(int unsigned ph);
    if (ph == 0)           return 0;
    if (ph <= LEN3)        return 1;
    if (ph <= LEN2)        return 2;
    if (ph <= LEN1)        return 3;
    if (ph == LEN1 + 1)    return 4;
    return 5;
  endfunction

  always @(posedge clk) begin
    // advance the model on this edge using values sampled before it
    if (p == 0) begin
      if (rst) begin
        p <= 1;
        n_trigger++;
      end
    end else begin
      if (rst) n_ignored++;
      p <= (p == PERIOD - 1) ? 0 : p + 1;
    end
    // counter model: counts up in states 1..3, clears in state 5
    if (exp_state(p) inside {1, 2, 3}) mcnt <= (mcnt + 1) % 32;
    else if (exp_state(p) == 5) mcnt <= 0;
  end

  // compare after each edge
  always @(posedge clk) begin
    #1;
    check("state", st, exp_state(p));
    check("count", cnt, mcnt);
    check("rstAux1", a1, exp_state(p) inside {1, 2, 3});
    check("rstAux2", a2, exp_state(p) inside {1, 2});
    check("rstAux3", a3, exp_state(p) == 1);
    check("match16", m16, mcnt == M3);
    check("match24", m24, mcnt == M2);
    check("match30", m30, mcnt == M1);
    if (st == 5) n_clear++;
    if (prev_a3 && !a3) n_rel3++;
    if (prev_a2 && !a2) n_rel2++;
    if (prev_a1 && !a1) n_rel1++;
    prev_a1 = a1; prev_a2 = a2; prev_a3 = a3;
  end

  // ---------------------------------------------------------------------
  // Pulse-length measurement, independent of the cycle model.
  task automatic measure_one(output int l1, output int l2, output int l3,
                             output int back_at_rest);
    int t;
    l1 = 0; l2 = 0; l3 = 0; back_at_rest = -1;
    // wait for the rising edge of all three resets
    t = 0;
    while (!(a1 && a2 && a3) && t < 100) begin @(posedge clk); #2; t++; end
    for (int c = 0; c < 3 * PERIOD; c++) begin
      if (a1) l1++;
      if (a2) l2++;
      if (a3) l3++;
      @(posedge clk); #2;
      if (back_at_rest < 0 && st == 0) back_at_rest = c + 1;
    end
  endtask

  initial begin
    int l1, l2, l3, rest_at;
    int trig_before;
    #1;
    check("power-up rest state", st, 0);
    check("power-up count", cnt, 0);
    check("power-up outputs", {a1, a2, a3}, 0);
    repeat (3) @(posedge clk);

    // Phase 1: the specified 4-cycle external reset pulse.
    @(negedge clk) rst = 1'b1;
    fork
      begin repeat (4) @(negedge clk); rst = 1'b0; end
      measure_one(l1, l2, l3, rest_at);
    join
    check("rstAux1 cycles high", l1, LEN1);
    check("rstAux2 cycles high", l2, LEN2);
    check("rstAux3 cycles high", l3, LEN3);
    check("cycles until back at rest", rest_at, PERIOD - 1);

    // Phase 2: a pulse in the middle of a sequence is ignored.
    @(negedge clk) rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    repeat (10) @(negedge clk);
    trig_before = n_trigger;
    rst = 1'b1;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (PERIOD) @(negedge clk);
    check("no retrigger from a mid-sequence pulse", n_trigger, trig_before);
    check("state at rest afterwards", st, 0);

    // Phase 3: reset held for 250 cycles retriggers back to back.
    trig_before = n_trigger;
    rst = 1'b1;
    repeat (250) @(negedge clk);
    rst = 1'b0;
    // triggers at cycle 0, PERIOD, 2*PERIOD, ... while rst is high
    check("retriggers while reset held", n_trigger - trig_before, (250 + PERIOD - 1) / PERIOD);
    n_retrig = n_trigger - trig_before - 1;
    repeat (2 * PERIOD) @(negedge clk);

    // Phase 4: random reset activity.
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      rst = ($urandom_range(0, 19) == 0);
    end
    rst = 1'b0;
    repeat (PERIOD) @(negedge clk);

    $display("mechanisms: trigger=%0d release3=%0d release2=%0d release1=%0d clear=%0d ignored=%0d retrigger=%0d",
             n_trigger, n_rel3, n_rel2, n_rel1, n_clear, n_ignored, n_retrig);
    checks++; if (n_trigger == 0) begin failures++; $display("FAIL no trigger"); end
    checks++; if (n_rel3 == 0) begin failures++; $display("FAIL rstAux3 never released"); end
    checks++; if (n_rel2 == 0) begin failures++; $display("FAIL rstAux2 never released"); end
    checks++; if (n_rel1 == 0) begin failures++; $display("FAIL rstAux1 never released"); end
    checks++; if (n_clear == 0) begin failures++; $display("FAIL counter never cleared"); end
    checks++; if (n_ignored == 0) begin failures++; $display("FAIL no reset ignored mid-sequence"); end
    checks++; if (n_retrig == 0) begin failures++; $display("FAIL no retrigger from held reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
