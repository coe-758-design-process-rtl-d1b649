// tb_reset_fsm: self-checking test of the six-state control unit.
//
// Drives the external reset and the three comparator flags directly with
// random values (flags are pulsed rarely so every state is held for a
// while) and compares the state code and all five outputs with a reference
// state table kept in the testbench, after every clock edge. Counts every
// transition of the state diagram and fails if one never happened.
module tb_reset_fsm;
  timeunit 1ns;
  timeprecision 1ps;
  logic clk = 1'b0;
  logic rst = 1'b0, m16 = 1'b0, m24 = 1'b0, m30 = 1'b0;
  logic inc, clr, a1, a2, a3;
  logic [2:0] state;
  int checks = 0, failures = 0;
  int unsigned ref_st = 0;
  int trans [0:5][0:5];

  reset_fsm dut (.clk, .rst, .match16(m16), .match24(m24), .match30(m30),
                 .inc, .clr, .rstAux1(a1), .rstAux2(a2), .rstAux3(a3), .state);

  always #10 clk = ~clk;

  // Reference output table, one row per state: {inc, clr, aux1, aux2, aux3}.
  function automatic logic [4:0] ref_out(int unsigned s);
    case (s)
      1: return 5'b10111;
      2: return 5'b10110;
      3: return 5'b10100;
      5: return 5'b01000;
      default: return 5'b00000;
    endcase
  endfunction

  function automatic int unsigned ref_next(int unsigned s, logic r, logic x16, logic x24, logic x30);
    case (s)
      0: return r   ? 1 : 0;
      1: return x16 ? 2 : 1;
      2: return x24 ? 3 : 2;
      3: return x30 ? 4 : 3;
      4: return 5;
      default: return 0;
    endcase
  endfunction

  task automatic check(string what, int unsigned got, int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t (ref state S%0d)", what, got, exp, $time, ref_st);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned nxt;
    foreach (trans[i, j]) trans[i][j] = 0;
    #1;
    check("power-up state", state, 0);
    check("power-up outputs", {inc, clr, a1, a2, a3}, 0);
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      rst = ($urandom_range(0, 3) == 0);
      m16 = ($urandom_range(0, 5) == 0);
      m24 = ($urandom_range(0, 5) == 0);
      m30 = ($urandom_range(0, 5) == 0);
      #1 check("outputs", {inc, clr, a1, a2, a3}, ref_out(ref_st));
      @(posedge clk);
      nxt = ref_next(ref_st, rst, m16, m24, m30);
      trans[ref_st][nxt]++;
      ref_st = nxt;
      #1 check("state", state, ref_st);
    end
    // Every edge of the state diagram, self-loops included.
    begin
      static int unsigned edges [10][2] = '{'{0,0}, '{0,1}, '{1,1}, '{1,2}, '{2,2},
                                      '{2,3}, '{3,3}, '{3,4}, '{4,5}, '{5,0}};
      foreach (edges[k]) begin
        checks++;
        if (trans[edges[k][0]][edges[k][1]] == 0) begin
          failures++;
          $display("FAIL transition S%0d->S%0d never taken", edges[k][0], edges[k][1]);
        end else
          $display("transition S%0d->S%0d taken %0d times", edges[k][0], edges[k][1],
                   trans[edges[k][0]][edges[k][1]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
