// reset_block: generates three auxiliary resets of staggered lengths from
// one external reset.
//
// When the external reset `rst` is seen high, all three auxiliary resets go
// high together and are then released one after another: rstAux3 first,
// rstAux2 next, rstAux1 last. The block is built from a 5-bit up-counter
// that counts clock cycles, three equality comparators on the count (at
// MATCH3 = 16, MATCH2 = 24, MATCH1 = 30) and a six-state control FSM that
// starts the counter, steps through the release states on the comparator
// flags, then stops and clears the counter and waits for the next reset.
//
// Timing, with E0 the clock edge that first samples rst = 1 in the rest
// state: all three outputs rise just after E0 and the count is 0 in the
// cycle after E0, n in the cycle after E0+n. rstAux3 falls after edge
// E0+MATCH3+1, rstAux2 after E0+MATCH2+1 and rstAux1 after E0+MATCH1+1, so
// with the default thresholds they are high for 17, 25 and 31 cycles. Two
// more cycles (release, counter clear) return the block to rest at
// E0+MATCH1+3; a reset still high then starts a new sequence on the next
// edge. Changes of rst while a sequence runs are ignored.
//
// Interface: clk; rst (external reset, active high); rstAux1..3 (active
// high); and the debug outputs debSt (FSM state code 0..5), debC (counter),
// debM16/debM24/debM30 (comparator flags), meant for an on-chip logic
// analyser. The structure, state table, thresholds and debug ports follow
// the reset block's description; the counter clear taken on the clock edge
// instead of asynchronously is this design's choice (see up_counter).
module reset_block
  import reset_block_pkg::*;
#(
  parameter int unsigned CNT_W  = COUNT_W,
  parameter int unsigned MATCH3 = MATCH_AUX3,
  parameter int unsigned MATCH2 = MATCH_AUX2,
  parameter int unsigned MATCH1 = MATCH_AUX1
) (
  input  logic             clk,
  input  logic             rst,
  output logic             rstAux1,
  output logic             rstAux2,
  output logic             rstAux3,
  // Debug
  output logic [2:0]       debSt,
  output logic [CNT_W-1:0] debC,
  output logic             debM16,
  output logic             debM24,
  output logic             debM30
);

  logic [CNT_W-1:0] count_val;
  logic inc_c, rst_c;
  logic match16, match24, match30;

  // The thresholds must rise and fit in the counter.
  initial begin
    assert (MATCH3 < MATCH2 && MATCH2 < MATCH1 && MATCH1 < (1 << CNT_W))
      else $error("reset_block: thresholds must satisfy MATCH3 < MATCH2 < MATCH1 < 2**CNT_W");
  end

  up_counter #(.WIDTH(CNT_W)) u_counter (
    .clk   (clk),
    .inc   (inc_c),
    .clr   (rst_c),
    .count (count_val)
  );

  match_comparator #(.WIDTH(CNT_W), .VALUE(MATCH3)) u_cmp16 (
    .clk (clk), .count (count_val), .match (match16)
  );
  match_comparator #(.WIDTH(CNT_W), .VALUE(MATCH2)) u_cmp24 (
    .clk (clk), .count (count_val), .match (match24)
  );
  match_comparator #(.WIDTH(CNT_W), .VALUE(MATCH1)) u_cmp30 (
    .clk (clk), .count (count_val), .match (match30)
  );

  reset_fsm u_fsm (
    .clk     (clk),
    .rst     (rst),
    .match16 (match16),
    .match24 (match24),
    .match30 (match30),
    .inc     (inc_c),
    .clr     (rst_c),
    .rstAux1 (rstAux1),
    .rstAux2 (rstAux2),
    .rstAux3 (rstAux3),
    .state   (debSt)
  );

  assign debC   = count_val;
  assign debM16 = match16;
  assign debM24 = match24;
  assign debM30 = match30;

endmodule
