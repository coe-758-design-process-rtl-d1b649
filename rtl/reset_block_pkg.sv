// reset_block_pkg: types and constants shared by the reset block's modules.
//
// The control unit is a six-state Moore machine. The state codes are the
// 3-bit values 0..5 (S0 = 3'b000 ... S5 = 3'b101), the same numbers the
// debug state output shows, so a logic analyser trace reads S0..S5 directly.
// The count width and the three thresholds are the ones the reset block
// is built around: a 5-bit counter and matches at 16, 24 and 30.
package reset_block_pkg;

  // Width of the cycle counter (counts 0..31).
  localparam int unsigned COUNT_W = 5;

  // Count values at which the three auxiliary resets are released in turn.
  localparam int unsigned MATCH_AUX3 = 16;
  localparam int unsigned MATCH_AUX2 = 24;
  localparam int unsigned MATCH_AUX1 = 30;

  typedef enum logic [2:0] {
    S_REST     = 3'd0,  // S0: wait for the external reset
    S_ALL3     = 3'd1,  // S1: rstAux1, rstAux2 and rstAux3 asserted
    S_AUX12    = 3'd2,  // S2: rstAux1 and rstAux2 asserted
    S_AUX1     = 3'd3,  // S3: only rstAux1 asserted
    S_RELEASE  = 3'd4,  // S4: all auxiliary resets released
    S_CLEARCNT = 3'd5   // S5: clear the counter
  } state_t;

  // Moore outputs of one state.
  typedef struct packed {
    logic inc;   // counter increment enable (incC)
    logic clr;   // counter clear (rstC)
    logic aux1;  // rstAux1
    logic aux2;  // rstAux2
    logic aux3;  // rstAux3
  } fsm_out_t;

endpackage
