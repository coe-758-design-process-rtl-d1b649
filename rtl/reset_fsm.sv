// reset_fsm: control unit of the reset block, a six-state Moore machine.
//
// S0 (rest) waits for the external reset `rst`. When it is seen high on a
// clock edge the machine enters S1, where all three auxiliary resets are
// asserted and the counter runs. Each comparator flag then releases one
// reset: match16 moves S1 -> S2 (rstAux3 released), match24 moves S2 -> S3
// (rstAux2 released), match30 moves S3 -> S4 (rstAux1 released). S4 stops
// the counter with everything released, S5 clears the counter, and the
// machine returns to S0, ready for the next external reset. `rst` is only
// looked at in S0, so a reset that is still (or again) high while a sequence
// runs does not restart it; if it is still high when S0 is reached, a new
// sequence starts on the next edge.
//
// Outputs are decoded from the state alone:
//   state  inc clr aux1 aux2 aux3
//   S0      0   0   0    0    0
//   S1      1   0   1    1    1
//   S2      1   0   1    1    0
//   S3      1   0   1    0    0
//   S4      0   0   0    0    0
//   S5      0   1   0    0    0
// Unused codes 6 and 7 drive all outputs low and go to S0.
//
// Timing: outputs change right after the clock edge that changes the state.
// The state register starts in S0 at power-up through its initial value.
// States, transitions and the output table follow the reset block's
// description; the power-up value matches its initialised state signal.
// The state register's initial value is its power-up state, so a lint note
// about an initialised variable that is also assigned on the clock is
// expected.
module reset_fsm
  import reset_block_pkg::*;
(
  input  logic       clk,
  input  logic       rst,      // external reset (level, sampled in S0)
  input  logic       match16,
  input  logic       match24,
  input  logic       match30,
  output logic       inc,      // counter increment enable
  output logic       clr,      // counter clear
  output logic       rstAux1,
  output logic       rstAux2,
  output logic       rstAux3,
  output logic [2:0] state     // current state code, for debug
);

  state_t   st_q = S_REST;
  state_t   st_n;
  fsm_out_t o;

  // State storage.
  always_ff @(posedge clk) st_q <= st_n;

  // Next state.
  always_comb begin
    unique case (st_q)
      S_REST:     st_n = rst     ? S_ALL3    : S_REST;
      S_ALL3:     st_n = match16 ? S_AUX12   : S_ALL3;
      S_AUX12:    st_n = match24 ? S_AUX1    : S_AUX12;
      S_AUX1:     st_n = match30 ? S_RELEASE : S_AUX1;
      S_RELEASE:  st_n = S_CLEARCNT;
      S_CLEARCNT: st_n = S_REST;
      default:    st_n = S_REST;
    endcase
  end

  // Moore outputs.
  always_comb begin
    o = '0;
    case (st_q)
      S_ALL3:     o = '{inc: 1'b1, clr: 1'b0, aux1: 1'b1, aux2: 1'b1, aux3: 1'b1};
      S_AUX12:    o = '{inc: 1'b1, clr: 1'b0, aux1: 1'b1, aux2: 1'b1, aux3: 1'b0};
      S_AUX1:     o = '{inc: 1'b1, clr: 1'b0, aux1: 1'b1, aux2: 1'b0, aux3: 1'b0};
      S_CLEARCNT: o = '{inc: 1'b0, clr: 1'b1, aux1: 1'b0, aux2: 1'b0, aux3: 1'b0};
      default:    o = '0;
    endcase
  end

  assign inc     = o.inc;
  assign clr     = o.clr;
  assign rstAux1 = o.aux1;
  assign rstAux2 = o.aux2;
  assign rstAux3 = o.aux3;
  assign state   = st_q;

endmodule
