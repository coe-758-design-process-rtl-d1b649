// match_comparator: flags one count value.
//
// `match` is high while `count` equals VALUE. With REGISTERED = 0 (the form
// the reset block uses) the compare is purely combinational, so `match` is
// high in the same cycle as the count value. With REGISTERED = 1 the result
// goes through a flip-flop and `match` is high one cycle after the count
// held VALUE; that variant is offered for timing-critical uses but the reset
// block's thresholds assume the combinational form.
//
// Interface: clk (used only when REGISTERED = 1), count, match.
// The equality test and both forms follow the reset block's description;
// the registered flop's power-up value of 0 is this design's choice.
// In the combinational form `clk` is not used and is left unconnected
// inside; the port stays so both forms share one interface.
module match_comparator #(
  parameter int unsigned WIDTH      = 5,
  parameter int unsigned VALUE      = 16,
  parameter bit          REGISTERED = 1'b0
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] count,
  output logic             match
);

  logic eq;
  assign eq = (count == WIDTH'(VALUE));

  if (REGISTERED) begin : g_reg
    logic match_q = 1'b0;
    always_ff @(posedge clk) match_q <= eq;
    assign match = match_q;
  end else begin : g_comb
    assign match = eq;
  end

endmodule
