// up_counter: the reset block's time base, a WIDTH-bit up-counter.
//
// On each rising clock edge the count is cleared to zero when `clr` is high,
// otherwise it advances by one when `inc` is high, otherwise it holds. `clr`
// wins over `inc`. The count wraps modulo 2**WIDTH; the control unit never
// lets it reach the wrap in normal use (it stops incrementing at 31).
//
// Interface: clk, inc (incC), clr (rstC), count (countVal).
// Timing: count changes one clock edge after inc/clr are seen; it starts at
// zero at power-up through the variable's initial value, as an FPGA
// configuration would load it.
//
// The increment/clear behaviour and the 5-bit width follow the reset block's
// description. Its clear there acts asynchronously; here it is taken on the
// clock edge, which keeps the clear (a decoded state) off the flop's
// asynchronous pin. The only visible effect is that the count still shows
// its last value during the single clear state and reads zero from the next
// cycle on.
//
// The register has both an initial value and a clocked assignment on
// purpose: the initial value is its power-up state (there is no separate
// power-on reset input), so a lint note about the pair is expected.
module up_counter #(
  parameter int unsigned WIDTH = 5
) (
  input  logic             clk,
  input  logic             inc,
  input  logic             clr,
  output logic [WIDTH-1:0] count
);

  logic [WIDTH-1:0] count_q = '0;

  always_ff @(posedge clk) begin
    if (clr)
      count_q <= '0;
    else if (inc)
      count_q <= count_q + 1'b1;
  end

  assign count = count_q;

endmodule
