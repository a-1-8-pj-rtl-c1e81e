// clk_div2: divide-by-two clock divider (a toggle flip-flop).
//
// Two of these in series make the divide-by-4 that turns the 6.25 GHz clock
// phase Clk3 into the 1.5625 GHz digital clock of the synthesized logic. The
// published design only names the dividers; the toggle flip-flop and its
// asynchronous active-low reset (output low) are choices of this RTL.
//
// Timing: clk_out toggles on every rising edge of clk_in, so its rising edges
// coincide with every second rising edge of clk_in.
module clk_div2 (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) clk_out <= 1'b0;
    else        clk_out <= ~clk_out;
  end
endmodule
