// retiming: aligns the six sampler outputs to the rising edge of clock phase
// Clk3.
//
// Samples taken by phases clk0..clk3 are retimed by four type I dynamic
// flip-flops (positive-edge triggered, non-inverting). Samples taken by
// clk5 and clk7 are retimed by two type II dynamic flip-flops: three
// alternating dynamic latches that capture on the falling edge of Clk3 and
// pass the value on at the next rising edge (an extra half cycle), with an
// odd number of inverters so their outputs are complemented (Dout2_n,
// Dout3_n). All of this follows the published retiming circuit. The dynamic
// latches are modelled as edge-triggered registers; they have no reset.
//
// Outputs (all change after the rising edge of clk3):
//   edge0, dout0, edge1 : phase information for the subsampler (clk0,1,2)
//   dout0, dout1        : recovered data of clk1, clk3
//   dout2_n, dout3_n    : complemented recovered data of clk5, clk7
module retiming (
  input  logic clk3,
  input  logic smp_clk0,
  input  logic smp_clk1,
  input  logic smp_clk2,
  input  logic smp_clk3,
  input  logic smp_clk5,
  input  logic smp_clk7,
  output logic edge0,
  output logic dout0,
  output logic edge1,
  output logic dout1,
  output logic dout2_n,
  output logic dout3_n
);
  timeunit 1ps;
  timeprecision 1fs;

  // Type II first stage: captured while Clk3 falls.
  logic d2_half, d3_half;

  // Type I array.
  always_ff @(posedge clk3) begin
    edge0 <= smp_clk0;
    dout0 <= smp_clk1;
    edge1 <= smp_clk2;
    dout1 <= smp_clk3;
  end

  // Type II array: negative-edge capture ...
  always_ff @(negedge clk3) begin
    d2_half <= smp_clk5;
    d3_half <= smp_clk7;
  end

  // ... followed by the half-cycle stage, inverted output.
  always_ff @(posedge clk3) begin
    dout2_n <= ~d2_half;
    dout3_n <= ~d3_half;
  end
endmodule
