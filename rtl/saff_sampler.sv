// saff_sampler: behavioural model of the high-speed sampler, a sense-amplifier
// based flip-flop (a fast sense-amplifier input stage followed by a slower
// regenerative latch).
//
// The real part is a full-custom analog circuit. This model keeps only its
// logic behaviour: the input is captured at the rising edge of the sampling
// clock phase and appears on q after a clock-to-output delay TCQ_PS. The
// capture itself is ideal (zero aperture, no metastability); the delay value
// is an assumption, the circuit's own delay is not published.
//
// Ports: clk is one of the 6.25 GHz DCO phases, d the 25 Gb/s serial input,
// q the sampled bit, valid for one clock period.
module saff_sampler #(
  parameter real TCQ_PS = 15.0
) (
  input  logic clk,
  input  logic d,
  output logic q
);
  timeunit 1ps;
  timeprecision 1fs;

  initial q = 1'b0;

  always @(posedge clk) q <= #(TCQ_PS) d;
endmodule
