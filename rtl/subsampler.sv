// subsampler: subsamples the three phase-alignment bits (Edge0, Dout0, Edge1)
// by four and produces the digital clock.
//
// As in the published circuit, this is done in two steps. Clk3 is divided by
// two and clocks an array of three type I flip-flops; that clock is divided
// by two again and clocks a second array of three flip-flops. Each array sees
// data that changes twice per own clock period, so it keeps one sample in
// two; together one sample in four. The second divided clock (Clk3 / 4,
// 1.5625 GHz at 25 Gb/s) is the digital clock of the synthesized logic.
//
// Ports: pa_in = {Edge1, Dout0, Edge0} from the retiming block; s = {S2, S1,
// S0}, which changes after a rising edge of clk_dig. rst_n resets the
// dividers (asynchronous, active low), which is this RTL's choice.
module subsampler (
  input  logic       clk3,
  input  logic       rst_n,
  input  logic [2:0] pa_in,
  output logic [2:0] s,
  output logic       clk_dig
);
  timeunit 1ps;
  timeprecision 1fs;

  logic       clk_half;
  logic [2:0] stage1;

  clk_div2 u_div_a (.clk_in(clk3),     .rst_n(rst_n), .clk_out(clk_half));
  clk_div2 u_div_b (.clk_in(clk_half), .rst_n(rst_n), .clk_out(clk_dig));

  always_ff @(posedge clk_half) stage1 <= pa_in;
  always_ff @(posedge clk_dig)  s      <= stage1;
endmodule
