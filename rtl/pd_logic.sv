// pd_logic: the synthesized part of the Inverse Alexander bang-bang phase
// detector.
//
// The subsampled samples S0 (edge, clk0), S1 (data, clk1) and S2 (edge, clk2)
// are registered on the digital clock; Early = S0 xor S1 and Late = S1 xor S2
// are registered again. So a clock that samples too early (S0 differs from
// S1 and S2) gives Early, a clock that samples too late gives Late, and no
// data transition gives neither. Both Early and Late set together is passed
// on; the loop filter treats it as no action. This is the published
// structure.
//
// sub32 selects the 32x subsampling test mode. How that mode is built is not
// published; here the registers keep running on the digital clock but every
// second Early/Late decision is forced to zero, so the loop receives one
// decision per 32 data periods.
//
// Timing: Early/Late change two digital clock edges after S changes at the
// subsampler output, which gives the proportional-path delay of 2 cycles.
// rst_n is asynchronous, active low.
module pd_logic (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sub32,
  input  logic [2:0] s,       // {S2, S1, S0}
  output logic       early,
  output logic       late
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [2:0] s_q;
  logic       keep;   // decision of this cycle is used

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q   <= '0;
      keep  <= 1'b0;
      early <= 1'b0;
      late  <= 1'b0;
    end else begin
      s_q   <= s;
      keep  <= sub32 ? ~keep : 1'b1;
      early <= (s_q[0] ^ s_q[1]) & (keep | ~sub32);
      late  <= (s_q[1] ^ s_q[2]) & (keep | ~sub32);
    end
  end
endmodule
