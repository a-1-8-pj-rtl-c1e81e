// dlf: digital loop filter, H(z) = Kp z^-2 + Ki z^-9 / (1 - z^-1), running
// on the digital clock (1.5625 GHz at 25 Gb/s).
//
// Proportional path: Early and Late each select Kp (0..7) bits of their own
// 7-bit thermometer word; these go straight to the DCO fine-tuning varactors,
// Early's word lowering and Late's word raising the frequency. With both set
// the two words cancel in the DCO. No register is added after the phase
// detector's output flip-flops, so the path delay is 2 digital clock cycles
// counted from the subsampler output.
//
// Integral path (half-rate): Early/Late are demultiplexed 1:2 into pairs
// (t0 = older, t1 = newer). With 'calibration' set the pair from the
// frequency detector replaces them. The pair register computes
// (Late_t0 + Late_t1 - Early_t0 - Early_t1) in -2..+2, which is scaled by
// Ki = 2**ki_shift accumulator LSBs, registered, and added to a 16-bit
// accumulator. Its 5 MSBs become a 31-bit thermometer word for the DCO;
// 'dco_char' replaces that word with 'fixed_setting' to characterize the DCO.
// In DCO fine-step units Ki = 2**(ki_shift - 11), so the published setting
// Ki = 2^-7 is ki_shift = 4.
//
// 'conv_pd' swaps Early and Late at the input, which turns the Inverse
// Alexander detector into the conventional Alexander one (loop sign flip).
//
// Published: the two paths, the 7/31-bit thermometer outputs, the 16-bit
// accumulator and its 5 MSBs, the 1:2 demux, the mux inputs, and the
// delays 2 and 9. This RTL's choices: the half-rate domain is a clock enable
// that is high every second cycle (not a divided clock); a register after
// the Ki scaling brings the delay to 9 cycles for the newer sample of a pair
// (10 for the older one); the accumulator saturates instead of wrapping and
// resets to mid-scale (0x8000, 16 of 31 thermometer bits on).
module dlf
  import adcdr_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   early,
  input  logic                   late,
  input  logic [KP_W-1:0]        kp,
  input  logic [KI_W-1:0]        ki_shift,
  input  logic                   conv_pd,
  input  logic                   calibration,
  input  logic [1:0]             fd_early,      // {t1, t0} from the frequency detector
  input  logic [1:0]             fd_late,
  input  logic                   dco_char,
  input  logic [INT_THERM_W-1:0] fixed_setting,
  output fine_word_t             fine,
  output logic [ACC_W-1:0]       acc,
  output logic                   half_en
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int INC_W = ACC_W + 3;  // scaled increment, signed

  logic                    e_in, l_in;
  logic                    e_prev, l_prev;
  logic [1:0]              pair_e, pair_l;       // {t1, t0}
  logic signed [2:0]       sum;
  logic signed [INC_W-1:0] inc_q;
  logic signed [ACC_W+3:0] acc_next;
  logic [INT_THERM_W-1:0]  int_therm_q;

  assign e_in = conv_pd ? late  : early;
  assign l_in = conv_pd ? early : late;

  // Proportional path.
  assign fine.prop_early = e_in ? therm7(kp) : '0;
  assign fine.prop_late  = l_in ? therm7(kp) : '0;

  // Integral path.
  assign sum = $signed({2'b00, pair_l[0]}) + $signed({2'b00, pair_l[1]})
             - $signed({2'b00, pair_e[0]}) - $signed({2'b00, pair_e[1]});

  assign acc_next = $signed({4'b0000, acc}) + (ACC_W+4)'(inc_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half_en     <= 1'b0;
      e_prev      <= 1'b0;
      l_prev      <= 1'b0;
      pair_e      <= '0;
      pair_l      <= '0;
      inc_q       <= '0;
      acc         <= ACC_W'(1) << (ACC_W-1);
      int_therm_q <= therm31(INT_MSB_W'(1) << (INT_MSB_W-1));
    end else begin
      half_en <= ~half_en;
      e_prev  <= e_in;
      l_prev  <= l_in;
      if (half_en) begin
        if (calibration) begin
          pair_e <= fd_early;
          pair_l <= fd_late;
        end else begin
          pair_e <= {e_in, e_prev};
          pair_l <= {l_in, l_prev};
        end
        inc_q <= INC_W'(sum) <<< ki_shift;
        if (acc_next < 0)
          acc <= '0;
        else if (acc_next > $signed({4'b0000, {ACC_W{1'b1}}}))
          acc <= '1;
        else
          acc <= acc_next[ACC_W-1:0];
        int_therm_q <= therm31(acc[ACC_W-1 -: INT_MSB_W]);
      end
    end
  end

  assign fine.integ = dco_char ? fixed_setting : int_therm_q;
endmodule
