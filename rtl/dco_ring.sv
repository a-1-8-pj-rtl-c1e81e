// dco_ring: behavioural model of the quarter-rate digitally controlled ring
// oscillator (4 differential delay cells, 8 clock phases 45 degrees apart).
//
// The real DCO is an analog circuit; this model is not synthesizable. It
// reproduces its control interface and a tuning law in which every step is
// a fixed fraction of the frequency, as the published characteristic rises
// faster at high frequencies:
//   f = F_REF_HZ * (1 + CURRENT_STEP)**(current - CURRENT_REF)
//                * (1 + COARSE_STEP)**(coarse - COARSE_REF) * (1 + KDCO_REL * n_fine)
// where n_fine counts the fine-tuning varactor controls: +1 for each set bit
// of the integral word and of the Late proportional word, -1 for each set bit
// of the Early proportional word. As in the published design, consecutive
// fine-tuning bits are spread over the delay cells in the order
// cell 1, 3, 2, 4, so a single step changes only one cell's delay and the
// phases stay nearly evenly spaced; each cell's delay is modelled
// separately.
//
// The coefficients are rough fits to the published measurements: 1.7 MHz
// per fine step at 6.25 GHz (KDCO_REL = 1.7 MHz / 6.25 GHz); 6.25 GHz at
// current 12, coarse 32 and a half-scale integral word; about 3.0 to 9.0 GHz
// over all settings, which covers the quarter-rate clocks of 12.5 to 25 Gb/s.
// COARSE_STEP (0.72 %) is smaller than the 31-step integral range (0.84 %)
// so that adjacent coarse bands overlap, as the circuit was designed to do;
// the gaps seen in the measured chip are not modelled, nor is the supply
// sensitivity.
//
// Phase noise: every cell transition gets an independent Gaussian delay
// error of JITTER_PS_RMS (a sum of twelve $urandom values), so the phase of
// the free-running ring performs a random walk, the 1/f^2 phase noise of a
// ring oscillator. The default is derived from the measured free-running
// phase noise of -95 dBc/Hz at 10 MHz offset from 6.25 GHz:
// L(df) = f0^2 * c / df^2 gives c = 8.1e-16 s, a period jitter of
// sqrt(c / f0) = 0.36 ps, and 0.127 ps per transition (8 transitions per
// period). Flicker noise is not modelled. JITTER_PS_RMS = 0.0 gives a
// noise-free oscillator.
//
// The oscillation is an 'always' block that waits one cell delay per pass.
// A synthesis tool that ignores the delays sees it as a combinational loop
// through the step counter; that loop stands because a free-running ring is
// exactly such a loop, and this file is a simulation model, not a netlist.
// For the same reason it keeps the four cell outputs as latches.
//
// Outputs: clk_ph[k] rises k/8 of a period after clk_ph[0]; clk_ph[k+4] is
// the complement of clk_ph[k]. Control changes take effect at the next cell
// transition.
module dco_ring
  import adcdr_pkg::*;
#(
  parameter real         F_REF_HZ     = 6.2228e9,
  parameter real         CURRENT_STEP = 0.05,
  parameter real         COARSE_STEP  = 0.0072,
  parameter real         KDCO_REL     = 272.0e-6,
  parameter int unsigned CURRENT_REF  = 12,
  parameter int unsigned COARSE_REF   = 32,
  parameter real         JITTER_PS_RMS = 0.127
) (
  input  logic [COARSE_W-1:0]   coarse,
  input  logic [CURRENT_W-1:0]  current,
  input  fine_word_t            fine,
  output logic [NUM_PHASES-1:0] clk_ph
);
  timeunit 1ps;
  timeprecision 1fs;

  // Cell that the i-th bit of a thermometer word drives: 1, 3, 2, 4, ...
  localparam int CELL_SEQ [4] = '{0, 2, 1, 3};

  logic [3:0] stage;  // differential output of each cell, positive side

  // Net varactor count on one cell.
  function automatic int cell_count(input fine_word_t f, input int cidx);
    int n = 0;
    for (int i = 0; i < INT_THERM_W; i++)
      if (CELL_SEQ[i % 4] == cidx && f.integ[i]) n++;
    for (int i = 0; i < PROP_W; i++) begin
      if (CELL_SEQ[i % 4] == cidx && f.prop_late[i])  n++;
      if (CELL_SEQ[i % 4] == cidx && f.prop_early[i]) n--;
    end
    return n;
  endfunction

  // Delay of one cell transition in ps. The period is two passes round the
  // ring (8 transitions); a fine step on one cell shortens the period by a
  // fraction KDCO_REL, split over that cell's two transitions.
  function automatic real cell_delay_ps(input int cidx);
    real f0, d0;
    f0 = F_REF_HZ
         * ((1.0 + CURRENT_STEP) ** (real'(current) - real'(CURRENT_REF)))
         * ((1.0 + COARSE_STEP) ** (real'(coarse) - real'(COARSE_REF)));
    d0 = 1.0e12 / (8.0 * f0);
    return d0 * (1.0 - 4.0 * KDCO_REL * real'(cell_count(fine, cidx)));
  endfunction

  // One cell transition per pass: step m (0..7) waits for cell m mod 4 and
  // sets its output high for m < 4, low for m >= 4.
  logic [2:0] step;

  initial begin
    stage = 4'b0000;
    step  = 3'd0;
  end

  // Standard normal sample from the sum of twelve uniform values.
  function automatic real gauss();
    real u = -6.0;
    for (int i = 0; i < 12; i++) u += real'($urandom) / 4294967296.0;
    return u;
  endfunction

  always begin
    #(cell_delay_ps(int'(step[1:0])) + JITTER_PS_RMS * gauss());
    stage[step[1:0]] = ~step[2];
    step = step + 3'd1;
  end

  assign clk_ph[3:0] = stage;
  assign clk_ph[7:4] = ~stage;
endmodule
