// adcdr_top: quarter-rate all-digital clock and data recovery (AD-CDR).
//
// A ring DCO at a quarter of the data rate (6.25 GHz for 25 Gb/s) gives 8
// clock phases. Six samplers take the serial input on phases clk1, clk3,
// clk5, clk7 (data, mid-bit in lock) and clk0, clk2 (edges, on the data
// transitions in lock). The retiming block aligns all six samples to Clk3;
// the four data samples are the recovered 4-bit parallel output. Edge0, the
// clk1 data sample and Edge1 form one Inverse Alexander phase-detector
// triple per DCO period (a first 4x subsampling); the subsampler keeps one
// triple in four (16x in total) and divides Clk3 by 4 for the digital
// clock. On that clock the phase detection logic forms Early/Late, the
// digital loop filter turns them into the DCO fine-tuning word (7 + 7 + 31
// varactor bits), and the frequency calibration sets the coarse word at
// start-up against an external reference clock. This is the published
// architecture. The samplers and the DCO are behavioural models.
//
// Interface: din is the serial input; dout[0..3] are the samples of clk1,
// clk3, clk5, clk7, valid after the rising edge of rclk_ph[3] (the type II
// outputs are complemented in the retiming block and restored here). The
// configuration inputs stand for registers that the published chip loads
// over SPI. rst_n is asynchronous, active low.
module adcdr_top
  import adcdr_pkg::*;
(
  input  logic                   din,
  input  logic                   rst_n,
  input  logic                   ref_clk,
  // loop filter settings
  input  logic [KP_W-1:0]        kp,
  input  logic [KI_W-1:0]        ki_shift,
  input  logic                   conv_pd,       // 1: conventional Alexander (test)
  input  logic                   sub32,         // 1: 32x subsampling (test)
  input  logic                   calibration,   // loop filter takes the frequency detector
  input  logic                   dco_char,      // fixed DCO fine setting (debug)
  input  logic [INT_THERM_W-1:0] fixed_setting,
  // DCO and calibration settings
  input  logic [CURRENT_W-1:0]   current,
  input  logic                   cal_start,
  input  logic [COARSE_W-1:0]    coarse_init,
  input  logic [15:0]            ref_window,
  input  logic [23:0]            target_count,
  input  logic [15:0]            cal_tol,
  // outputs
  output logic [3:0]             dout,
  output logic [NUM_PHASES-1:0]  rclk_ph,       // recovered clock phases
  output logic                   clk_dig,
  output logic                   early,
  output logic                   late,
  output fine_word_t             fine,
  output logic [ACC_W-1:0]       acc,
  output logic [COARSE_W-1:0]    coarse,
  output logic                   cal_done,
  output logic                   cal_ok,
  output logic [23:0]            cal_count
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [NUM_PHASES-1:0] smp;      // smp[k]: sample taken by clk_k
  logic                  edge0, dout0, edge1, dout1, dout2_n, dout3_n;
  logic [2:0]            s;
  logic [1:0]            fd_early, fd_late;

  dco_ring u_dco (
    .coarse (coarse),
    .current(current),
    .fine   (fine),
    .clk_ph (rclk_ph)
  );

  // Six samplers; clk4 and clk6 are not used.
  for (genvar k = 0; k < NUM_PHASES; k++) begin : g_smp
    if (k == 4 || k == 6) begin : g_unused
      assign smp[k] = 1'b0;
    end else begin : g_used
      saff_sampler u_smp (.clk(rclk_ph[k]), .d(din), .q(smp[k]));
    end
  end

  retiming u_ret (
    .clk3    (rclk_ph[3]),
    .smp_clk0(smp[0]),
    .smp_clk1(smp[1]),
    .smp_clk2(smp[2]),
    .smp_clk3(smp[3]),
    .smp_clk5(smp[5]),
    .smp_clk7(smp[7]),
    .edge0   (edge0),
    .dout0   (dout0),
    .edge1   (edge1),
    .dout1   (dout1),
    .dout2_n (dout2_n),
    .dout3_n (dout3_n)
  );

  assign dout = {~dout3_n, ~dout2_n, dout1, dout0};

  subsampler u_sub (
    .clk3   (rclk_ph[3]),
    .rst_n  (rst_n),
    .pa_in  ({edge1, dout0, edge0}),
    .s      (s),
    .clk_dig(clk_dig)
  );

  pd_logic u_pd (
    .clk  (clk_dig),
    .rst_n(rst_n),
    .sub32(sub32),
    .s    (s),
    .early(early),
    .late (late)
  );

  dlf u_dlf (
    .clk          (clk_dig),
    .rst_n        (rst_n),
    .early        (early),
    .late         (late),
    .kp           (kp),
    .ki_shift     (ki_shift),
    .conv_pd      (conv_pd),
    .calibration  (calibration),
    .fd_early     (fd_early),
    .fd_late      (fd_late),
    .dco_char     (dco_char),
    .fixed_setting(fixed_setting),
    .fine         (fine),
    .acc          (acc),
    .half_en      ()
  );

  freq_cal u_cal (
    .clk         (clk_dig),
    .rst_n       (rst_n),
    .ref_clk     (ref_clk),
    .cal_start   (cal_start),
    .coarse_init (coarse_init),
    .ref_window  (ref_window),
    .target_count(target_count),
    .tol         (cal_tol),
    .coarse      (coarse),
    .cal_done    (cal_done),
    .cal_ok      (cal_ok),
    .fd_early    (fd_early),
    .fd_late     (fd_late),
    .last_count  (cal_count)
  );
endmodule
