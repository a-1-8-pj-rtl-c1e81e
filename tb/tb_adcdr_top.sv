// tb_adcdr_top: end-to-end test of the closed CDR loop.
//
// A PRBS7 stream (x^7 + x^6 + 1) at UI_PS per bit drives the CDR. A 100 MHz
// reference clock drives the start-up calibration. The test then:
//   1. calibrates the coarse word with the loop filter on the frequency
//      detector, and checks that it ends within the tolerance;
//   2. closes the loop and, after a settling time, checks that the mean
//      DCO frequency equals a quarter of the data rate and that every
//      recovered data lane satisfies the PRBS7 recurrence (a decimation by
//      4 of an m-sequence is the same m-sequence, so each lane must obey it
//      whatever the alignment);
//   3. runs the 32x subsampling test mode and checks that decisions come
//      only every second digital clock cycle and that data stays correct;
//   4. runs the conventional Alexander mode and checks the sign swap in the
//      proportional path;
//   5. runs DCO characterization with a fixed integral word.
// It counts how often each mechanism happened (Early, Late, both, integral
// up/down, coarse steps, frequency detector pulses, each mode) and fails
// for any that never did.
module tb_adcdr_top;
  timeunit 1ps;
  timeprecision 1fs;
  import adcdr_pkg::*;

  localparam real UI_PS     = 40.16;      // 24.9 Gb/s, slightly off 25 Gb/s
  localparam real REF_PS    = 10000.0;    // 100 MHz reference
  localparam int  REF_WIN   = 64;

  int checks = 0, failures = 0;

  logic din = 1'b0, rst_n = 1'b1, ref_clk = 1'b0;
  logic [KP_W-1:0] kp = 3'd5;
  logic [KI_W-1:0] ki_shift = 4'd6;
  logic conv_pd = 1'b0, sub32 = 1'b0, calibration = 1'b1, dco_char = 1'b0;
  logic [INT_THERM_W-1:0] fixed_setting = '0;
  logic [CURRENT_W-1:0] current = 4'd12;
  logic cal_start = 1'b0;
  logic [COARSE_W-1:0] coarse_init = 6'd27;
  logic [15:0] ref_window = 16'(REF_WIN);
  logic [23:0] target_count;
  logic [15:0] cal_tol = 16'd4;   // 0.4 %, just over half a coarse step

  logic [3:0] dout;
  logic [NUM_PHASES-1:0] rclk_ph;
  logic clk_dig, early, late;
  fine_word_t fine;
  logic [ACC_W-1:0] acc;
  logic [COARSE_W-1:0] coarse;
  logic cal_done, cal_ok;
  logic [23:0] cal_count;

  adcdr_top dut (.*, .cal_tol(cal_tol));

  // expected digital-clock cycles per measurement window: f_data/16 * window
  assign target_count = 24'($rtoi(real'(REF_WIN) * REF_PS / (16.0 * UI_PS) + 0.5));

  // stimulus
  logic [6:0] lfsr = 7'h7f;
  initial forever begin
    #(UI_PS);
    din = lfsr[6] ^ lfsr[5];
    lfsr = {lfsr[5:0], lfsr[6] ^ lfsr[5]};
  end
  initial forever #(REF_PS / 2.0) ref_clk = ~ref_clk;

  // ---- mechanism counters
  int n_early = 0, n_late = 0, n_both = 0, n_acc_up = 0, n_acc_dn = 0;
  int n_fd = 0, n_coarse_step = 0, n_sub32_skip = 0, n_conv = 0, n_char = 0;
  logic [ACC_W-1:0] acc_d = '0;
  logic [COARSE_W-1:0] coarse_d = '0;
  logic early_d = 0, late_d = 0;
  bit sub32_phase_err = 0;
  logic [1:0] sub32_hist = '0;

  always @(posedge clk_dig) begin
    if (rst_n) begin
      if (early && !late) n_early++;
      if (late && !early) n_late++;
      if (early && late)  n_both++;
      if (acc > acc_d) n_acc_up++;
      if (acc < acc_d) n_acc_dn++;
      if (coarse != coarse_d) n_coarse_step++;
      if (dut.fd_early != 0 || dut.fd_late != 0) n_fd++;
    end
    acc_d = acc;
    coarse_d = coarse;
  end

  // ---- PRBS7 recurrence on each recovered lane
  logic [6:0] hist [4];
  bit   data_check_on = 0;
  int   data_errs = 0, data_bits = 0;
  always @(posedge rclk_ph[3]) begin
    #1;  // after the retiming registers
    for (int c = 0; c < 4; c++) begin
      if (data_check_on) begin
        data_bits++;
        if (dout[c] != (hist[c][6] ^ hist[c][5])) data_errs++;
      end
      hist[c] = {hist[c][5:0], dout[c]};
    end
  end

  // ---- DCO frequency over a window
  int dco_edges = 0;
  always @(posedge rclk_ph[0]) dco_edges++;
  task automatic measure_freq(input real window_ps, output real f_hz);
    int e0;
    e0 = dco_edges;
    #(window_ps);
    f_hz = real'(dco_edges - e0) / (window_ps * 1.0e-12);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  real f_meas, f_target;

  initial begin
    f_target = 1.0e12 / (4.0 * UI_PS);
    for (int c = 0; c < 4; c++) hist[c] = '0;
    #(10.0);
    rst_n = 1'b0;
    #(1000.0);
    rst_n = 1'b1;

    // 1. calibration
    cal_start = 1'b1;
    wait (cal_done);
    check(cal_ok, "calibration ended in range");
    $display("calibration: coarse=%0d count=%0d target=%0d", coarse, cal_count, target_count);
    measure_freq(200000.0, f_meas);
    $display("after calibration f=%0.3f MHz target=%0.3f MHz", f_meas / 1e6, f_target / 1e6);
    check(f_meas > f_target - 35.0e6 && f_meas < f_target + 35.0e6, "calibrated within band");

    // 2. closed loop
    calibration = 1'b0;
    #(4_000_000.0);
    measure_freq(2_000_000.0, f_meas);
    $display("locked f=%0.4f MHz target=%0.4f MHz acc=%h", f_meas / 1e6, f_target / 1e6, acc);
    check(f_meas > f_target - 1.0e6 && f_meas < f_target + 1.0e6, "mean frequency locked");
    data_check_on = 1;
    #(2_000_000.0);
    data_check_on = 0;
    $display("data: %0d bits, %0d errors", data_bits, data_errs);
    check(data_bits > 40000, "data checked");
    check(data_errs == 0, "recovered data error free");

    // 3. 32x subsampling
    sub32 = 1'b1;
    fork
      begin : watch_sub32
        forever @(posedge clk_dig) begin
          #1;
          sub32_hist = {sub32_hist[0], early | late};
          if (sub32_hist == 2'b11) sub32_phase_err = 1;
          if (!(early | late)) n_sub32_skip++;
        end
      end
      #(1_000_000.0);
    join_any
    disable fork;
    check(!sub32_phase_err, "32x mode: no decisions on two cycles in a row");
    data_errs = 0; data_bits = 0;
    data_check_on = 1;
    #(1_000_000.0);
    data_check_on = 0;
    check(data_errs == 0 && data_bits > 0, "32x mode: data error free");
    sub32 = 1'b0;

    // 4. conventional Alexander: Early drives the raising word
    conv_pd = 1'b1;
    repeat (2000) begin
      @(posedge clk_dig); #1;
      if (early && !late) begin
        n_conv++;
        check(fine.prop_late == therm7(kp) && fine.prop_early == '0, "conv mode sign swap");
      end
    end
    conv_pd = 1'b0;

    // 5. DCO characterization
    fixed_setting = therm31(5'd3);
    dco_char = 1'b1;
    repeat (20) begin
      @(posedge clk_dig); #1;
      n_char++;
      check(fine.integ == therm31(5'd3), "fixed DCO setting applied");
    end
    dco_char = 1'b0;

    $display("early=%0d late=%0d both=%0d acc_up=%0d acc_dn=%0d fd=%0d coarse_steps=%0d sub32_skips=%0d conv=%0d char=%0d",
             n_early, n_late, n_both, n_acc_up, n_acc_dn, n_fd, n_coarse_step, n_sub32_skip, n_conv, n_char);
    check(n_early > 0, "Early seen");
    check(n_late > 0, "Late seen");
    check(n_both > 0, "simultaneous Early and Late seen");
    check(n_acc_up > 0, "integrator stepped up");
    check(n_acc_dn > 0, "integrator stepped down");
    check(n_fd > 0, "frequency detector pulses seen");
    check(n_coarse_step > 0, "coarse calibration steps seen");
    check(n_sub32_skip > 0, "32x mode skipped decisions");
    check(n_conv > 0, "conventional mode exercised");
    check(n_char > 0, "characterization mode exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(60_000_000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
