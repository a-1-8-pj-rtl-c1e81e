// tb_adcdr_workloads: runs the CDR on the operating points its evaluation
// uses, one after another, with a reset and a fresh calibration for each:
//   1. 25 Gb/s, PRBS31            (functional test)
//   2. 20 Gb/s, PRBS31            (functional test)
//   3. 12.5 Gb/s, PRBS31          (functional test, low current setting)
//   4. 25 Gb/s, PRBS7, sinusoidal jitter 0.3 UIpp at 10 MHz  (jitter tolerance)
//   5. 25 Gb/s, PRBS7, sinusoidal jitter 2 UIpp at 1 MHz     (jitter tolerance)
// For each it checks that calibration ends within tolerance, that the mean
// recovered clock equals a quarter of the data rate when there is no jitter,
// and that every recovered lane satisfies the PRBS recurrence over the
// checking window (a decimation by 4 of an m-sequence is the same
// m-sequence). Jitter moves each bit boundary to
// t + A*sin(2*pi*fj*t), t the ideal boundary time. Loop settings: Kp = 5, Ki = 2^-5 DCO steps.
module tb_adcdr_workloads;
  timeunit 1ps;
  timeprecision 1fs;
  import adcdr_pkg::*;

  localparam real REF_PS = 10000.0;   // 100 MHz reference
  localparam real PI     = 3.14159265358979;

  int checks = 0, failures = 0;

  logic din = 1'b0, rst_n = 1'b1, ref_clk = 1'b0;
  logic [KP_W-1:0] kp = 3'd5;
  logic [KI_W-1:0] ki_shift = 4'd6;
  logic conv_pd = 1'b0, sub32 = 1'b0, calibration = 1'b1, dco_char = 1'b0;
  logic [INT_THERM_W-1:0] fixed_setting = '0;
  logic [CURRENT_W-1:0] current = 4'd12;
  logic cal_start = 1'b0;
  logic [COARSE_W-1:0] coarse_init = 6'd44;
  logic [15:0] ref_window = 16'd128;
  logic [23:0] target_count = 24'd0;
  logic [15:0] cal_tol = 16'd4;

  logic [3:0] dout;
  logic [NUM_PHASES-1:0] rclk_ph;
  logic clk_dig, early, late;
  fine_word_t fine;
  logic [ACC_W-1:0] acc;
  logic [COARSE_W-1:0] coarse;
  logic cal_done, cal_ok;
  logic [23:0] cal_count;

  adcdr_top dut (.*);

  // ---- stimulus: PRBS7 (x^7+x^6+1) or PRBS31 (x^31+x^28+1) with jitter
  real ui_ps = 40.0, sj_amp_ui = 0.0, sj_freq_hz = 1.0e6;
  bit  prbs31 = 1'b1;
  logic [30:0] lfsr = '1;
  initial begin
    real t_ideal = 0.0;
    realtime t_next, t_now;
    forever begin
      t_ideal += ui_ps;
      t_next = t_ideal + sj_amp_ui * ui_ps * $sin(2.0 * PI * sj_freq_hz * t_ideal * 1.0e-12);
      t_now = $realtime;
      // an amplitude change can put the next edge in the past: send it now
      if (t_next > t_now) #(t_next - t_now);
      if (prbs31) begin
        din  = lfsr[30] ^ lfsr[27];
        lfsr = {lfsr[29:0], lfsr[30] ^ lfsr[27]};
      end else begin
        din  = lfsr[6] ^ lfsr[5];
        lfsr = {lfsr[30:7], lfsr[5:0], lfsr[6] ^ lfsr[5]};
      end
    end
  end
  initial forever #(REF_PS / 2.0) ref_clk = ~ref_clk;

  // ---- PRBS recurrence on each recovered lane
  logic [30:0] hist [4];
  bit data_check_on = 0;
  int data_errs = 0, data_bits = 0;
  always @(posedge rclk_ph[3]) begin
    #1;
    for (int c = 0; c < 4; c++) begin
      if (data_check_on) begin
        data_bits++;
        if (prbs31 ? (dout[c] != (hist[c][30] ^ hist[c][27]))
                   : (dout[c] != (hist[c][6] ^ hist[c][5]))) data_errs++;
      end
      hist[c] = {hist[c][29:0], dout[c]};
    end
  end

  // longest run of digital clock cycles without a phase decision
  int idle_run = 0, idle_max = 0;
  always @(posedge clk_dig) begin
    if (early | late) idle_run = 0;
    else begin idle_run++; if (idle_run > idle_max) idle_max = idle_run; end
  end

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
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input string name, input real ui, input bit p31, input int cur,
                     input int cinit, input real amp, input real fj);
    real f_meas, f_target;
    ui_ps = ui; prbs31 = p31; sj_amp_ui = amp; sj_freq_hz = fj;
    current = 4'(cur); coarse_init = 6'(cinit);
    f_target = 1.0e12 / (4.0 * ui);
    target_count = 24'($rtoi(real'(ref_window) * REF_PS / (16.0 * ui) + 0.5));
    // tolerance of 0.4 % (25 MHz at 6.25 GHz), just over half a coarse step
    cal_tol = 16'($rtoi(0.004 * real'(target_count)));
    calibration = 1'b1; cal_start = 1'b0;
    rst_n = 1'b0;
    #(1000.0);
    rst_n = 1'b1;
    cal_start = 1'b1;
    wait (cal_done);
    check(cal_ok, {name, ": calibration in range"});
    calibration = 1'b0;
    #(6_000_000.0);
    if (amp == 0.0) begin
      measure_freq(2_000_000.0, f_meas);
      $display("%s: recovered clock %0.3f MHz, expected %0.3f MHz", name, f_meas / 1e6, f_target / 1e6);
      check(f_meas > f_target - 1.0e6 && f_meas < f_target + 1.0e6, {name, ": locked frequency"});
    end
    data_errs = 0; data_bits = 0; idle_max = 0;
    data_check_on = 1;
    #(3_000_000.0);
    data_check_on = 0;
    $display("%s: coarse %0d, %0d bits checked, %0d errors, longest idle %0d cycles",
             name, coarse, data_bits, data_errs, idle_max);
    check(data_bits > 0, {name, ": data checked"});
    check(data_errs == 0, {name, ": recovered data error free"});
    cal_start = 1'b0;
  endtask

  initial begin
    for (int c = 0; c < 4; c++) hist[c] = '0;
    run("25 Gb/s PRBS31",            40.0, 1'b1, 12, 27, 0.0,  1.0e6);
    run("20 Gb/s PRBS31",            50.0, 1'b1,  9, 16, 0.0,  1.0e6);
    run("12.5 Gb/s PRBS31",          80.0, 1'b1,  2,  0, 0.0,  1.0e6);
    run("25 Gb/s PRBS7 SJ 0.3UIpp 10MHz", 40.0, 1'b0, 12, 27, 0.15, 10.0e6);
    run("25 Gb/s PRBS7 SJ 2UIpp 1MHz",    40.0, 1'b0, 12, 27, 1.0,  1.0e6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(200_000_000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
