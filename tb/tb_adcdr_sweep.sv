// tb_adcdr_sweep: loop-gain sweeps at 25 Gb/s.
//   1. Recovered-clock jitter against Kp (1, 5, 7) with Ki = 2^-7 and a
//      PRBS31 input without added jitter. The rms jitter of the clk0 edges
//      on the bit grid is printed; the loop must lock and recover the data
//      without errors at Kp = 5 and 7. At Kp = 1 the loop is too slow for
//      the oscillator model's phase noise (about 4-6 ps rms clock jitter)
//      and occasional errors are only printed.
//   2. Jitter tolerance at 1 MHz with a PRBS7 input carrying sinusoidal
//      jitter: for Kp = 1 and 7 at Ki = 2^-7, and for Ki = 2^-10 and 2^-4
//      at Kp = 5, the amplitude is raised through 0.5, 1, 2, 4, 8 and
//      16 UIpp until a 4 us window (four jitter periods) shows a bit error
//      on the PRBS7 recurrence of a recovered lane. The largest error-free
//      amplitude is the tolerance. A bang-bang loop follows low-frequency
//      jitter as far as its slew rate allows, and the slew rate grows with
//      both gains, so the test checks that Kp = 7 tolerates more than Kp = 1
//      and Ki = 2^-4 more than Ki = 2^-10, and that the Kp = 5 and 7
//      settings tolerate at least 1 UIpp. Kp = 1 is only printed: its
//      bang-bang steps barely exceed the oscillator's own phase noise.
// Ki in DCO fine steps per decision is 2^(ki_shift - 11). Every point
// starts with a reset, a coarse calibration and 6 us of settling.
module tb_adcdr_sweep;
  timeunit 1ps;
  timeprecision 1fs;
  import adcdr_pkg::*;

  localparam real UI_PS  = 40.0;       // 25 Gb/s
  localparam real REF_PS = 10000.0;    // 100 MHz reference
  localparam real PI     = 3.14159265358979;

  int checks = 0, failures = 0;

  logic din = 1'b0, rst_n = 1'b1, ref_clk = 1'b0;
  logic [KP_W-1:0] kp = 3'd5;
  logic [KI_W-1:0] ki_shift = 4'd4;
  logic conv_pd = 1'b0, sub32 = 1'b0, calibration = 1'b1, dco_char = 1'b0;
  logic [INT_THERM_W-1:0] fixed_setting = '0;
  logic [CURRENT_W-1:0] current = 4'd12;
  logic cal_start = 1'b0;
  logic [COARSE_W-1:0] coarse_init = 6'd27;
  logic [15:0] ref_window = 16'd128;
  logic [23:0] target_count = 24'($rtoi(128.0 * REF_PS / (16.0 * UI_PS) + 0.5));
  logic [15:0] cal_tol = 16'd8;        // 0.4 % of 2000

  logic [3:0] dout;
  logic [NUM_PHASES-1:0] rclk_ph;
  logic clk_dig, early, late;
  fine_word_t fine;
  logic [ACC_W-1:0] acc;
  logic [COARSE_W-1:0] coarse;
  logic cal_done, cal_ok;
  logic [23:0] cal_count;

  adcdr_top dut (.*);

  // ---- PRBS7 or PRBS31 with sinusoidal jitter of sj_pp_ui peak to peak
  real sj_pp_ui = 0.0;
  localparam real SJ_HZ = 1.0e6;
  bit  prbs31 = 1'b1;
  logic [30:0] lfsr = '1;
  initial begin
    real t_ideal = 0.0;
    realtime t_next;
    forever begin
      t_ideal += UI_PS;
      t_next = t_ideal + 0.5 * sj_pp_ui * UI_PS * $sin(2.0 * PI * SJ_HZ * t_ideal * 1.0e-12);
      // an amplitude change can put the next edge in the past: send it now
      if (t_next > $realtime) #(t_next - $realtime);
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
  bit data_check_on = 0;
  logic [30:0] hist [4];
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

  // ---- clock phase statistics on the bit grid
  bit  meas_on = 0;
  real sum_c = 0.0, sum_s = 0.0;
  int  n_edges = 0;
  always @(posedge rclk_ph[0]) begin
    if (meas_on) begin
      real x, p;
      x = $realtime / UI_PS;
      p = x - $floor(x);
      sum_c += $cos(2.0 * PI * p);
      sum_s += $sin(2.0 * PI * p);
      n_edges++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic relock(input int kp_set, input int ki_set, input bit p31, input real pp);
    data_check_on = 0;
    kp = 3'(kp_set); ki_shift = 4'(ki_set); prbs31 = p31; sj_pp_ui = pp;
    calibration = 1'b1; cal_start = 1'b0;
    rst_n = 1'b0;
    #(1000.0);
    rst_n = 1'b1;
    cal_start = 1'b1;
    wait (cal_done);
    check(cal_ok, "calibration in range");
    calibration = 1'b0;
    #(6_000_000.0);
  endtask

  // rms clock jitter in UI and error count over 3 us, no added jitter
  task automatic clock_jitter(input int kp_set, output real rms_ui, output int errs);
    real r;
    relock(kp_set, 4, 1'b1, 0.0);
    sum_c = 0.0; sum_s = 0.0; n_edges = 0;
    data_errs = 0; data_bits = 0;
    meas_on = 1; data_check_on = 1;
    #(3_000_000.0);
    meas_on = 0; data_check_on = 0;
    r = $sqrt(sum_c * sum_c + sum_s * sum_s) / real'(n_edges);
    rms_ui = (r >= 1.0) ? 0.0 : $sqrt(-2.0 * $ln(r)) / (2.0 * PI);
    errs = data_errs;
  endtask

  // largest error-free amplitude at 1 MHz, in UIpp (0.0 if none)
  task automatic jtol(input int kp_set, input int ki_set, output real tol_pp);
    real pp = 0.5;
    tol_pp = 0.0;
    while (pp <= 16.0) begin
      relock(kp_set, ki_set, 1'b0, pp);
      data_errs = 0; data_bits = 0;
      data_check_on = 1;
      #(4_000_000.0);
      data_check_on = 0;
      $display("  Kp = %0d, ki_shift = %0d, %0.1f UIpp: %0d errors in %0d bits",
               kp_set, ki_set, pp, data_errs, data_bits);
      if (data_errs != 0) break;
      tol_pp = pp;
      pp = pp * 2.0;
    end
    $display("Kp = %0d, Ki = 2^-%0d: jitter tolerance at 1 MHz %0.1f UIpp", kp_set, 11 - ki_set, tol_pp);
  endtask

  initial begin
    real j1, j5, j7, t_kp1, t_kp7, t_ki10, t_ki4;
    int  e1, e5, e7;
    for (int c = 0; c < 4; c++) hist[c] = '0;

    clock_jitter(1, j1, e1);
    clock_jitter(5, j5, e5);
    clock_jitter(7, j7, e7);
    $display("rms clock jitter, Ki = 2^-7: Kp=1 %0.2f ps, Kp=5 %0.2f ps, Kp=7 %0.2f ps",
             j1 * UI_PS, j5 * UI_PS, j7 * UI_PS);
    $display("bit errors in 3 us: Kp=1 %0d, Kp=5 %0d, Kp=7 %0d", e1, e5, e7);
    check(e5 == 0 && e7 == 0, "data error free at Kp = 5, 7");

    jtol(1, 4, t_kp1);
    jtol(7, 4, t_kp7);
    jtol(5, 1, t_ki10);
    jtol(5, 7, t_ki4);
    check(t_kp7 > t_kp1, "higher Kp tolerates more jitter at 1 MHz");
    check(t_ki4 > t_ki10, "higher Ki tolerates more jitter at 1 MHz");
    check(t_kp7 >= 1.0 && t_ki10 >= 1.0 && t_ki4 >= 1.0,
          "Kp = 5 and 7 tolerate 1 UIpp at 1 MHz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1_000_000_000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
