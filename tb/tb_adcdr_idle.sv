// tb_adcdr_idle: idle tolerance of the subsampled loop. When the input holds
// one value for k bits, no Early or Late reaches the loop filter for about
// k/16 digital clock cycles (the idle length l after 16x subsampling), and
// the oscillator runs open loop at the frequency its fine word last held.
// The loop must keep its phase through such a gap and pick up again without
// a cycle slip.
//
// Stimulus: 25 Gb/s PRBS7 (x^7 + x^6 + 1), locked after a coarse
// calibration. Then, IDLES times per length, a run of identical bits is
// inserted (the current bit repeated) after 2 us of PRBS7. Two lengths are
// tried: l = 31 (the idle length a PRBS31 input produces at 16x
// subsampling, 496 bits) and l = 100 (1600 bits).
//
// Measurement: each rising edge of recovered phase clk0 is folded onto the
// ideal bit grid and unwrapped, giving the clock phase in UI. Checks, for
// l = 31:
//   - during an idle run the phase moves less than 0.5 UI away from its
//     value at the start of the run, so the data samplers stay in the eye;
//   - 1 us after the run the phase is within 0.25 UI of that start value,
//     i.e. the loop has not slipped a bit;
//   - every recovered lane follows the PRBS7 recurrence (a decimation by 4
//     of an m-sequence is the same m-sequence) outside a guard window
//     that starts with the idle run and ends 200 ns after it.
// For l = 100 the drift and the number of slips are printed, not checked:
// with the oscillator's default phase noise the random walk over 64 ns is
// about 0.18 UI rms, so an occasional slip is expected there. The data
// check resumes after l = 100 runs too; a slip shifts the lanes but keeps
// each lane a valid PRBS7 sequence, so only the phase shows it.
module tb_adcdr_idle;
  timeunit 1ps;
  timeprecision 1fs;
  import adcdr_pkg::*;

  localparam real UI_PS  = 40.0;       // 25 Gb/s
  localparam real REF_PS = 10000.0;    // 100 MHz reference
  localparam int  IDLES  = 6;          // runs per length

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

  // ---- PRBS7 source with insertable runs of identical bits
  int  hold_bits = 0;                  // bits still to repeat
  logic [6:0] lfsr = '1;
  initial forever begin
    #(UI_PS);
    if (hold_bits > 0) hold_bits--;
    else begin
      din  = lfsr[6] ^ lfsr[5];
      lfsr = {lfsr[5:0], lfsr[6] ^ lfsr[5]};
    end
  end
  initial forever #(REF_PS / 2.0) ref_clk = ~ref_clk;

  // ---- unwrapped clock phase in UI
  real phase = 0.0, p_prev = 0.0;
  always @(posedge rclk_ph[0]) begin
    real x, p, d;
    x = $realtime / UI_PS;
    p = x - $floor(x);
    d = p - p_prev;
    d = d - $floor(d + 0.5);
    phase += d;
    p_prev = p;
  end

  // ---- PRBS recurrence on each recovered lane
  bit data_check_on = 0;
  logic [6:0] hist [4];
  int data_errs = 0, data_bits = 0;
  always @(posedge rclk_ph[3]) begin
    #1;
    for (int c = 0; c < 4; c++) begin
      if (data_check_on) begin
        data_bits++;
        if (dout[c] != (hist[c][6] ^ hist[c][5])) data_errs++;
      end
      hist[c] = {hist[c][5:0], dout[c]};
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one idle run of k bits; returns the largest phase excursion during it
  // and the phase offset 1 us after it
  task automatic idle_run(input int k, output real max_dev, output real settle_dev);
    real p0, dev;
    realtime t_end;
    #(2_000_000.0);
    data_check_on = 0;
    p0 = phase;
    max_dev = 0.0;
    hold_bits = k;
    t_end = $realtime + real'(k) * UI_PS;
    while ($realtime < t_end) begin
      @(posedge rclk_ph[0]);
      dev = phase - p0;
      if (dev < 0.0) dev = -dev;
      if (dev > max_dev) max_dev = dev;
    end
    #(200_000.0);
    data_check_on = 1;
    #(800_000.0);
    settle_dev = phase - p0;
    if (settle_dev < 0.0) settle_dev = -settle_dev;
  endtask

  initial begin
    int lens [2] = '{496, 1600};
    real max_dev, settle_dev, worst;
    for (int c = 0; c < 4; c++) hist[c] = '0;
    rst_n = 1'b0;
    #(1000.0);
    rst_n = 1'b1;
    cal_start = 1'b1;
    wait (cal_done);
    check(cal_ok, "calibration in range");
    calibration = 1'b0;
    #(8_000_000.0);
    data_check_on = 1;
    foreach (lens[i]) begin
      int slips = 0;
      worst = 0.0;
      for (int n = 0; n < IDLES; n++) begin
        idle_run(lens[i], max_dev, settle_dev);
        if (max_dev > worst) worst = max_dev;
        if (settle_dev >= 0.25) slips++;
        if (i == 0) begin
          check(max_dev < 0.5, $sformatf("idle of %0d bits: drift %0.3f UI stays in the eye", lens[i], max_dev));
          check(settle_dev < 0.25, $sformatf("idle of %0d bits: no cycle slip (%0.3f UI)", lens[i], settle_dev));
        end
      end
      $display("idle l = %0d (%0d bits): largest drift %0.3f UI, %0d slips in %0d runs",
               lens[i] / 16, lens[i], worst, slips, IDLES);
    end
    #(1_000_000.0);
    data_check_on = 0;
    $display("data: %0d bits checked, %0d errors", data_bits, data_errs);
    check(data_bits > 100_000, "data checked");
    check(data_errs == 0, "recovered data error free outside idle runs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(100_000_000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
