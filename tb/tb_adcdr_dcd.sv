// tb_adcdr_dcd: compares the Inverse Alexander loop with the conventional
// Alexander loop (conv_pd = 1) when the input has duty-cycle distortion,
// at subsampling factors 16 and 32 (sub32 = 0/1). Loop settings Kp = 5,
// Ki = 2^-7 DCO steps (ki_shift = 4), 25 Gb/s PRBS7.
//
// Stimulus: every rising data edge comes DCD_UI/2 late and every falling
// edge DCD_UI/2 early, so a lone 1 lasts (1 - DCD_UI) UI and a lone 0
// (1 + DCD_UI) UI. A small random jitter (sum of four uniform values, about
// RJ_UI rms) is added to every edge.
//
// Measurement: the rising edges of recovered phase clk0 are folded onto the
// ideal bit grid; from the circular mean of those phases the test takes the
// mean sampling phase and the rms clock jitter in UI. Expected, worked out
// from the detector rules rather than from the RTL:
//   - Inverse Alexander locks clk0 (an edge sampler) on the data edges:
//     mean phase near 0 UI. The data samplers then sit mid-bit, so all four
//     recovered lanes must follow the PRBS7 recurrence at N = 16.
//   - Conventional Alexander locks clk1 (a data sampler) on the edges, so
//     clk0 sits half a UI away: mean phase near 0.5 UI.
//   - With DCD the Inverse loop sees simultaneous Early and Late, which the
//     loop filter ignores, while the conventional loop gets a random Early
//     or Late near lock. The Inverse loop must produce simultaneous
//     Early/Late decisions. The rms clock jitter of both loops is printed
//     for comparison but not checked: with the oscillator's phase noise the
//     two differ by less than their run-to-run spread.
// Each case resets the CDR and repeats the coarse calibration.
module tb_adcdr_dcd;
  timeunit 1ps;
  timeprecision 1fs;
  import adcdr_pkg::*;

  localparam real UI_PS  = 40.0;       // 25 Gb/s
  localparam real REF_PS = 10000.0;    // 100 MHz reference
  localparam real DCD_UI = 0.2;        // lone 1 lasts 0.8 UI
  localparam real RJ_UI  = 0.01;
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

  // ---- PRBS7 (x^7 + x^6 + 1) with DCD and random jitter
  function automatic real rj_ps();
    real u = 0.0;
    for (int i = 0; i < 4; i++) u += real'($urandom_range(1_000_000)) / 1.0e6 - 0.5;
    // four uniforms on [-0.5, 0.5] have a variance of 1/3
    return u * RJ_UI * UI_PS * 1.7320508;
  endfunction

  logic [6:0] lfsr = '1;
  initial begin
    real t_ideal = 0.0;
    realtime t_edge;
    logic nb;
    forever begin
      t_ideal += UI_PS;
      nb = lfsr[6] ^ lfsr[5];
      lfsr = {lfsr[5:0], nb};
      if (nb != din) begin
        t_edge = t_ideal + (nb ? 0.5 : -0.5) * DCD_UI * UI_PS + rj_ps();
        #(t_edge - $realtime);
        din = nb;
      end
    end
  end
  initial forever #(REF_PS / 2.0) ref_clk = ~ref_clk;

  // ---- clock phase statistics
  bit   meas_on = 0;
  real  sum_c = 0.0, sum_s = 0.0;
  int   n_edges = 0;
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

  // ---- decisions seen by the loop filter
  int n_dec = 0, n_both = 0;
  always @(posedge clk_dig) if (meas_on && (early | late)) begin
    n_dec++;
    if (early && late) n_both++;
  end

  // ---- PRBS recurrence on each recovered lane
  logic [6:0] hist [4];
  int data_errs = 0, data_bits = 0;
  always @(posedge rclk_ph[3]) begin
    #1;
    for (int c = 0; c < 4; c++) begin
      if (meas_on) begin
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

  // distance of two phases on the unit circle, in UI
  function automatic real phase_dist(input real a, input real b);
    real d = a - b;
    d = d - $floor(d + 0.5);
    return d < 0.0 ? -d : d;
  endfunction

  task automatic run(input bit conv, input bit s32, output real mean_ui, output real rms_ui,
                     output int errs, output int both);
    real r;
    conv_pd = conv; sub32 = s32;
    calibration = 1'b1; cal_start = 1'b0;
    rst_n = 1'b0;
    #(1000.0);
    rst_n = 1'b1;
    cal_start = 1'b1;
    wait (cal_done);
    check(cal_ok, "calibration in range");
    calibration = 1'b0;
    #(8_000_000.0);
    sum_c = 0.0; sum_s = 0.0; n_edges = 0; n_dec = 0; n_both = 0;
    data_errs = 0; data_bits = 0;
    meas_on = 1;
    #(6_000_000.0);
    meas_on = 0;
    r = $sqrt(sum_c * sum_c + sum_s * sum_s) / real'(n_edges);
    mean_ui = $atan2(sum_s, sum_c) / (2.0 * PI);
    if (mean_ui < 0.0) mean_ui += 1.0;
    rms_ui = (r >= 1.0) ? 0.0 : $sqrt(-2.0 * $ln(r)) / (2.0 * PI);
    errs = data_errs;
    both = n_both;
    $display("%s N=%0d: clk0 phase %0.3f UI, rms jitter %0.4f UI, decisions %0d (both %0d), %0d of %0d bits wrong",
             conv ? "conventional" : "inverse     ", s32 ? 32 : 16, mean_ui, rms_ui,
             n_dec, n_both, data_errs, data_bits);
    cal_start = 1'b0;
  endtask

  initial begin
    real m_inv16, j_inv16, m_cnv16, j_cnv16, m_inv32, j_inv32, m_cnv32, j_cnv32;
    int  e_inv16, e_cnv16, e_inv32, e_cnv32, b_inv16, b_cnv16, b_inv32, b_cnv32;
    for (int c = 0; c < 4; c++) hist[c] = '0;
    run(1'b0, 1'b0, m_inv16, j_inv16, e_inv16, b_inv16);
    run(1'b1, 1'b0, m_cnv16, j_cnv16, e_cnv16, b_cnv16);
    run(1'b0, 1'b1, m_inv32, j_inv32, e_inv32, b_inv32);
    run(1'b1, 1'b1, m_cnv32, j_cnv32, e_cnv32, b_cnv32);

    check(phase_dist(m_inv16, 0.0) < 0.15, "inverse N=16 locks edge sampler on data edges");
    check(phase_dist(m_inv32, 0.0) < 0.15, "inverse N=32 locks edge sampler on data edges");
    check(phase_dist(m_cnv16, 0.5) < 0.15, "conventional N=16 locks data sampler on data edges");
    check(e_inv16 == 0, "inverse N=16 recovers data without errors");
    check(b_inv16 > 0 && b_inv32 > 0, "inverse loop sees simultaneous Early and Late");
    $display("rms clock jitter, inverse / conventional: N=16 %0.4f / %0.4f UI, N=32 %0.4f / %0.4f UI",
             j_inv16, j_cnv16, j_inv32, j_cnv32);
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
