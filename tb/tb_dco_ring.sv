// tb_dco_ring: measures the model oscillator.
//   - frequency against the tuning law for several coarse/current/fine
//     settings (to 100 ppm: the law is linear in frequency, the model in
//     delay);
//   - at 6.25 GHz one integral fine step is about +1.7 MHz, seven Early
//     bits about -11.9 MHz, seven Late bits about +11.9 MHz;
//   - the range reaches 3.125 GHz and 6.25 GHz (12.5 and 25 Gb/s);
//   - the 8 phases are 1/8 period apart with an untuned fine word;
//   - fine bit i shortens only the cell in the sequence 1, 3, 2, 4.
// The model's phase noise makes single periods and edges jitter, so
// frequencies are measured over 40 us (a random-walk error of about
// 4.5 ppm, 28 kHz, with the default noise) and edge positions are averaged over 4000
// periods.
module tb_dco_ring;
  timeunit 1ps;
  timeprecision 1fs;
  import adcdr_pkg::*;

  int checks = 0, failures = 0;
  logic [COARSE_W-1:0] coarse = 6'd32;
  logic [CURRENT_W-1:0] current = 4'd12;
  fine_word_t fine = '0;
  logic [NUM_PHASES-1:0] clk_ph;
  realtime rise [NUM_PHASES];
  real f, f_ref, per;

  dco_ring dut (.coarse(coarse), .current(current), .fine(fine), .clk_ph(clk_ph));

  for (genvar k = 0; k < NUM_PHASES; k++) begin : g_mon
    always @(posedge clk_ph[k]) rise[k] = $realtime;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic measure(output real f_hz);
    realtime t0;
    int n;
    repeat (3) @(posedge clk_ph[0]);
    t0 = $realtime;
    n = 0;
    while ($realtime - t0 < 40_000_000.0) begin
      @(posedge clk_ph[0]);
      n++;
    end
    f_hz = real'(n) / (($realtime - t0) * 1.0e-12);
  endtask

  // Mean rise time of each phase after clk_ph[0] of the same period.
  real rise_avg [NUM_PHASES];
  task automatic average_rises(input int periods);
    for (int k = 0; k < NUM_PHASES; k++) rise_avg[k] = 0.0;
    repeat (3) @(posedge clk_ph[0]);
    repeat (periods) begin
      @(posedge clk_ph[7]);
      #1;
      for (int k = 1; k < NUM_PHASES; k++) rise_avg[k] += (rise[k] - rise[0]) / real'(periods);
    end
  endtask

  function automatic real law(input int c, input int cur, input int n);
    return 6.2228e9 * (1.05 ** real'(cur - 12)) * (1.0072 ** real'(c - 32)) * (1.0 + 272.0e-6 * real'(n));
  endfunction

  initial begin
    // tuning law
    for (int t = 0; t < 6; t++) begin
      coarse = 6'($urandom_range(0, 63));
      current = 4'($urandom_range(2, 15));
      fine.integ = therm31(5'($urandom));
      measure(f);
      f_ref = law(int'(coarse), int'(current), $countones(fine.integ));
      $display("coarse %0d current %0d fine %0d: %0.3f MHz (law %0.3f)", coarse, current,
               $countones(fine.integ), f / 1e6, f_ref / 1e6);
      check(f > f_ref * 0.9999 && f < f_ref * 1.0001, "tuning law");
    end

    // fine steps
    coarse = 6'd32; current = 4'd12; fine = '0;
    fine.integ = therm31(5'd16);
    measure(f_ref);
    fine.integ = therm31(5'd17);
    measure(f);
    check(f - f_ref > 1.5e6 && f - f_ref < 1.9e6, "one integral step");
    fine.integ = therm31(5'd16);
    fine.prop_early = 7'h7f;
    measure(f);
    check(f_ref - f > 11.0e6 && f_ref - f < 12.8e6, "Early word lowers");
    fine.prop_early = 7'h00;
    fine.prop_late = 7'h7f;
    measure(f);
    check(f - f_ref > 11.0e6 && f - f_ref < 12.8e6, "Late word raises");
    fine.prop_late = 7'h7f;
    fine.prop_early = 7'h7f;
    measure(f);
    check(f - f_ref > -0.25e6 && f - f_ref < 0.25e6, "Early and Late cancel");

    // range ends
    coarse = 6'd0; current = 4'd2; fine = '0;
    measure(f);
    check(f < 3.125e9, "reaches 3.125 GHz");
    coarse = 6'd63; current = 4'd15;
    measure(f);
    check(f > 6.25e9, "reaches 6.25 GHz");
    coarse = 6'd32; current = 4'd12;

    // phase spacing, untuned
    fine = '0;
    average_rises(4000);
    per = 1.0e12 / law(32, 12, 0);
    for (int k = 1; k < NUM_PHASES; k++)
      check(rise_avg[k] > real'(k) * per / 8.0 - 0.03 &&
            rise_avg[k] < real'(k) * per / 8.0 + 0.03, $sformatf("phase %0d spacing", k));

    // varactor sequencing: bit i of the word goes to cell 1, 3, 2, 4, ...
    for (int i = 0; i < 4; i++) begin
      int cell_exp, cell_short;
      real dmin, d;
      cell_exp = (i == 0) ? 0 : (i == 1) ? 2 : (i == 2) ? 1 : 3;
      fine = '0;
      fine.integ[i] = 1'b1;
      average_rises(4000);
      // interval ending at the rise of clk_k is the delay of cell k mod 4
      dmin = 1.0e9; cell_short = -1;
      for (int k = 1; k < 4; k++) begin
        d = rise_avg[k] - rise_avg[k-1];
        if (d < dmin) begin dmin = d; cell_short = k; end
      end
      d = rise_avg[4] - rise_avg[3];  // cell 0 also ends clk4's rise
      if (d < dmin) begin dmin = d; cell_short = 0; end
      check(cell_short == cell_exp, $sformatf("bit %0d drives cell %0d (got %0d)", i, cell_exp + 1, cell_short + 1));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000_000.0;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
