// tb_freq_cal: runs the calibration against a model oscillator whose
// digital-clock frequency is (4.98 GHz + coarse * 40 MHz) / 4, with a
// 100 MHz reference and a 64-period window. Checks, for a start below and
// a start above the target, that the calibration ends with cal_ok, that the
// final coarse word gives a count within tolerance while the word one step
// back does not, that each step came with a frequency-detector pulse of the
// right sign, and that an unreachable target ends at the range limit with
// cal_ok low.
module tb_freq_cal;
  timeunit 1ps;
  timeprecision 1fs;
  import adcdr_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, ref_clk = 1'b0, cal_start = 1'b0;
  logic [COARSE_W-1:0] coarse_init = '0, coarse;
  logic [15:0] ref_window = 16'd64, tol = 16'd5;
  logic [23:0] target_count = 24'd1000, last_count;
  logic cal_done, cal_ok;
  logic [1:0] fd_early, fd_late;
  int n_up, n_dn, steps;

  freq_cal dut (.*);

  function automatic real fdig(input int c);
    return (4.98e9 + real'(c) * 40.0e6) / 4.0;
  endfunction
  function automatic real model_count(input int c);
    return 64.0 * 10.0e-9 * fdig(c);
  endfunction

  initial forever #(0.5e12 / fdig(int'(coarse))) clk = ~clk;
  initial forever #5000.0 ref_clk = ~ref_clk;

  always @(posedge clk) begin
    if (fd_late == 2'b11) n_up++;
    if (fd_early == 2'b11) n_dn++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int init, input int tgt, input bit expect_ok, input bit upward);
    target_count = 24'(tgt);
    coarse_init = 6'(init);
    n_up = 0; n_dn = 0;
    cal_start = 1'b1;
    wait (cal_done);
    #1;
    steps = (int'(coarse) > init) ? int'(coarse) - init : init - int'(coarse);
    $display("init %0d -> coarse %0d, count %0d (model %0.1f), ok=%b, up=%0d down=%0d",
             init, coarse, last_count, model_count(int'(coarse)), cal_ok, n_up, n_dn);
    check(cal_ok == expect_ok, "cal_ok");
    if (expect_ok) begin
      check(model_count(int'(coarse)) > real'(tgt - 7) && model_count(int'(coarse)) < real'(tgt + 7),
            "final coarse within tolerance");
      if (upward) check(model_count(int'(coarse) - 1) < real'(tgt - 4), "previous step out of tolerance");
      else        check(model_count(int'(coarse) + 1) > real'(tgt + 4), "previous step out of tolerance");
    end
    check(upward ? (n_up == steps && n_dn == 0) : (n_dn == steps && n_up == 0),
          "one detector pulse of the right sign per step");
    cal_start = 1'b0;
    @(posedge clk); @(posedge clk);
  endtask

  initial begin
    #10 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    run(20, 1000, 1'b1, 1'b1);
    run(45, 1000, 1'b1, 1'b0);
    run(58, 5000, 1'b0, 1'b1);
    check(coarse == 6'd63, "stopped at the upper limit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000.0;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
