// tb_dlf: checks the digital loop filter.
//   - proportional path: Early/Late select Kp bits of their thermometer word
//     at once (no register in this block);
//   - integral delay: a single Late pulse reaches the 31-bit word 7 or 8
//     edges after it appears (9 or 10 counted from the subsampler output);
//   - integral sum: after a random Early/Late stream the accumulator equals
//     mid-scale + (Lates - Earlies) * 2**ki_shift, and the thermometer word
//     has as many ones as its 5 MSBs;
//   - saturation at both ends, the conventional-PD sign swap, the
//     calibration input mux and the fixed DCO setting.
module tb_dlf;
  timeunit 1ps;
  timeprecision 1fs;
  import adcdr_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic early = 0, late = 0, conv_pd = 0, calibration = 0, dco_char = 0;
  logic [KP_W-1:0] kp = '0;
  logic [KI_W-1:0] ki_shift = '0;
  logic [1:0] fd_early = '0, fd_late = '0;
  logic [INT_THERM_W-1:0] fixed_setting = '0;
  fine_word_t fine;
  logic [ACC_W-1:0] acc;
  logic half_en;
  int net, lat, lat_seen_7, lat_seen_8, start_ones;
  logic [ACC_W-1:0] acc0;

  dlf dut (.*);

  initial forever #320.0 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int ones(input logic [INT_THERM_W-1:0] v);
    return $countones(v);
  endfunction

  task automatic settle();
    early = 0; late = 0;
    repeat (14) @(posedge clk);
    #1;
  endtask

  initial begin
    #10 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    @(posedge clk); #1;
    check(acc == 16'h8000 && ones(fine.integ) == 16, "reset value mid-scale");

    // proportional path
    repeat (200) begin
      @(posedge clk); #1;
      kp = 3'($urandom); early = 1'($urandom); late = 1'($urandom);
      #1;
      check(fine.prop_early == (early ? 7'((1 << kp) - 1) : 7'd0) &&
            fine.prop_late  == (late  ? 7'((1 << kp) - 1) : 7'd0), "proportional words");
    end
    settle();

    // integral delay, one DCO step per unit
    ki_shift = 4'd11;
    lat_seen_7 = 0; lat_seen_8 = 0;
    for (int trial = 0; trial < 6; trial++) begin
      repeat (trial % 2 + 1) @(posedge clk);
      #1;
      start_ones = ones(fine.integ);
      late = 1;
      @(posedge clk); #1 late = 0;
      lat = 1;
      while (ones(fine.integ) == start_ones && lat < 20) begin
        @(posedge clk); #1;
        lat++;
      end
      if (lat == 7) lat_seen_7++;
      if (lat == 8) lat_seen_8++;
      check(lat == 7 || lat == 8, $sformatf("integral delay %0d", lat + 2));
      check(ones(fine.integ) == start_ones + 1, "one step per Late with Ki = 1 LSB");
      settle();
    end
    check(lat_seen_7 > 0 && lat_seen_8 > 0, "both pair positions seen");

    // random stream, accumulator sum
    ki_shift = 4'd3;
    acc0 = acc;
    net = 0;
    repeat (600) begin
      early = 1'($urandom); late = 1'($urandom);
      net += int'(late) - int'(early);
      @(posedge clk); #1;
    end
    settle();
    check(int'(acc) == int'(acc0) + net * 8, $sformatf("accumulated %0d expected %0d", acc, int'(acc0) + net * 8));
    check(ones(fine.integ) == int'(acc[15:11]), "thermometer of the 5 MSBs");

    // saturation
    ki_shift = 4'd14;
    late = 1;
    repeat (40) @(posedge clk);
    settle();
    check(acc == 16'hffff && fine.integ == '1, "saturates high");
    early = 1;
    repeat (40) @(posedge clk);
    settle();
    check(acc == 16'h0000 && fine.integ == '0, "saturates low");

    // conventional PD: sign swap in both paths
    kp = 3'd5; ki_shift = 4'd11; conv_pd = 1;
    early = 1; #1;
    check(fine.prop_late == 7'h1f && fine.prop_early == 7'h00, "conv: Early raises");
    repeat (6) @(posedge clk);
    settle();
    check(acc > 16'h0000, "conv: Early integrates upward");
    conv_pd = 0;

    // calibration mux: phase detector ignored, FD pair taken
    acc0 = acc;
    calibration = 1;
    early = 1;
    @(posedge clk); #1;
    fd_late = 2'b11;
    repeat (2) @(posedge clk);
    #1 fd_late = 2'b00;
    repeat (12) @(posedge clk);
    #1;
    check(int'(acc) == int'(acc0) + 2 * 2048, "calibration pair integrated, PD ignored");
    calibration = 0; early = 0;
    settle();

    // fixed DCO setting
    dco_char = 1;
    repeat (5) begin
      fixed_setting = 31'($urandom);
      #1 check(fine.integ == fixed_setting, "fixed setting selected");
    end
    dco_char = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000.0;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
