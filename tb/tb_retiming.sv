// tb_retiming: drives the six sampler outputs with random bits that change
// at their own phase positions within the Clk3 period, and checks that at
// each rising Clk3 edge the type I outputs hold the values present at that
// edge, and the type II outputs hold the complement of the values present at
// the preceding falling edge.
module tb_retiming;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real T = 160.0;   // 6.25 GHz
  int checks = 0, failures = 0;
  logic clk3 = 1'b0;
  logic s0, s1, s2, s3, s5, s7;
  logic edge0, dout0, edge1, dout1, dout2_n, dout3_n;
  logic [3:0] exp_i;
  logic [1:0] exp_ii, neg_vals;

  retiming dut (.clk3(clk3), .smp_clk0(s0), .smp_clk1(s1), .smp_clk2(s2),
                .smp_clk3(s3), .smp_clk5(s5), .smp_clk7(s7),
                .edge0(edge0), .dout0(dout0), .edge1(edge1), .dout1(dout1),
                .dout2_n(dout2_n), .dout3_n(dout3_n));

  // Clk3 rises at 3T/8 in each period.
  initial begin
    #(3.0 * T / 8.0);
    forever begin clk3 = 1'b1; #(T / 2.0); clk3 = 1'b0; #(T / 2.0); end
  end

  // Each input changes 15 ps after its own phase k*T/8.
  initial begin
    {s0, s1, s2, s3, s5, s7} = '0;
    forever begin
      #15.0 s0 = 1'($urandom);
      #20.0 s1 = 1'($urandom);
      #20.0 s2 = 1'($urandom);
      #20.0 s3 = 1'($urandom);
      #40.0 s5 = 1'($urandom);
      #40.0 s7 = 1'($urandom);
      #5.0;
    end
  end

  initial begin
    @(negedge clk3); neg_vals = {s7, s5};
    repeat (300) begin
      @(posedge clk3);
      exp_i  = {s3, s2, s1, s0};
      exp_ii = ~neg_vals;
      #1.0;
      checks++;
      if ({dout1, edge1, dout0, edge0} !== exp_i || {dout3_n, dout2_n} !== exp_ii) begin
        failures++;
        $display("FAIL: type I %b exp %b, type II %b exp %b",
                 {dout1, edge1, dout0, edge0}, exp_i, {dout3_n, dout2_n}, exp_ii);
      end
      @(negedge clk3); neg_vals = {s7, s5};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000.0;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
