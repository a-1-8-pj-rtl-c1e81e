// tb_clk_div2: checks the divide-by-two: low during reset, then one output
// rising edge for every second input rising edge, toggling after each.
module tb_clk_div2;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, q;
  logic exp_q;

  clk_div2 dut (.clk_in(clk), .rst_n(rst_n), .clk_out(q));

  initial forever #80.0 clk = ~clk;

  initial begin
    #10 rst_n = 1'b0;
    repeat (3) begin
      @(posedge clk); #1;
      checks++;
      if (q !== 1'b0) failures++;
    end
    @(negedge clk) rst_n = 1'b1;
    exp_q = 1'b0;
    repeat (100) begin
      @(posedge clk); #1;
      exp_q = ~exp_q;
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL: q=%b expected %b", q, exp_q);
      end
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
