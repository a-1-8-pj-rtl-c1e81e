// tb_saff_sampler: checks that the sampler model captures its input at the
// rising clock edge and shows it after the clock-to-output delay, and that
// input changes between edges do not reach the output.
module tb_saff_sampler;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TCQ = 15.0;   // the model's default delay
  int checks = 0, failures = 0;
  logic clk = 1'b0, d = 1'b0, q;
  logic exp_q, old_q;

  saff_sampler dut (.clk(clk), .d(d), .q(q));

  initial forever #80.0 clk = ~clk;   // 6.25 GHz

  initial begin
    repeat (200) begin
      @(negedge clk);
      #($urandom_range(10, 60));
      d = 1'($urandom);
      @(posedge clk);
      exp_q = d;
      old_q = q;
      #1.0 d = ~d;            // change right after the edge: must not matter
      checks++;
      if (q !== old_q) failures++;   // not yet: clock-to-output delay
      #(TCQ);
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
