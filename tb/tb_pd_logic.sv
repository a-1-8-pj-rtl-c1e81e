// tb_pd_logic: drives random (S0, S1, S2) triples and checks Early/Late
// against the Inverse Alexander rules, registered twice (Early/Late show the triple
// two edges after it is presented):
//   Early when S0 != S1, Late when S1 != S2 (both together when S1 differs
//   from both neighbours, neither without a transition).
// Then, in the 32x test mode, checks that only every second decision gets
// through.
module tb_pd_logic;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, sub32 = 1'b0;
  logic [2:0] s = '0;
  logic early, late;
  logic [2:0] q [0:2];   // s of the last cycles
  int n_e = 0, n_l = 0, n_b = 0, n_n = 0, kept = 0, skipped = 0;
  logic prev_kept;

  pd_logic dut (.clk(clk), .rst_n(rst_n), .sub32(sub32), .s(s), .early(early), .late(late));

  initial forever #320.0 clk = ~clk;

  initial begin
    #10 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    q[0] = '0; q[1] = '0; q[2] = '0;
    repeat (3) @(posedge clk);
    repeat (400) begin
      @(negedge clk);
      s = 3'($urandom);
      @(posedge clk); #1;
      q[2] = q[1]; q[1] = q[0]; q[0] = s;
      // early/late now reflect the s captured one edge earlier (q[1])
      checks++;
      if (early !== (q[1][0] != q[1][1]) || late !== (q[1][1] != q[1][2])) begin
        failures++;
        $display("FAIL: S=%b early=%b late=%b", q[1], early, late);
      end
      case ({early, late})
        2'b10: n_e++;
        2'b01: n_l++;
        2'b11: n_b++;
        default: n_n++;
      endcase
    end
    checks++;
    if (n_e == 0 || n_l == 0 || n_b == 0 || n_n == 0) failures++;

    // 32x mode: s always has both transitions, so every kept decision is 11
    sub32 = 1'b1;
    s = 3'b010;
    repeat (4) @(posedge clk);
    #1 prev_kept = early;
    repeat (100) begin
      @(posedge clk); #1;
      checks++;
      if (early == prev_kept || early != late) begin
        failures++;
        $display("FAIL: 32x mode decisions not alternating");
      end
      if (early) kept++; else skipped++;
      prev_kept = early;
    end
    checks++;
    if (kept != 50 || skipped != 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000.0;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
