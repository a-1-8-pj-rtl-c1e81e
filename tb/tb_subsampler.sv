// tb_subsampler: drives a new random (Edge0, Dout0, Edge1) triple after
// every rising Clk3 edge and checks that the digital clock has a period of
// four Clk3 periods and that each S triple is one of the input triples,
// taken exactly four Clk3 periods after the previous one (subsampling by 4)
// and held for the whole digital clock period.
module tb_subsampler;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real T = 160.0;
  int checks = 0, failures = 0;
  logic clk3 = 1'b0, rst_n = 1'b1, clk_dig;
  logic [2:0] pa = '0, s;
  logic [2:0] hist [0:1023];
  int edge_idx = 0, last_dig = -1, offset = -1;

  subsampler dut (.clk3(clk3), .rst_n(rst_n), .pa_in(pa), .s(s), .clk_dig(clk_dig));

  initial forever #(T / 2.0) clk3 = ~clk3;

  always @(posedge clk3) begin
    #20.0;
    pa = 3'($urandom);
    edge_idx++;
    hist[edge_idx % 1024] = pa;
  end

  always @(posedge clk_dig) if (rst_n) begin
    #30.0;   // after the registers, before the next input change
    if (last_dig >= 0) begin
      checks++;
      if (edge_idx - last_dig != 4) begin
        failures++;
        $display("FAIL: digital clock period %0d Clk3 periods", edge_idx - last_dig);
      end
    end
    last_dig = edge_idx;
    if (offset < 0) begin
      // find which earlier triple this is (within the last 8)
      for (int o = 7; o >= 0; o--) if (hist[(edge_idx - o) % 1024] == s) offset = o;
    end else begin
      checks++;
      if (s !== hist[(edge_idx - offset) % 1024]) begin
        failures++;
        $display("FAIL: s=%b expected %b", s, hist[(edge_idx - offset) % 1024]);
      end
    end
  end

  // S must hold for the whole digital clock period.
  logic [2:0] s_at_rise;
  always @(posedge clk_dig) begin #30.0; s_at_rise = s; end
  always @(negedge clk_dig) if (rst_n && offset >= 0) begin
    #30.0;
    checks++;
    if (s !== s_at_rise) begin
      failures++;
      $display("FAIL: S changed within a digital clock period");
    end
  end

  initial begin
    for (int i = 0; i < 1024; i++) hist[i] = '0;
    #10 rst_n = 1'b0;
    #300 rst_n = 1'b1;
    #(T * 4 * 200);
    checks++;
    if (offset < 0 || offset > 7) failures++;
    $display("subsampling offset %0d Clk3 periods", offset);
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
