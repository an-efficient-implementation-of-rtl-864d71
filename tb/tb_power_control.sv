// tb_power_control: feeds random strength samples, 16 per power control
// group with idle cycles between them, and checks that after each 16th
// sample the decision pulse comes one cycle later with bit 1 exactly when
// the group's sum exceeds the threshold, and that diff = sum - threshold
// during the group.
// Source of the expected values: the sum-and-threshold rule is this design's; the document gives no values.
module tb_power_control;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic sample_valid = 0, pc_valid, pc_bit, over;
  logic [7:0] sample = 0, count;
  logic [17:0] threshold = 18'd2040, sum, diff;
  power_control dut (.clk, .rst_n, .sample_valid, .sample, .threshold, .pc_valid, .pc_bit,
                     .count, .sum, .diff, .over);
  int n0 = 0, n1 = 0;
  initial begin
    repeat (2) @(posedge clk); #1; rst_n = 1;
    for (int g = 0; g < 60; g++) begin
      int s;
      int bias;
      s = 0;
      bias = $urandom_range(60, 200);
      for (int i = 0; i < 16; i++) begin
        sample_valid = 1; sample = 8'($urandom_range(bias - 50, bias + 50));
        s += sample;
        @(posedge clk); #1;
        sample_valid = 0;
        if (i < 15) begin
          checks++; if (pc_valid) failures++;
          checks++; if (diff != 18'(s - 2040)) failures++;
          repeat (3) @(posedge clk); #1;
        end
      end
      checks++; if (!pc_valid) begin failures++; $display("FAIL: no decision"); end
      checks++; if (pc_bit != (s > 2040)) begin failures++; $display("FAIL: sum %0d bit %0d", s, pc_bit); end
      if (pc_bit) n1++; else n0++;
      @(posedge clk); #1;
      checks++; if (pc_valid) failures++;
    end
    checks++; if (n0 == 0 || n1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
