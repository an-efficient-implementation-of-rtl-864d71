// tb_mobile_power_adjust: random power control bits against a gain model
// (+STEP for 0, -STEP for 1, clamped), with a narrow range so that both
// limits are reached.
// Source of the expected values: the step rule is this design's; the document only names power control.
module tb_mobile_power_adjust;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic pc_valid = 0, pc_bit = 0;
  logic [7:0] gain;
  mobile_power_adjust #(.GW(8), .STEP(2), .GMIN(10), .GMAX(30), .GINIT(20)) dut (
    .clk, .rst_n, .pc_valid, .pc_bit, .gain);
  int model = 20, hit_lo = 0, hit_hi = 0;
  initial begin
    repeat (2) @(posedge clk); #1; rst_n = 1;
    checks++; if (gain != 8'd20) failures++;
    for (int n = 0; n < 400; n++) begin
      pc_valid = 1'($urandom);
      pc_bit   = (n / 40) % 2 == 0 ? ($urandom_range(0, 9) < 8) : ($urandom_range(0, 9) < 2);
      if (pc_valid) model = pc_bit ? ((model - 2 < 10) ? 10 : model - 2) : ((model + 2 > 30) ? 30 : model + 2);
      @(posedge clk); #1;
      checks++; if (gain != 8'(model)) begin failures++; $display("FAIL: gain %0d model %0d", gain, model); end
      if (model == 10) hit_lo++;
      if (model == 30) hit_hi++;
    end
    checks++; if (hit_lo == 0 || hit_hi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
