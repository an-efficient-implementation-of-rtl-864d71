// tb_fer_detector: random frame results against two counters kept by the
// testbench, a clear in the middle, and saturation with a 4-bit counter.
// Source of the expected values: the counting rule is this design's; the document only names the block.
module tb_fer_detector;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear = 0, frame_done = 0, crc_ok = 0;
  logic [15:0] frames, frame_errors;
  logic [3:0] frames4, errors4;
  fer_detector dut (.clk, .rst_n, .clear, .frame_done, .crc_ok, .frames, .frame_errors);
  fer_detector #(.CNT_W(4)) dut4 (.clk, .rst_n, .clear(1'b0), .frame_done, .crc_ok(1'b0),
                                  .frames(frames4), .frame_errors(errors4));
  int nf = 0, ne = 0, nf4 = 0;
  initial begin
    repeat (2) @(posedge clk); #1; rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      clear = (n == 150);
      frame_done = 1'($urandom); crc_ok = ($urandom_range(0, 9) < 7);
      if (clear) begin nf = 0; ne = 0; end
      else if (frame_done) begin nf++; if (!crc_ok) ne++; end
      if (frame_done) nf4 = (nf4 < 15) ? nf4 + 1 : 15;
      @(posedge clk); #1;
      checks++; if (frames != 16'(nf) || frame_errors != 16'(ne)) failures++;
      checks++; if (frames4 != 4'(nf4) || errors4 != 4'(nf4)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
