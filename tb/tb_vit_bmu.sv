// tb_vit_bmu: exhaustive check of the branch metric for N = 3 (and N = 2):
// the number of positions where received and expected symbols differ,
// counting only positions not flagged as erased.
// Source of the expected values: the Hamming metric by XOR is the document's; the erasure mask is this design's.
module tb_vit_bmu;
  int checks = 0, failures = 0;
  logic [2:0] rx, era, ex;
  logic [1:0] bm3, bm2;
  vit_bmu #(.N(3)) dut3 (.rx_sym(rx), .rx_era(era), .exp_sym(ex), .bm(bm3));
  vit_bmu #(.N(2)) dut2 (.rx_sym(rx[1:0]), .rx_era(era[1:0]), .exp_sym(ex[1:0]), .bm(bm2));
  initial begin
    for (int a = 0; a < 8; a++)
      for (int e = 0; e < 8; e++)
        for (int x = 0; x < 8; x++) begin
          int d3, d2;
          rx = 3'(a); era = 3'(e); ex = 3'(x);
          #1;
          d3 = 0; d2 = 0;
          for (int j = 0; j < 3; j++)
            if (!era[j] && rx[j] != ex[j]) begin d3++; if (j < 2) d2++; end
          checks++; if (bm3 != 2'(d3)) failures++;
          checks++; if (bm2 != 2'(d2)) failures++;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
