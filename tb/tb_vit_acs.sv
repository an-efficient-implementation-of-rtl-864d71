// tb_vit_acs: random path and branch metrics with random activity flags;
// the survivor must be the smaller sum among active paths (path a on a tie),
// and the result inactive only when both paths are.
// Source of the expected values: the tie and activity rules are this design's; the add-compare-select itself is the document's.
module tb_vit_acs;
  int checks = 0, failures = 0;
  logic [9:0] pa, pb, po;
  logic [1:0] ba, bb;
  logic aa, ab, ao, dec;
  vit_acs #(.PMW(10), .BW(2)) dut (.pm_a(pa), .bm_a(ba), .act_a(aa), .pm_b(pb), .bm_b(bb), .act_b(ab),
                                   .pm_out(po), .act_out(ao), .dec(dec));
  initial begin
    for (int n = 0; n < 5000; n++) begin
      int sa, sb;
      bit d;
      pa = 10'($urandom_range(0, 500)); pb = (n % 7 == 0) ? pa : 10'($urandom_range(0, 500));
      ba = 2'($urandom); bb = 2'($urandom);
      aa = ($urandom_range(0, 4) != 0); ab = ($urandom_range(0, 4) != 0);
      #1;
      sa = pa + ba; sb = pb + bb;
      if (!aa && !ab) d = 0;
      else if (!aa) d = 1;
      else if (!ab) d = 0;
      else d = (sb < sa);
      checks++; if (ao != (aa || ab)) failures++;
      checks++; if (dec != d) failures++;
      if (aa || ab) begin checks++; if (po != 10'(d ? sb : sa)) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
