// tb_long_code_gen: the long code output, for any mask, must obey the linear
// recurrence of the characteristic polynomial
// x^42+x^35+x^33+x^31+x^27+x^26+x^25+x^22+x^21+x^19+x^18+x^17+x^16+x^10
// +x^7+x^6+x^5+x^3+x^2+x+1: c(n+42) = sum of c(n+k) over its lower terms.
// Also checks that en = 0 holds the sequence, that the mask selects the
// register's phase (mask 1 gives the reset state's bit 0 first) and that the
// sequence is balanced over a long run.
// Source of the expected values: the polynomial is IS-95A's; the document gives no sequence values.
module tb_long_code_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en = 0, chip, chip1;
  logic [41:0] mask;
  long_code_gen dut  (.clk, .rst_n, .en, .mask(mask), .chip(chip));
  long_code_gen dut1 (.clk, .rst_n, .en, .mask(42'd1), .chip(chip1));
  int terms [20] = '{0,1,2,3,5,6,7,10,16,17,18,19,21,22,25,26,27,31,33,35};
  bit c [$];
  bit c1 [$];
  initial begin
    mask = {$urandom, $urandom} & 42'h3FF_FFFF_FFFF;
    mask[41:40] = 2'b11;
    repeat (2) @(posedge clk); #1; rst_n = 1;
    en = 1;
    for (int n = 0; n < 3000; n++) begin
      c.push_back(chip); c1.push_back(chip1);
      if (n == 100) begin
        bit h;
        en = 0; h = chip;
        repeat (3) begin @(posedge clk); #1; checks++; if (chip != h) failures++; end
        en = 1;
      end
      @(posedge clk); #1;
    end
    checks++; if (c1[0] != 1'b1) failures++;
    begin
      int ones;
      ones = 0;
      for (int n = 0; n + 42 < c.size(); n++) begin
        bit s;
        s = 1'b0;
        foreach (terms[k]) s ^= c[n + terms[k]];
        checks++; if (s != c[n + 42]) failures++;
        checks++;
        begin
          bit s1;
          s1 = 1'b0;
          foreach (terms[k]) s1 ^= c1[n + terms[k]];
          if (s1 != c1[n + 42]) failures++;
        end
      end
      foreach (c[i]) ones += c[i];
      checks++; if (ones < 1300 || ones > 1700) begin failures++; $display("FAIL: ones=%0d", ones); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
