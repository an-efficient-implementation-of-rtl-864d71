// tb_short_code_gen: the I and Q short codes must repeat every 32768 chips,
// hold 16384 ones per period, contain exactly one run of 15 zeros (14 of the
// m-sequence plus the inserted one) per period, and outside that inserted
// chip follow their recurrences
// I: c(n+15) = c(n+13)+c(n+9)+c(n+8)+c(n+7)+c(n+5)+c(n)
// Q: c(n+15) = c(n+12)+c(n+11)+c(n+10)+c(n+6)+c(n+5)+c(n+4)+c(n+3)+c(n).
// Source of the expected values: the polynomials are IS-95A's; the document gives no sequence values.
module tb_short_code_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en = 0, pn_i, pn_q;
  short_code_gen dut (.clk, .rst_n, .en, .pn_i, .pn_q);
  localparam int P = 32768;
  bit ci [2*P];
  bit cq [2*P];
  task automatic check_seq(bit c [2*P], int taps [], string nm);
    int ones, runs, run;
    ones = 0; runs = 0; run = 0;
    for (int n = 0; n < P; n++) begin
      ones += c[n];
      checks++; if (c[n] != c[n + P]) failures++;
    end
    for (int n = 0; n < 2*P; n++) begin
      if (c[n] == 0) run++;
      else begin
        if (run >= 15) runs++;
        checks++; if (run > 15) failures++;
        run = 0;
      end
    end
    checks++; if (ones != P/2) begin failures++; $display("FAIL: %s ones %0d", nm, ones); end
    checks++; if (runs != 2) begin failures++; $display("FAIL: %s 15-zero runs %0d", nm, runs); end
    // recurrence on the sequence with the inserted zeros removed
    begin
      bit m [$];
      int z;
      z = 0;
      for (int n = 0; n < 2*P; n++) begin
        if (c[n] == 0) z++; else z = 0;
        if (z != 15) m.push_back(c[n]);
      end
      for (int n = 0; n + 15 < m.size(); n++) begin
        bit s;
        s = 1'b0;
        foreach (taps[k]) s ^= m[n + taps[k]];
        checks++; if (s != m[n + 15]) failures++;
      end
    end
  endtask
  initial begin
    repeat (2) @(posedge clk); #1; rst_n = 1; en = 1;
    for (int n = 0; n < 2*P; n++) begin
      ci[n] = pn_i; cq[n] = pn_q;
      @(posedge clk); #1;
    end
    check_seq(ci, '{0,5,7,8,9,13}, "I");
    check_seq(cq, '{0,3,4,5,6,10,11,12}, "Q");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (80000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
