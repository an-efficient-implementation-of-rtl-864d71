// tb_walsh_gen: runs walsh_gen through a full period for all 64 indices and
// checks the Hadamard construction independently: W_0 is all zeros, and
// W_i restricted to the first 2^k chips is W_(i mod 2^k) repeated, or
// inverted in the second half when bit k of i is set.  Distinct functions
// must differ in exactly 32 chips (orthogonality).
module tb_walsh_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en = 0, last, w;
  logic [5:0] sel, count;
  walsh_gen dut (.clk, .rst_n, .en, .sel_walsh(sel), .count, .last, .walsh_out(w));
  bit got [64][64];
  bit h [64][64];
  initial begin
    // Sylvester construction
    h[0][0] = 0;
    for (int k = 1; k < 64; k <<= 1)
      for (int i = 0; i < k; i++)
        for (int j = 0; j < k; j++) begin
          h[i][j+k]   = h[i][j];
          h[i+k][j]   = h[i][j];
          h[i+k][j+k] = !h[i][j];
        end
    repeat (2) @(posedge clk); #1; rst_n = 1; en = 1;
    for (int i = 0; i < 64; i++) begin
      sel = 6'(i);
      for (int j = 0; j < 64; j++) begin
        #1;
        checks++; if (count != 6'(j)) failures++;
        checks++; if (last != (j == 63)) failures++;
        got[i][j] = w;
        @(posedge clk); #1;
      end
    end
    for (int i = 0; i < 64; i++) begin
      for (int j = 0; j < 64; j++) begin
        checks++; if (got[i][j] != h[i][j]) failures++;
      end
      for (int k = i + 1; k < 64; k++) begin
        int d;
        d = 0;
        for (int j = 0; j < 64; j++) d += int'(got[i][j] != got[k][j]);
        checks++; if (d != 32) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
