// tb_conv_encoder: checks conv_encoder at rate 1/2 (g = 753, 561 octal) and
// rate 1/3 (557, 663, 711) against a reference that expands the octal
// generators into coefficients of D^0 (most significant bit) .. D^8.  It also
// checks the shift register sequence printed in the document's encoder
// simulation: 001 002 004 008 011 022 045 08B 116 02D.
module tb_conv_encoder;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, in_bit = 0, r2, r3, v2, v3;
  logic [1:0] s2; logic [2:0] s3;
  conv_encoder #(.K(9), .N(2), .G0(16'o753), .G1(16'o561)) dut2 (
    .clk, .rst_n, .in_valid, .in_bit, .in_ready(r2), .out_valid(v2), .out_sym(s2), .out_ready(1'b1));
  conv_encoder #(.K(9), .N(3), .G0(16'o557), .G1(16'o663), .G2(16'o711)) dut3 (
    .clk, .rst_n, .in_valid, .in_bit, .in_ready(r3), .out_valid(v3), .out_sym(s3), .out_ready(1'b1));
  bit hist [$];
  function automatic bit ref_sym(int g);
    bit r = 0;
    for (int i = 0; i < 9; i++) begin
      bit coef = (g >> (8 - i)) & 1;     // MSB is D^0
      bit u = (i < hist.size()) ? hist[hist.size() - 1 - i] : 1'b0;
      r ^= coef & u;
    end
    return r;
  endfunction
  int fig_in [10] = '{1,0,0,0,1,0,1,1,0,1};
  int fig_sr [10] = '{'h001,'h002,'h004,'h008,'h011,'h022,'h045,'h08B,'h116,'h02D};
  initial begin
    repeat (2) @(posedge clk); #1; rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      in_valid = 1; in_bit = (n < 10) ? fig_in[n][0] : bit'($urandom_range(0, 1));
      @(posedge clk); #1; #1;
      hist.push_back(in_bit);
      checks++; if (!v2 || !v3) failures++;
      checks++; if (s2 != {ref_sym('o561), ref_sym('o753)}) begin failures++; $display("FAIL: rate 1/2 step %0d", n); end
      checks++; if (s3 != {ref_sym('o711), ref_sym('o663), ref_sym('o557)}) begin failures++; $display("FAIL: rate 1/3 step %0d", n); end
      if (n < 10) begin
        checks++;
        if (dut2.sr != 9'(fig_sr[n])) begin failures++; $display("FAIL: sr %h expected %h", dut2.sr, fig_sr[n]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk); #1;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
