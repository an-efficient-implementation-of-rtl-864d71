// tb_crc_generator: checks frame formatting of crc_generator.
// Reference CRC by polynomial long division: with the register preset to all
// ones, the CRC equals the remainder of the message, first 12 bits inverted
// and 12 zeros appended, divided by g(x) = x^12+x^11+x^10+x^9+x^8+x^4+x+1.
// Also checks pass-through of the information bits, the 8 zero tail bits, and
// the rate: 192 output bits in 192 cycles when the sink is always ready.
// Source of the expected values: the polynomial is IS-95A's; the document gives no CRC values to check against.
module tb_crc_generator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid, in_bit, in_ready, out_valid, out_bit, frame_last;
  crc_generator dut (.clk, .rst_n, .in_valid, .in_bit, .in_ready, .out_valid, .out_bit,
                     .out_ready(1'b1), .frame_last);
  bit msg [172];
  bit got [$];
  function automatic void ref_crc(input bit m [172], output bit crc [12]);
    bit a [184];
    bit g [13] = '{1,1,1,1,1,0,0,0,1,0,0,1,1}; // x^12 .. x^0
    for (int i = 0; i < 184; i++) a[i] = (i < 172) ? m[i] : 1'b0;
    for (int i = 0; i < 12; i++) a[i] ^= 1'b1;
    for (int i = 0; i < 172; i++)
      if (a[i]) for (int j = 0; j < 13; j++) a[i+j] ^= g[j];
    for (int i = 0; i < 12; i++) crc[i] = a[172+i];
  endfunction
  initial begin
    repeat (2) @(posedge clk); #1; rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      bit crc [12];
      int cyc;
      foreach (msg[i]) msg[i] = (f == 0) ? 1'b0 : bit'($urandom_range(0, 1));
      ref_crc(msg, crc);
      got.delete(); cyc = 0;
      for (int i = 0; i < 192; i++) begin
        in_valid = (i < 172); in_bit = (i < 172) ? msg[i] : 1'b0;
        #1;
        checks++; if (!out_valid) begin failures++; $display("FAIL: no output at %0d", i); end
        if (i < 172) begin checks++; if (!in_ready) begin failures++; $display("FAIL: not ready"); end end
        checks++; if (frame_last != (i == 191)) begin failures++; $display("FAIL: frame_last at %0d", i); end
        got.push_back(out_bit);
        @(posedge clk); #1; cyc++;
      end
      for (int i = 0; i < 172; i++) begin checks++; if (got[i] != msg[i]) failures++; end
      for (int i = 0; i < 12; i++) begin
        checks++;
        if (got[172+i] != crc[i]) begin failures++; $display("FAIL: frame %0d CRC bit %0d", f, i); end
      end
      for (int i = 0; i < 8; i++) begin checks++; if (got[184+i] != 1'b0) failures++; end
      checks++; if (cyc != 192) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); #1;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
