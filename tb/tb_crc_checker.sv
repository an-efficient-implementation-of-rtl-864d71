// tb_crc_checker: builds frames of 172 random bits, a CRC computed by
// polynomial long division (first 12 bits inverted for the all-ones preset,
// 12 zeros appended, divided by x^12+x^11+x^10+x^9+x^8+x^4+x+1) and 8 tail
// bits, optionally flips one bit, and checks crc_ok, the pass-through of the
// information bits and the frame_done pulse.  Bits arrive in bursts with
// gaps, as from the Viterbi decoder.
// Source of the expected values: the polynomial is IS-95A's; the document gives no CRC values to check against.
module tb_crc_checker;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, in_bit = 0, info_valid, info_bit, frame_done, crc_ok;
  crc_checker dut (.clk, .rst_n, .in_valid, .in_bit, .info_valid, .info_bit, .frame_done, .crc_ok);
  function automatic void ref_crc(input bit m [172], output bit crc [12]);
    bit a [184];
    bit g [13] = '{1,1,1,1,1,0,0,0,1,0,0,1,1};
    for (int i = 0; i < 184; i++) a[i] = (i < 172) ? m[i] : 1'b0;
    for (int i = 0; i < 12; i++) a[i] ^= 1'b1;
    for (int i = 0; i < 172; i++)
      if (a[i]) for (int j = 0; j < 13; j++) a[i+j] ^= g[j];
    for (int i = 0; i < 12; i++) crc[i] = a[172+i];
  endfunction
  int n_ok = 0, n_bad = 0;
  initial begin
    repeat (2) @(posedge clk); #1; rst_n = 1;
    for (int f = 0; f < 40; f++) begin
      bit m [172];
      bit crc [12];
      bit fr [192];
      int flip;
      foreach (m[i]) m[i] = 1'($urandom);
      ref_crc(m, crc);
      for (int i = 0; i < 192; i++) fr[i] = (i < 172) ? m[i] : (i < 184) ? crc[i-172] : 1'b0;
      flip = (f % 3 == 1) ? $urandom_range(0, 183) : -1;
      if (flip >= 0) fr[flip] = !fr[flip];
      for (int i = 0; i < 192; i++) begin
        in_valid = 1; in_bit = fr[i];
        #1;
        checks++; if (info_valid != (i < 172)) failures++;
        if (i < 172) begin checks++; if (info_bit != fr[i]) failures++; end
        @(posedge clk); #1;
        in_valid = 0;
        checks++; if (frame_done != (i == 191)) failures++;
        if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
      end
      checks++;
      if (crc_ok != (flip < 0)) begin failures++; $display("FAIL: frame %0d flip %0d crc_ok %0d", f, flip, crc_ok); end
      if (crc_ok) n_ok++; else n_bad++;
    end
    checks++; if (n_ok == 0 || n_bad == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
