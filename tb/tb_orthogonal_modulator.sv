// tb_orthogonal_modulator: offers random groups of six code symbols with a
// Walsh chip strobe every 4th cycle (as on the reverse link) and checks that
// each group is taken at the end of a Walsh symbol, that the next 64 Walsh
// chips are Walsh function c0+2c1+...+32c5 (reference: parity of index AND
// chip number), and that without symbols the modulator sends index 0 and
// drops busy.  One group is taken per 64 strobes: 256 cycles per symbol.
// Source of the expected values: the index rule is IS-95A's; the document only names the block.
module tb_orthogonal_modulator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wchip_en = 0, syms_valid = 0, syms_ready, walsh_chip, busy;
  logic [5:0] syms, walsh_index;
  orthogonal_modulator dut (.clk, .rst_n, .wchip_en, .syms_valid, .syms, .syms_ready,
                            .walsh_chip, .busy, .walsh_index);
  int cyc = 0;
  initial begin
    repeat (2) @(posedge clk); #1; rst_n = 1;
    for (int s = -1; s < 12; s++) begin
      logic [5:0] cur;
      cur = walsh_index;
      for (int j = 0; j < 64; j++) begin
        for (int q = 0; q < 4; q++) begin
          wchip_en = (q == 3);
          syms_valid = (s < 10);
          if (j == 0 && q == 0) syms = 6'($urandom);
          #1;
          if (s >= 0) begin
            checks++;
            if (walsh_chip != ^(cur & 6'(j))) begin failures++; $display("FAIL: symbol %0d chip %0d", s, j); end
          end
          checks++; if (syms_ready != (j == 63 && q == 3)) failures++;
          @(posedge clk); #1; cyc++;
        end
      end
      if (s < 10) begin
        checks++; if (walsh_index != syms || !busy) begin failures++; $display("FAIL: index not loaded"); end
      end else begin
        checks++; if (walsh_index != 6'd0 || busy) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
