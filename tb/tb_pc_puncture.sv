// tb_pc_puncture: steps through PCGs of 24 symbols with random long code
// bits, random data and a random power control bit per PCG, and checks that
// exactly the two symbols starting at the position given by the previous
// PCG's bits 23 (MSB), 22, 21, 20 are replaced by that PCG's power control
// bit, and all other symbols pass unchanged.  The first PCG uses position 0.
// Source of the expected values: the position rule is IS-95A's; the document only names power control.
module tb_pc_puncture;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic sym_strobe = 0, lc_bit = 0, sym_in = 0, pc_bit = 0, punct, sym_out;
  logic [4:0] sym_idx = 0;
  logic [3:0] pos;
  pc_puncture dut (.clk, .rst_n, .sym_strobe, .sym_idx, .lc_bit, .sym_in, .pc_bit, .punct, .sym_out, .pos);
  int start;
  int seen [16];
  initial begin
    start = 0;
    foreach (seen[i]) seen[i] = 0;
    repeat (2) @(posedge clk); #1; rst_n = 1;
    for (int g = 0; g < 200; g++) begin
      bit pcb;
      bit lcb [24];
      pcb = 1'($urandom);
      for (int k = 0; k < 24; k++) begin
        sym_strobe = 1; sym_idx = 5'(k); lc_bit = 1'($urandom); lcb[k] = lc_bit;
        sym_in = 1'($urandom); pc_bit = (k == 0) ? pcb : 1'($urandom);
        #1;
        checks++;
        if (punct != (k == start || k == start + 1)) begin failures++; $display("FAIL: PCG %0d symbol %0d", g, k); end
        checks++;
        if (sym_out != ((k == start || k == start + 1) ? pcb : sym_in)) failures++;
        @(posedge clk); #1;
        // symbols arrive one per 3 cycles
        sym_strobe = 0;
        repeat (2) @(posedge clk); #1;
      end
      seen[start]++;
      start = 8 * lcb[23] + 4 * lcb[22] + 2 * lcb[21] + lcb[20];
    end
    foreach (seen[i]) begin checks++; if (seen[i] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
