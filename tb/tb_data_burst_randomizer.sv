// tb_data_burst_randomizer: drives random long code chips and a different
// frame rate in each frame, records the 14 chips b0..b13 at the end of PCG 14
// itself, and checks the PCGs sent in the following frame against a
// reference of the burst positions written out PCG by PCG:
// half rate sends PCG 2i+b_i; quarter rate keeps from each pair of half-rate
// PCGs (2j, 2j+1) the first if b_(8+j) = 0, else the second; eighth rate
// keeps from quarter-rate pairs (0,1) and (2,3) per b12 and b13.  The rate
// is applied from the frame after it is presented; frame 0 is full rate.
// Source of the expected values: the selection rule is IS-95A's; the document gives no values for it.
module tb_data_burst_randomizer;
  import is95_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic lc_chip = 0, tx_on;
  logic [3:0] pcg;
  frame_rate_e rate, frame_rate;
  data_burst_randomizer dut (.clk, .rst_n, .chip_en(1'b1), .rate, .lc_chip, .tx_on, .pcg, .frame_rate);

  frame_rate_e plan [6] = '{RATE_FULL, RATE_HALF, RATE_QUARTER, RATE_EIGHTH, RATE_HALF, RATE_EIGHTH};
  bit b [14];
  bit expect_on [16];
  int n_on;

  function automatic void ref_mask(frame_rate_e r, bit bb [14], output bit m [16]);
    int half [8];
    int quart [4];
    for (int i = 0; i < 16; i++) m[i] = 0;
    for (int i = 0; i < 8; i++) half[i] = 2 * i + int'(bb[i]);
    for (int j = 0; j < 4; j++) quart[j] = bb[8 + j] ? half[2 * j + 1] : half[2 * j];
    case (r)
      RATE_FULL:    for (int i = 0; i < 16; i++) m[i] = 1;
      RATE_HALF:    for (int i = 0; i < 8; i++) m[half[i]] = 1;
      RATE_QUARTER: for (int j = 0; j < 4; j++) m[quart[j]] = 1;
      default: begin
        m[bb[12] ? quart[1] : quart[0]] = 1;
        m[bb[13] ? quart[3] : quart[2]] = 1;
      end
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 16; i++) expect_on[i] = 1;
    rate = RATE_FULL;
    repeat (2) @(posedge clk); #1; rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      rate = (f + 1 < 6) ? plan[f + 1] : RATE_FULL;
      n_on = 0;
      for (int c = 0; c < CHIPS_PER_FRAME; c++) begin
        int p, k;
        p = c / CHIPS_PER_PCG; k = c % CHIPS_PER_PCG;
        lc_chip = 1'($urandom);
        if (p == 14 && k >= CHIPS_PER_PCG - 14) b[k - (CHIPS_PER_PCG - 14)] = lc_chip;
        #1;
        checks++;
        if (tx_on != expect_on[p]) begin failures++; $display("FAIL: frame %0d PCG %0d tx_on %0d", f, p, tx_on); end
        if (k == 0) n_on += int'(tx_on);
        @(posedge clk); #1;
      end
      checks++;
      if (n_on != ((plan[f] == RATE_FULL) ? 16 : (plan[f] == RATE_HALF) ? 8 : (plan[f] == RATE_QUARTER) ? 4 : 2)) begin
        failures++; $display("FAIL: frame %0d sent %0d PCGs", f, n_on);
      end
      ref_mask(rate, b, expect_on);
      checks++; if (frame_rate != rate) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (7 * CHIPS_PER_FRAME) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
