// tb_nmodm_deinterleaver: feeds nmodm_deinterleaver the transmitted order of
// an N mod M interleaver (the x-th symbol is input position (18x) mod 385)
// and checks that the encoder order 1, 2, 3 ... comes back, for two pages in
// a row, and likewise for the reverse link size (576; 6 in, 3 out).
// Source of the expected values: the mapping F(x) = 18x mod 385 is the document's; the 576 size is this design's.
module tb_nmodm_deinterleaver;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [9:0] in_data; logic [19:0] out_data;
  nmodm_deinterleaver #(.SIZE(384), .N(18), .IN_SYMS(1), .OUT_SYMS(2), .W(10)) dut (
    .clk, .rst_n, .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_ready);

  logic r_in_valid = 0, r_in_ready, r_out_valid, r_out_ready = 0;
  logic [59:0] r_in_data; logic [29:0] r_out_data;
  nmodm_deinterleaver #(.SIZE(576), .N(18), .IN_SYMS(6), .OUT_SYMS(3), .W(10)) dut_r (
    .clk, .rst_n, .in_valid(r_in_valid), .in_data(r_in_data), .in_ready(r_in_ready),
    .out_valid(r_out_valid), .out_data(r_out_data), .out_ready(r_out_ready));

  initial begin
    repeat (2) @(posedge clk); #1; rst_n = 1;
    for (int pg = 0; pg < 2; pg++)
      for (int x = 1; x <= 384; x++) begin
        in_valid = 1; in_data = 10'((x * 18) % 385);
        #1; checks++; if (!in_ready) failures++;
        @(posedge clk); #1;
      end
    in_valid = 0;
    for (int pg = 0; pg < 2; pg++)
      for (int p = 1; p <= 384; p += 2) begin
        out_ready = 1; #1;
        checks++; if (!out_valid) failures++;
        checks++;
        if (out_data != {10'(p + 1), 10'(p)}) begin failures++; $display("FAIL: position %0d got %0d", p, out_data[9:0]); end
        @(posedge clk); #1;
      end
    out_ready = 0;
    for (int x = 1; x <= 576; x += 6) begin
      r_in_valid = 1;
      for (int i = 0; i < 6; i++) r_in_data[i*10 +: 10] = 10'(((x + i) * 18) % 577);
      @(posedge clk); #1;
    end
    r_in_valid = 0;
    for (int p = 1; p <= 576; p += 3) begin
      r_out_ready = 1; #1;
      checks++; if (!r_out_valid) failures++;
      checks++; if (r_out_data != {10'(p + 2), 10'(p + 1), 10'(p)}) failures++;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); #1;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
