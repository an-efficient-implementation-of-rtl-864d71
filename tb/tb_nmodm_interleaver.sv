// tb_nmodm_interleaver: checks the N mod M permutation of nmodm_interleaver.
// Each entry carries its own input position (W = 10), so the output shows
// which input position each output position reads.  Expected: output x reads
// input (18x) mod 385 (output 10 reads input 180), for three pages in a row
// (both pages, alternately).  The separations in the output of input bits
// 1, 2 and 3 apart are measured and compared with the distances of the
// document's comparison table (106, 170, 63).  The reverse link size
// (576, M = 577, 3 symbols in, 6 out) is checked the same way.
module tb_nmodm_interleaver;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [19:0] in_data; logic [9:0] out_data;
  nmodm_interleaver #(.SIZE(384), .N(18), .IN_SYMS(2), .OUT_SYMS(1), .W(10)) dut (
    .clk, .rst_n, .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_ready);

  logic r_in_valid = 0, r_in_ready, r_out_valid, r_out_ready = 0;
  logic [29:0] r_in_data; logic [59:0] r_out_data;
  nmodm_interleaver #(.SIZE(576), .N(18), .IN_SYMS(3), .OUT_SYMS(6), .W(10)) dut_r (
    .clk, .rst_n, .in_valid(r_in_valid), .in_data(r_in_data), .in_ready(r_in_ready),
    .out_valid(r_out_valid), .out_data(r_out_data), .out_ready(r_out_ready));

  int outpos [385];
  initial begin
    repeat (2) @(posedge clk); #1; rst_n = 1;
    // page 0 and page 1 written back to back; the third write must wait
    for (int pg = 0; pg < 2; pg++)
      for (int p = 1; p <= 384; p += 2) begin
        in_valid = 1; in_data = {10'(p + 1), 10'(p)};
        #1; checks++; if (!in_ready) failures++;
        @(posedge clk); #1;
      end
    in_valid = 1; #1; checks++; if (in_ready) begin failures++; $display("FAIL: third page accepted"); end
    in_valid = 0;
    for (int pg = 0; pg < 2; pg++) begin
      for (int x = 1; x <= 384; x++) begin
        out_ready = 1; #1;
        checks++; if (!out_valid) failures++;
        checks++;
        if (out_data != 10'((x * 18) % 385)) begin
          failures++; $display("FAIL: out %0d read %0d", x, out_data);
        end
        if (x == 10) begin checks++; if (out_data != 10'd180) failures++; end
        outpos[out_data] = x;
        @(posedge clk); #1;
      end
    end
    out_ready = 0;
    // table 1 distances: smallest output separation (minus one) of inputs k apart
    begin
      int want [3] = '{106, 170, 63};
      for (int k = 1; k <= 3; k++) begin
        int mn;
        mn = 1000;
        for (int p = 1; p + k <= 384; p++) begin
          int d;
          d = outpos[p + k] - outpos[p];
          if (d < 0) d = -d;
          if (d - 1 < mn) mn = d - 1;
        end
        checks++;
        if (mn != want[k-1]) begin failures++; $display("FAIL: distance %0d is %0d", k, mn); end
        else $display("distance %0d = %0d", k, mn);
      end
    end
    // reverse link size
    for (int p = 1; p <= 576; p += 3) begin
      r_in_valid = 1; r_in_data = {10'(p + 2), 10'(p + 1), 10'(p)};
      @(posedge clk); #1;
    end
    r_in_valid = 0;
    for (int x = 1; x <= 576; x += 6) begin
      r_out_ready = 1; #1;
      checks++; if (!r_out_valid) failures++;
      for (int i = 0; i < 6; i++) begin
        checks++;
        if (r_out_data[i*10 +: 10] != 10'(((x + i) * 18) % 577)) failures++;
      end
      @(posedge clk); #1;
    end
    r_out_ready = 0; #1;
    checks++; if (r_out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); #1;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
