// tb_viterbi_decoder: encodes random 192-bit frames (184 data bits + 8 zero
// tail bits) with a reference encoder for the rate 1/2 and rate 1/3 IS-95A
// codes, adds channel errors and erasures, and checks the decoded frames.
//   frame 0: no errors
//   frames 1..: 4-8 random symbol errors spread over the frame, and for
//               rate 1/2 also 16 erased symbols
//   one frame with a threshold-pruning decoder (PRUNE_TH = 20)
// Every frame must decode exactly.  Latency: the first decoded bit must come
// the cycle after the 192nd step, and a frame takes 192 output cycles.
module tb_viterbi_decoder;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int L = 192;
  logic v_in = 0;
  logic [1:0] s2 = 0, e2 = 0;
  logic [2:0] s3 = 0;
  logic o2, b2, l2, o3, b3, l3, op, bp, lp, r2, r3, rp;
  viterbi_decoder #(.K(9), .N(2), .L(L)) dut2 (
    .clk, .rst_n, .in_valid(v_in), .in_sym(s2), .in_era(e2), .in_ready(r2),
    .out_valid(o2), .out_bit(b2), .out_last(l2));
  viterbi_decoder #(.K(9), .N(3), .L(L), .G0(16'o557), .G1(16'o663), .G2(16'o711)) dut3 (
    .clk, .rst_n, .in_valid(v_in), .in_sym(s3), .in_era(3'b000), .in_ready(r3),
    .out_valid(o3), .out_bit(b3), .out_last(l3));
  viterbi_decoder #(.K(9), .N(2), .L(L), .PRUNE_TH(20)) dutp (
    .clk, .rst_n, .in_valid(v_in), .in_sym(s2), .in_era(e2), .in_ready(rp),
    .out_valid(op), .out_bit(bp), .out_last(lp));

  function automatic bit enc(bit u [L], int n, int g);
    bit r = 0;
    for (int i = 0; i < 9; i++)
      if (n - i >= 0) r ^= u[n - i] & bit'((g >> (8 - i)) & 1);
    return r;
  endfunction

  localparam int NF = 6;
  bit data [NF][L];
  bit got2 [$];
  bit got3 [$];
  bit gotp [$];
  int first_out = -1, cyc = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (o2) got2.push_back(b2);
    if (o3) got3.push_back(b3);
    if (op) gotp.push_back(bp);
    if (o2 && first_out < 0) first_out = cyc;
  end

  initial begin
    for (int f = 0; f < NF; f++)
      for (int i = 0; i < L; i++) data[f][i] = (i < L - 8) ? 1'($urandom) : 1'b0;
    repeat (2) @(posedge clk); #1; rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      bit err2 [L][2];
      bit er2 [L][2];
      bit err3 [L][3];
      for (int n = 0; n < L; n++) begin
        err2[n] = '{0, 0}; er2[n] = '{0, 0}; err3[n] = '{0, 0, 0};
      end
      if (f > 0) begin
        int ne;
        ne = $urandom_range(4, 8);
        for (int k = 0; k < ne; k++) begin
          int p;
          p = k * (L / ne) + $urandom_range(0, 5);
          err2[p][$urandom_range(0, 1)] = 1;
          err3[p][$urandom_range(0, 2)] = 1;
        end
        for (int k = 0; k < 16; k++) er2[k * 12 + 6][k % 2] = 1;
      end
      for (int n = 0; n < L; n++) begin
        v_in = 1;
        s2[0] = enc(data[f], n, 'o753) ^ err2[n][0] ^ er2[n][0];
        s2[1] = enc(data[f], n, 'o561) ^ err2[n][1] ^ er2[n][1];
        e2    = {er2[n][1], er2[n][0]};
        s3[0] = enc(data[f], n, 'o557) ^ err3[n][0];
        s3[1] = enc(data[f], n, 'o663) ^ err3[n][1];
        s3[2] = enc(data[f], n, 'o711) ^ err3[n][2];
        #1; checks++; if (!r2 || !r3 || !rp) failures++;
        @(posedge clk); #1;
      end
      v_in = 0;
      repeat (5) @(posedge clk); #1;
    end
    repeat (L + 5) @(posedge clk); #1;
    checks++; if (first_out != L + 1) begin failures++; $display("FAIL: first output at cycle %0d", first_out); end
    checks++; if (got2.size() != NF * L || got3.size() != NF * L || gotp.size() != NF * L) begin
      failures++; $display("FAIL: %0d %0d %0d bits decoded", got2.size(), got3.size(), gotp.size());
    end
    for (int f = 0; f < NF; f++) begin
      int e2c, e3c, epc;
      e2c = 0; e3c = 0; epc = 0;
      for (int i = 0; i < L; i++) begin
        if (f * L + i < got2.size() && got2[f * L + i] != data[f][i]) e2c++;
        if (f * L + i < got3.size() && got3[f * L + i] != data[f][i]) e3c++;
        if (f * L + i < gotp.size() && gotp[f * L + i] != data[f][i]) epc++;
      end
      checks++; if (e2c != 0) begin failures++; $display("FAIL: rate 1/2 frame %0d: %0d bit errors", f, e2c); end
      checks++; if (e3c != 0) begin failures++; $display("FAIL: rate 1/3 frame %0d: %0d bit errors", f, e3c); end
      checks++; if (epc != 0) begin failures++; $display("FAIL: pruned frame %0d: %0d bit errors", f, epc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (NF * (L + 10) + 2 * L + 100) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
