// tb_vit_encoder_engine: for every state and input of the rate 1/2 and rate
// 1/3 IS-95A codes, compares the engine's next state and branch symbols with
// a reference that rebuilds the encoder's 9-bit window from the state (the
// last 8 inputs) and the input, and applies the octal generators with their
// most significant bit on the newest input.
module tb_vit_encoder_engine;
  int checks = 0, failures = 0;
  logic [1:0] e2 [256][2];
  logic [7:0] n2 [256][2];
  logic [2:0] e3 [256][2];
  logic [7:0] n3 [256][2];
  vit_encoder_engine #(.K(9), .N(2), .G0(16'o753), .G1(16'o561)) dut2 (.exp_sym(e2), .next_state(n2));
  vit_encoder_engine #(.K(9), .N(3), .G0(16'o557), .G1(16'o663), .G2(16'o711)) dut3 (.exp_sym(e3), .next_state(n3));
  function automatic bit enc(int s, int b, int g);
    // u[0] newest input, u[i] the input i steps earlier (state bit i-1)
    bit r = 0;
    for (int i = 0; i < 9; i++) begin
      bit u = (i == 0) ? bit'(b) : bit'((s >> (i - 1)) & 1);
      r ^= u & bit'((g >> (8 - i)) & 1);
    end
    return r;
  endfunction
  initial begin
    #1;
    for (int s = 0; s < 256; s++)
      for (int b = 0; b < 2; b++) begin
        checks++; if (n2[s][b] != 8'(((s << 1) | b) & 255)) failures++;
        checks++; if (n3[s][b] != 8'(((s << 1) | b) & 255)) failures++;
        checks++; if (e2[s][b] != {enc(s, b, 'o561), enc(s, b, 'o753)}) failures++;
        checks++; if (e3[s][b] != {enc(s, b, 'o711), enc(s, b, 'o663), enc(s, b, 'o557)}) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
