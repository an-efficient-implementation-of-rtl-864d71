// vit_encoder_engine: the convolutional encoder replicated at the receiver.
//
// For every one of the 2^(K-1) trellis states and both input bits it computes,
// in parallel and combinationally, the next state and the N code symbols the
// encoder would emit.  The Viterbi decoder therefore needs no stored trellis
// table.  A state holds the last K-1 input bits, newest in bit 0; the next
// state for input b is {state[K-3:0], b}.  Symbols use the same rule as
// conv_encoder.  exp_sym[s][b] and next_state[s][b] are indexed by source
// state and input bit.  The engine and its purpose follow the document; the
// state numbering is this design's.
module vit_encoder_engine #(
  parameter int unsigned  K  = 9,
  parameter int unsigned  N  = 2,
  parameter logic [15:0]  G0 = 16'o753,
  parameter logic [15:0]  G1 = 16'o561,
  parameter logic [15:0]  G2 = 16'o0,
  localparam int unsigned S  = 1 << (K - 1)
) (
  output logic [N-1:0]  exp_sym    [S][2],
  output logic [K-2:0]  next_state [S][2]
);
  import is95_pkg::conv_bit;

  always_comb begin
    for (int s = 0; s < int'(S); s++) begin
      for (int b = 0; b < 2; b++) begin
        logic [K-1:0] win;
        win = {s[K-2:0], b[0]};
        next_state[s][b] = win[K-2:0];
        for (int j = 0; j < int'(N); j++)
          exp_sym[s][b][j] = conv_bit(16'(win), (j == 0) ? G0 : (j == 1) ? G1 : G2, int'(K));
      end
    end
  end
endmodule
