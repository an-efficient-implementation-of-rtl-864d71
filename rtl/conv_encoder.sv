// conv_encoder: rate 1/N, constraint length K convolutional encoder.
//
// A K-bit shift register takes each new bit into its least significant
// position and shifts the older bits up (the waveform of the document shows
// this register as 001, 002, 004, 008, 011, 022 ... for K = 9).  Each of the
// N code symbols is the parity of the register masked by a generator
// polynomial.  Defaults are the IS-95A forward link code (K = 9, rate 1/2,
// g0 = 753, g1 = 561 octal); the reverse link uses N = 3 with 557, 663, 711.
//
// Interface: one input bit per valid/ready transfer gives one output word of
// N symbols, out_sym[0] = c0 first in transmission order.  The output is
// registered: one cycle of latency, one bit per clock throughput.  The
// encoder is not reset between frames: the 8 zero tail bits of each frame
// return it to state 0.
module conv_encoder #(
  parameter int unsigned  K  = 9,
  parameter int unsigned  N  = 2,
  parameter logic [15:0]  G0 = 16'o753,
  parameter logic [15:0]  G1 = 16'o561,
  parameter logic [15:0]  G2 = 16'o0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_bit,
  output logic         in_ready,
  output logic         out_valid,
  output logic [N-1:0] out_sym,
  input  logic         out_ready
);
  import is95_pkg::*;

  logic [K-1:0]  sr;
  logic [K-1:0]  sr_next;
  logic [15:0]   win;
  logic [N-1:0]  sym_next;

  assign in_ready = !out_valid || out_ready;

  always_comb begin
    sr_next = {sr[K-2:0], in_bit};
    win = 16'(sr_next);
    for (int j = 0; j < int'(N); j++) begin
      sym_next[j] = conv_bit(win, (j == 0) ? G0 : (j == 1) ? G1 : G2, int'(K));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr        <= '0;
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        sr        <= sr_next;
        out_sym   <= sym_next;
        out_valid <= 1'b1;
      end
    end
  end
endmodule
