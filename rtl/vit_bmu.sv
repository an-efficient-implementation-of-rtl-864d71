// vit_bmu: Viterbi branch metric unit for one branch.
//
// The branch metric is the Hamming distance between the N received hard
// symbols and the N symbols the branch would carry: the two are XORed and the
// differing bits counted.  Symbols flagged as erased (the forward link's
// punctured power control positions) are left out of the count, so they
// favour no branch.  Purely combinational.  XOR-based Hamming metrics follow
// the document; the erasure mask is this design's addition.
module vit_bmu #(
  parameter int unsigned N  = 2,
  localparam int         BW = $clog2(N + 1)
) (
  input  logic [N-1:0]  rx_sym,
  input  logic [N-1:0]  rx_era,
  input  logic [N-1:0]  exp_sym,
  output logic [BW-1:0] bm
);
  logic [N-1:0] diff;
  always_comb begin
    diff = (rx_sym ^ exp_sym) & ~rx_era;
    bm = '0;
    for (int j = 0; j < int'(N); j++) bm += BW'(diff[j]);
  end
endmodule
