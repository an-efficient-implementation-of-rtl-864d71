// vit_acs: add-compare-select unit of the Viterbi decoder.
//
// Each trellis state is reached from two predecessor states.  The unit adds
// each predecessor's path metric to its branch metric, compares the two sums
// and selects the smaller; dec tells which (0 = path a, 1 = path b).  A
// predecessor that is not active (not reachable, or pruned) is never
// selected; if neither is active the result is inactive.  Ties go to path a.
// Purely combinational.  The add, compare and select follow the document; the
// activity flags are this design's way of starting every frame in state 0.
module vit_acs #(
  parameter int unsigned PMW = 10,
  parameter int unsigned BW  = 2
) (
  input  logic [PMW-1:0] pm_a,
  input  logic [BW-1:0]  bm_a,
  input  logic           act_a,
  input  logic [PMW-1:0] pm_b,
  input  logic [BW-1:0]  bm_b,
  input  logic           act_b,
  output logic [PMW-1:0] pm_out,
  output logic           act_out,
  output logic           dec
);
  logic [PMW-1:0] sum_a, sum_b;
  always_comb begin
    sum_a   = pm_a + PMW'(bm_a);
    sum_b   = pm_b + PMW'(bm_b);
    dec     = act_b && (!act_a || sum_b < sum_a);
    pm_out  = dec ? sum_b : sum_a;
    act_out = act_a || act_b;
  end
endmodule
