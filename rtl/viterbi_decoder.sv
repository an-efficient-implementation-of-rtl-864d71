// viterbi_decoder: frame Viterbi decoder with register-per-state survivors.
//
// Decodes a rate 1/N, constraint length K convolutional code frame by frame.
// Every frame is L trellis steps long and ends with K-1 zero tail bits, so it
// starts and ends in state 0 and the decoded frame is the survivor of state 0.
//
// Per step the encoder engine gives the branch symbols of all 2^(K-1) states,
// 2 * 2^(K-1) branch metric units compare them with the received symbols
// (Hamming distance, N XORs each) and one add-compare-select unit per state
// picks the better of its two incoming paths.  Three storage tables are kept:
//   - path metric memory: one metric per state,
//   - present state memory: one flag per state telling whether the state is
//     reachable (only state 0 at the start of a frame) and not pruned,
//   - survivor memory: one L-bit register per state holding that state's
//     survivor path; on each step a state copies its chosen predecessor's
//     register and appends its own input bit (register exchange), so no
//     trace back is needed.
// If PRUNE_TH is non-zero a state whose path metric exceeds it is made
// inactive (the threshold elimination the document suggests for channels
// with a known error probability); 0 disables pruning, the default.
//
// Interface: one step per in_valid cycle (in_ready is always 1): in_sym holds
// the N received hard symbols (bit 0 = c0), in_era marks erased symbols.  The
// cycle after the L-th step the decoded frame is shifted out, oldest bit
// first, one bit per cycle on out_valid/out_bit with out_last on the final
// bit; the next frame may be received meanwhile.  Decision latency: L steps
// plus L output cycles.  The structure follows the document; hard decisions,
// frame-length survivors and the erasure input are this design's choices.
module viterbi_decoder #(
  parameter int unsigned  K        = 9,
  parameter int unsigned  N        = 2,
  parameter int unsigned  L        = 192,
  parameter logic [15:0]  G0       = 16'o753,
  parameter logic [15:0]  G1       = 16'o561,
  parameter logic [15:0]  G2       = 16'o0,
  parameter int unsigned  PRUNE_TH = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] in_sym,
  input  logic [N-1:0] in_era,
  output logic         in_ready,
  output logic         out_valid,
  output logic         out_bit,
  output logic         out_last
);
  localparam int unsigned S   = 1 << (K - 1);
  localparam int          PMW = $clog2(L * N + 1);
  localparam int          BW  = $clog2(N + 1);
  localparam int          TW  = $clog2(L + 1);

  logic [N-1:0]   exp_sym    [S][2];
  logic [K-2:0]   next_state [S][2];
  logic [BW-1:0]  bm         [S][2];

  logic [PMW-1:0] pm     [S];     // path metric memory
  logic           active [S];     // present state memory
  logic [L-1:0]   surv   [S];     // survivor memory

  logic [PMW-1:0] pm_new  [S];
  logic           act_new [S];
  logic           dec     [S];

  logic [TW-1:0]  step;
  logic [L-1:0]   out_sr;
  logic [TW-1:0]  out_cnt;

  assign in_ready = 1'b1;

  vit_encoder_engine #(.K(K), .N(N), .G0(G0), .G1(G1), .G2(G2)) u_engine (
    .exp_sym(exp_sym), .next_state(next_state)
  );

  for (genvar s = 0; s < int'(S); s++) begin : g_bmu
    for (genvar b = 0; b < 2; b++) begin : g_in
      vit_bmu #(.N(N)) u_bmu (
        .rx_sym(in_sym), .rx_era(in_era), .exp_sym(exp_sym[s][b]), .bm(bm[s][b])
      );
    end
  end

  // state d is reached from p0 = {0, d[K-2:1]} and p1 = {1, d[K-2:1]} with input d[0]
  for (genvar d = 0; d < int'(S); d++) begin : g_acs
    localparam int unsigned P0 = d >> 1;
    localparam int unsigned P1 = (d >> 1) | (S >> 1);
    localparam int unsigned B  = d & 1;
    logic [PMW-1:0] pm_sel;
    logic           act_sel;
    vit_acs #(.PMW(PMW), .BW(BW)) u_acs (
      .pm_a(pm[P0]), .bm_a(bm[P0][B]), .act_a(active[P0]),
      .pm_b(pm[P1]), .bm_b(bm[P1][B]), .act_b(active[P1]),
      .pm_out(pm_sel), .act_out(act_sel), .dec(dec[d])
    );
    assign pm_new[d]  = pm_sel;
    assign act_new[d] = act_sel && (PRUNE_TH == 0 || pm_sel <= PMW'(PRUNE_TH));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        pm[d]     <= '0;
        active[d] <= (d == 0);
        surv[d]   <= '0;
      end else if (in_valid) begin
        if (step == TW'(L - 1)) begin
          pm[d]     <= '0;
          active[d] <= (d == 0);
        end else begin
          pm[d]     <= pm_new[d];
          active[d] <= act_new[d];
        end
        surv[d] <= {(dec[d] ? surv[P1][L-2:0] : surv[P0][L-2:0]), 1'(B)};
      end
    end
  end

  // survivor of state 0 after the last step, as it would be written this cycle
  logic [L-1:0] final_path;
  assign final_path = {(dec[0] ? surv[S>>1][L-2:0] : surv[0][L-2:0]), 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step      <= '0;
      out_sr    <= '0;
      out_cnt   <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid) begin
        out_sr <= {out_sr[L-2:0], 1'b0};
        if (out_cnt == TW'(L - 1)) begin
          out_valid <= 1'b0;
          out_cnt   <= '0;
        end else begin
          out_cnt <= out_cnt + 1'b1;
        end
      end
      if (in_valid) begin
        if (step == TW'(L - 1)) begin
          step      <= '0;
          out_sr    <= final_path;
          out_cnt   <= '0;
          out_valid <= 1'b1;
        end else begin
          step <= step + 1'b1;
        end
      end
    end
  end

  assign out_bit  = out_sr[L-1];
  assign out_last = out_valid && (out_cnt == TW'(L - 1));
endmodule
