// reverse_tx: mobile reverse traffic channel transmitter (9600 bit/s).
//
// Chain: crc_generator -> rate 1/3, K = 9 convolutional encoder (576 symbols
// per frame) -> N mod M interleaver (576 symbols, M = 577, N = 18) -> 64-ary
// orthogonal modulator (6 symbols per Walsh symbol, 96 Walsh symbols per
// frame) -> data burst randomizer gating -> long code spreading (4 PN chips
// per Walsh chip) -> quadrature spreading with the I and Q short PN codes.
//
// Timing: one clock is one PN chip; chip_cnt is the frame position from the
// station's frame timer.  A Walsh chip lasts 4 PN chips and a Walsh symbol
// 256.  As in forward_tx a frame is sent only if a whole interleaver page is
// ready at its start.  tx_on is low in the power control groups the data burst
// randomizer blanks; chips are still produced there.  The Q branch is not
// delayed by half a chip (no half-chip timing in a one-clock-per-chip
// design).  The interleaver size for rate 1/3 and the idle frame are this
// design's choices.
module reverse_tx
  import is95_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  info_valid,
  input  logic                  info_bit,
  output logic                  info_ready,
  input  frame_rate_e           rate,
  input  logic [CHIP_CNT_W-1:0] chip_cnt,
  input  logic                  lc_chip,
  input  logic                  pn_i,
  input  logic                  pn_q,
  output logic                  chip_i,
  output logic                  chip_q,
  output logic                  tx_on,
  output logic                  frame_active,
  output logic [3:0]            pcg
);
  localparam int SYMS = 3 * FRAME_BITS;  // 576

  logic       f_valid, f_bit, f_ready;
  logic       e_valid, e_ready;
  logic [2:0] e_sym;
  logic       i_valid, i_ready;
  logic [5:0] i_data;

  crc_generator #(.INFO(INFO_BITS), .CRCW(CRC_BITS), .POLY(CRC12_POLY), .TAIL(TAIL_BITS)) u_crc (
    .clk, .rst_n, .in_valid(info_valid), .in_bit(info_bit), .in_ready(info_ready),
    .out_valid(f_valid), .out_bit(f_bit), .out_ready(f_ready), .frame_last()
  );

  conv_encoder #(.K(CONV_K), .N(3), .G0(G_REV0), .G1(G_REV1), .G2(G_REV2)) u_enc (
    .clk, .rst_n, .in_valid(f_valid), .in_bit(f_bit), .in_ready(f_ready),
    .out_valid(e_valid), .out_sym(e_sym), .out_ready(e_ready)
  );

  nmodm_interleaver #(.SIZE(SYMS), .N(NMODM_N), .IN_SYMS(3), .OUT_SYMS(6), .W(1)) u_intl (
    .clk, .rst_n, .in_valid(e_valid), .in_data(e_sym), .in_ready(e_ready),
    .out_valid(i_valid), .out_data(i_data), .out_ready(i_ready)
  );

  logic wchip_en, frame_end, active_n, take, wchip;
  assign wchip_en  = (chip_cnt[1:0] == 2'd3);
  assign frame_end = (chip_cnt == CHIP_CNT_W'(CHIPS_PER_FRAME - 1));
  assign active_n  = frame_end ? i_valid : frame_active;

  orthogonal_modulator u_mod (
    .clk, .rst_n, .wchip_en(wchip_en), .syms_valid(active_n && i_valid), .syms(i_data),
    .syms_ready(take), .walsh_chip(wchip), .busy(), .walsh_index()
  );
  assign i_ready = take && active_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         frame_active <= 1'b0;
    else if (frame_end) frame_active <= i_valid;
  end

  data_burst_randomizer u_dbr (
    .clk, .rst_n, .chip_en(1'b1), .rate(rate), .lc_chip(lc_chip),
    .tx_on(tx_on), .pcg(pcg), .frame_rate()
  );

  assign chip_i = wchip ^ lc_chip ^ pn_i;
  assign chip_q = wchip ^ lc_chip ^ pn_q;
endmodule
