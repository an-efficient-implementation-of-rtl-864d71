// reverse_rx: base station reverse traffic channel receiver (9600 bit/s).
//
// Chain: I-channel PN and long code despreading -> majority of the 4 PN chips
// of each Walsh chip -> orthogonal demodulator (64-way hard correlation,
// 6 code symbols per Walsh symbol) -> N mod M deinterleaver (576 symbols) ->
// rate 1/3, K = 9 Viterbi decoder -> CRC check -> frame error counting.
//
// The receiver shares the transmitter's chip timing (chip_cnt, long and short
// codes aligned to system time, no channel delay).  Decoded bits appear on
// info_valid/info_bit; frame_done/crc_ok end each frame; frames and
// frame_errors count them.  The despreading and demodulation details are this
// design's; the document names the receiver's deinterleaver, Viterbi decoder
// and CRC error detector.
module reverse_rx
  import is95_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  chip_i,
  input  logic [CHIP_CNT_W-1:0] chip_cnt,
  input  logic                  lc_chip,
  input  logic                  pn_i,
  input  logic                  fer_clear,
  output logic                  info_valid,
  output logic                  info_bit,
  output logic                  frame_done,
  output logic                  crc_ok,
  output logic [15:0]           frames,
  output logic [15:0]           frame_errors
);
  localparam int SYMS = 3 * FRAME_BITS;

  logic [2:0] acc, ones;
  logic       v, wchip_en;

  always_comb begin
    v        = chip_i ^ pn_i ^ lc_chip;
    ones     = acc + 3'(v);
    wchip_en = (chip_cnt[1:0] == 2'd3);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        acc <= '0;
    else if (wchip_en) acc <= '0;
    else               acc <= ones;
  end

  logic       s_valid;
  logic [5:0] s_syms;
  orthogonal_demodulator u_demod (
    .clk, .rst_n, .wchip_en(wchip_en), .wchip(ones >= 3'd2), .chip_idx(chip_cnt[7:2]),
    .syms_valid(s_valid), .syms(s_syms)
  );

  logic       d_valid;
  logic [2:0] d_out;
  nmodm_deinterleaver #(.SIZE(SYMS), .N(NMODM_N), .IN_SYMS(6), .OUT_SYMS(3), .W(1)) u_deint (
    .clk, .rst_n, .in_valid(s_valid), .in_data(s_syms), .in_ready(),
    .out_valid(d_valid), .out_data(d_out), .out_ready(1'b1)
  );

  logic v_valid, v_bit;
  viterbi_decoder #(.K(CONV_K), .N(3), .L(FRAME_BITS), .G0(G_REV0), .G1(G_REV1), .G2(G_REV2)) u_vit (
    .clk, .rst_n, .in_valid(d_valid), .in_sym(d_out), .in_era(3'b000),
    .in_ready(), .out_valid(v_valid), .out_bit(v_bit), .out_last()
  );

  crc_checker #(.INFO(INFO_BITS), .CRCW(CRC_BITS), .POLY(CRC12_POLY), .TAIL(TAIL_BITS)) u_crc (
    .clk, .rst_n, .in_valid(v_valid), .in_bit(v_bit), .info_valid(info_valid),
    .info_bit(info_bit), .frame_done(frame_done), .crc_ok(crc_ok)
  );

  fer_detector #(.CNT_W(16)) u_fer (
    .clk, .rst_n, .clear(fer_clear), .frame_done(frame_done), .crc_ok(crc_ok),
    .frames(frames), .frame_errors(frame_errors)
  );
endmodule
