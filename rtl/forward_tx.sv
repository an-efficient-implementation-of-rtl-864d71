// forward_tx: base station forward traffic channel transmitter (9600 bit/s).
//
// Chain: crc_generator (172 information bits + 12-bit CRC + 8 tail bits) ->
// rate 1/2, K = 9 convolutional encoder (384 symbols per 20 ms frame) ->
// N mod M interleaver (384 symbols, F(x) = 18x mod 385) -> long code
// scrambling with the long code decimated by 64 -> power control bit
// puncturing -> Walsh covering with the channel's 64-chip Walsh function ->
// quadrature spreading with the I and Q short PN codes.
//
// Timing: one clock is one PN chip (1.2288 Mchip/s); chip_cnt is the position
// in the 24576-chip frame and must come from the station's frame timer.  A
// modulation symbol lasts 64 chips; the next symbol is prepared on chip 63 of
// the current one, using the long code chip of that instant as its
// scrambling bit.  A frame is sent only if a whole interleaver page is ready
// when it begins; otherwise the frame carries zero symbols and frame_active
// stays low for it.  The information bits enter through a valid/ready
// handshake and are taken as fast as the interleaver has room.
//
// The order of the blocks follows IS-95A as the document lists them; the
// decimation phase, the idle frame and the handshakes are this design's.
module forward_tx
  import is95_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  info_valid,
  input  logic                  info_bit,
  output logic                  info_ready,
  input  logic [5:0]            walsh_idx,
  input  logic [CHIP_CNT_W-1:0] chip_cnt,
  input  logic                  lc_chip,
  input  logic                  pn_i,
  input  logic                  pn_q,
  input  logic                  pc_bit,
  output logic                  chip_i,
  output logic                  chip_q,
  output logic                  frame_active,
  output logic                  punct
);
  localparam int SYMS = 2 * FRAME_BITS;  // 384

  logic       f_valid, f_bit, f_ready, f_last;
  logic       e_valid, e_ready;
  logic [1:0] e_sym;
  logic       i_valid, i_ready;
  logic [0:0] i_data;

  crc_generator #(.INFO(INFO_BITS), .CRCW(CRC_BITS), .POLY(CRC12_POLY), .TAIL(TAIL_BITS)) u_crc (
    .clk, .rst_n, .in_valid(info_valid), .in_bit(info_bit), .in_ready(info_ready),
    .out_valid(f_valid), .out_bit(f_bit), .out_ready(f_ready), .frame_last(f_last)
  );

  conv_encoder #(.K(CONV_K), .N(2), .G0(G_FWD0), .G1(G_FWD1)) u_enc (
    .clk, .rst_n, .in_valid(f_valid), .in_bit(f_bit), .in_ready(f_ready),
    .out_valid(e_valid), .out_sym(e_sym), .out_ready(e_ready)
  );

  nmodm_interleaver #(.SIZE(SYMS), .N(NMODM_N), .IN_SYMS(2), .OUT_SYMS(1), .W(1)) u_intl (
    .clk, .rst_n, .in_valid(e_valid), .in_data(e_sym), .in_ready(e_ready),
    .out_valid(i_valid), .out_data(i_data), .out_ready(i_ready)
  );

  // symbol timing
  logic       sym_end;
  logic [8:0] next_sym;     // index in frame of the symbol being prepared
  logic [4:0] next_idx;     // its index in the PCG
  logic       active_n;
  logic       scr;
  logic       tx_sym;
  logic       sym_p;

  always_comb begin
    sym_end  = (chip_cnt[5:0] == 6'd63);
    next_sym = (chip_cnt[CHIP_CNT_W-1:6] == 9'(SYMS - 1)) ? 9'd0 : chip_cnt[14:6] + 9'd1;
    next_idx = 5'(next_sym % 9'd24);
    active_n = (next_sym == 9'd0) ? i_valid : frame_active;
    i_ready  = sym_end && active_n;
    scr      = (active_n ? i_data[0] : 1'b0) ^ lc_chip;
  end

  pc_puncture u_pc (
    .clk, .rst_n, .sym_strobe(sym_end), .sym_idx(next_idx), .lc_bit(lc_chip),
    .sym_in(scr), .pc_bit(pc_bit), .punct(punct), .sym_out(sym_p), .pos()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_sym       <= 1'b0;
      frame_active <= 1'b0;
    end else if (sym_end) begin
      tx_sym       <= sym_p;
      frame_active <= active_n;
    end
  end

  logic w;
  assign w      = walsh_chip(walsh_idx, chip_cnt[5:0]);
  assign chip_i = tx_sym ^ w ^ pn_i;
  assign chip_q = tx_sym ^ w ^ pn_q;
endmodule
