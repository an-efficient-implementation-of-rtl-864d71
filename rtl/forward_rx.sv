// forward_rx: mobile forward traffic channel receiver (9600 bit/s).
//
// Chain: I-channel PN despreading -> Walsh correlation over the 64 chips of a
// symbol with a majority decision -> power control bit extraction -> long
// code descrambling -> N mod M deinterleaver -> rate 1/2, K = 9 Viterbi
// decoder -> CRC check -> frame error counting.
//
// The receiver runs on the same chip timing as the transmitter (chip_cnt,
// long code and short code aligned to system time, no channel delay).  The
// symbol of chips k*64..k*64+63 is decided on chip 63 and descrambled with
// the long code chip latched at the end of the previous symbol, the bit the
// transmitter used.  The two symbols that carry the power control bit are
// recognised with the same position rule as the transmitter; the first gives
// pc_bit (pulse pc_valid), and both enter the deinterleaver flagged as
// erasures so the decoder ignores them.  Decoded information bits appear on
// info_valid/info_bit, frame_done/crc_ok end each frame, frames and
// frame_errors count them.  Hard decisions throughout; the erasure handling
// is this design's choice.
module forward_rx
  import is95_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  chip_i,
  input  logic [5:0]            walsh_idx,
  input  logic [CHIP_CNT_W-1:0] chip_cnt,
  input  logic                  lc_chip,
  input  logic                  pn_i,
  input  logic                  fer_clear,
  output logic                  pc_valid,
  output logic                  pc_bit,
  output logic                  info_valid,
  output logic                  info_bit,
  output logic                  frame_done,
  output logic                  crc_ok,
  output logic [15:0]           frames,
  output logic [15:0]           frame_errors
);
  localparam int SYMS = 2 * FRAME_BITS;

  logic       sym_end;
  logic [6:0] acc, ones;
  logic       v, sym;
  logic       lc_lat;
  logic [4:0] sym_idx;
  logic       punct;
  logic [3:0] pos;

  always_comb begin
    sym_end = (chip_cnt[5:0] == 6'd63);
    v       = chip_i ^ pn_i ^ walsh_chip(walsh_idx, chip_cnt[5:0]);
    ones    = acc + 7'(v);
    sym     = ones > 7'd32;
    sym_idx = 5'(chip_cnt[14:6] % 9'd24);
  end

  pc_puncture u_pc (
    .clk, .rst_n, .sym_strobe(sym_end), .sym_idx(sym_idx), .lc_bit(lc_lat),
    .sym_in(1'b0), .pc_bit(1'b0), .punct(punct), .sym_out(), .pos(pos)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      lc_lat   <= 1'b0;
      pc_valid <= 1'b0;
      pc_bit   <= 1'b0;
    end else begin
      pc_valid <= 1'b0;
      if (sym_end) begin
        acc    <= '0;
        lc_lat <= lc_chip;
        if (punct && sym_idx == {1'b0, pos}) begin
          pc_valid <= 1'b1;
          pc_bit   <= sym;
        end
      end else begin
        acc <= ones;
      end
    end
  end

  // deinterleaver entries are {erasure, symbol}
  logic [1:0] d_in;
  logic       d_valid;
  logic [3:0] d_out;
  assign d_in = punct ? 2'b10 : {1'b0, sym ^ lc_lat};

  nmodm_deinterleaver #(.SIZE(SYMS), .N(NMODM_N), .IN_SYMS(1), .OUT_SYMS(2), .W(2)) u_deint (
    .clk, .rst_n, .in_valid(sym_end), .in_data(d_in), .in_ready(),
    .out_valid(d_valid), .out_data(d_out), .out_ready(1'b1)
  );

  logic v_valid, v_bit;
  viterbi_decoder #(.K(CONV_K), .N(2), .L(FRAME_BITS), .G0(G_FWD0), .G1(G_FWD1)) u_vit (
    .clk, .rst_n, .in_valid(d_valid), .in_sym({d_out[2], d_out[0]}), .in_era({d_out[3], d_out[1]}),
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
