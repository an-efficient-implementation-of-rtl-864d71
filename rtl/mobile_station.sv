// mobile_station: IS-95A traffic channel transceiver at the mobile unit.
//
// Holds the mobile's frame timer, long code generator (the same user mask as
// the base station) and short code generator, shared by the forward receiver
// and the reverse transmitter.  Power control bits taken from the forward
// link adjust the mobile's transmit gain, brought out as tx_gain (in 1 dB
// steps) for the radio.
//
// Ports: forward chips in, decoded forward information bits and frame
// statistics out, reverse information bits in (valid/ready) with the frame
// rate for the data burst randomizer, reverse chips and tx_on out.  The
// timing is aligned to the base station's by a common reset, standing in for
// IS-95A system time.
module mobile_station
  import is95_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [41:0] lc_mask,
  input  logic [5:0]  walsh_idx,
  // forward link
  input  logic        fwd_chip_i,
  input  logic        fer_clear,
  output logic        fwd_info_valid,
  output logic        fwd_info_bit,
  output logic        fwd_frame_done,
  output logic        fwd_crc_ok,
  output logic [15:0] fwd_frames,
  output logic [15:0] fwd_frame_errors,
  // power control
  output logic        pc_valid,
  output logic        pc_bit,
  output logic [7:0]  tx_gain,
  // reverse link
  input  logic        rev_info_valid,
  input  logic        rev_info_bit,
  output logic        rev_info_ready,
  input  frame_rate_e rev_rate,
  output logic        rev_chip_i,
  output logic        rev_chip_q,
  output logic        rev_tx_on,
  output logic        rev_frame_active
);
  logic [CHIP_CNT_W-1:0] chip_cnt;
  logic lc_chip, pn_i, pn_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chip_cnt <= '0;
    else        chip_cnt <= (chip_cnt == CHIP_CNT_W'(CHIPS_PER_FRAME - 1)) ? '0 : chip_cnt + 1'b1;
  end

  long_code_gen  u_lc (.clk, .rst_n, .en(1'b1), .mask(lc_mask), .chip(lc_chip));
  short_code_gen u_pn (.clk, .rst_n, .en(1'b1), .pn_i(pn_i), .pn_q(pn_q));

  forward_rx u_frx (
    .clk, .rst_n, .chip_i(fwd_chip_i), .walsh_idx(walsh_idx), .chip_cnt(chip_cnt),
    .lc_chip(lc_chip), .pn_i(pn_i), .fer_clear(fer_clear), .pc_valid(pc_valid), .pc_bit(pc_bit),
    .info_valid(fwd_info_valid), .info_bit(fwd_info_bit), .frame_done(fwd_frame_done),
    .crc_ok(fwd_crc_ok), .frames(fwd_frames), .frame_errors(fwd_frame_errors)
  );

  mobile_power_adjust #(.GW(8), .STEP(1), .GMIN(0), .GMAX(255), .GINIT(128)) u_gain (
    .clk, .rst_n, .pc_valid(pc_valid), .pc_bit(pc_bit), .gain(tx_gain)
  );

  reverse_tx u_rtx (
    .clk, .rst_n, .info_valid(rev_info_valid), .info_bit(rev_info_bit), .info_ready(rev_info_ready),
    .rate(rev_rate), .chip_cnt(chip_cnt), .lc_chip(lc_chip), .pn_i(pn_i), .pn_q(pn_q),
    .chip_i(rev_chip_i), .chip_q(rev_chip_q), .tx_on(rev_tx_on), .frame_active(rev_frame_active),
    .pcg()
  );
endmodule
