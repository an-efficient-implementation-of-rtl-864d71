// base_station: IS-95A traffic channel transceiver at the base station.
//
// Holds the station's frame timer (a chip counter over the 24576-chip frame,
// one clock per PN chip), one long code generator with the user's long code
// mask and one short code generator, shared by the forward transmitter and
// the reverse receiver.  The power control decision made from the reverse
// link strength samples is punctured into the forward link.
//
// Ports: forward information bits in (valid/ready), forward chips out, reverse
// chips in, reverse strength samples in (SAMPLES per power control group),
// decoded reverse information bits and frame statistics out.  Sharing one
// timer and one set of code generators per station is this design's choice.
module base_station
  import is95_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [41:0] lc_mask,
  input  logic [5:0]  walsh_idx,
  // forward link
  input  logic        fwd_info_valid,
  input  logic        fwd_info_bit,
  output logic        fwd_info_ready,
  output logic        fwd_chip_i,
  output logic        fwd_chip_q,
  output logic        fwd_frame_active,
  output logic        fwd_punct,
  // power control
  input  logic        rev_power_valid,
  input  logic [7:0]  rev_power,
  input  logic [17:0] pc_threshold,
  output logic        pc_valid,
  output logic        pc_bit,
  // reverse link
  input  logic        rev_chip_i,
  input  logic        fer_clear,
  output logic        rev_info_valid,
  output logic        rev_info_bit,
  output logic        rev_frame_done,
  output logic        rev_crc_ok,
  output logic [15:0] rev_frames,
  output logic [15:0] rev_frame_errors
);
  logic [CHIP_CNT_W-1:0] chip_cnt;
  logic lc_chip, pn_i, pn_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chip_cnt <= '0;
    else        chip_cnt <= (chip_cnt == CHIP_CNT_W'(CHIPS_PER_FRAME - 1)) ? '0 : chip_cnt + 1'b1;
  end

  long_code_gen  u_lc (.clk, .rst_n, .en(1'b1), .mask(lc_mask), .chip(lc_chip));
  short_code_gen u_pn (.clk, .rst_n, .en(1'b1), .pn_i(pn_i), .pn_q(pn_q));

  power_control #(.SAMPLES(16), .SW(8), .SUMW(18)) u_pcs (
    .clk, .rst_n, .sample_valid(rev_power_valid), .sample(rev_power), .threshold(pc_threshold),
    .pc_valid(pc_valid), .pc_bit(pc_bit), .count(), .sum(), .diff(), .over()
  );

  forward_tx u_ftx (
    .clk, .rst_n, .info_valid(fwd_info_valid), .info_bit(fwd_info_bit), .info_ready(fwd_info_ready),
    .walsh_idx(walsh_idx), .chip_cnt(chip_cnt), .lc_chip(lc_chip), .pn_i(pn_i), .pn_q(pn_q),
    .pc_bit(pc_bit), .chip_i(fwd_chip_i), .chip_q(fwd_chip_q), .frame_active(fwd_frame_active),
    .punct(fwd_punct)
  );

  reverse_rx u_rrx (
    .clk, .rst_n, .chip_i(rev_chip_i), .chip_cnt(chip_cnt), .lc_chip(lc_chip), .pn_i(pn_i),
    .fer_clear(fer_clear), .info_valid(rev_info_valid), .info_bit(rev_info_bit),
    .frame_done(rev_frame_done), .crc_ok(rev_crc_ok), .frames(rev_frames),
    .frame_errors(rev_frame_errors)
  );
endmodule
