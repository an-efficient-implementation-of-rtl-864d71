// is95_transceiver_top: an IS-95A traffic channel link, base station and
// mobile unit side by side.
//
// The two transceivers do not share wires: each one's air interface (the
// base station's forward chips and the mobile's reverse chips, as hard
// binary chips, 0/1 for +1/-1) is brought out, and the surrounding
// environment closes the link, with or without channel errors.  Both
// stations start their frame timers at the same reset, which plays the role
// of the system time both sides of an IS-95A link are locked to.  All other
// ports are the two stations' ports with a bs_ or ms_ prefix.
// The document describes a base station and a mobile transceiver; putting
// both in one top with the air links as ports is this design's choice.
module is95_transceiver_top
  import is95_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [41:0] lc_mask,
  input  logic [5:0]  walsh_idx,
  // base station
  input  logic        bs_fwd_info_valid,
  input  logic        bs_fwd_info_bit,
  output logic        bs_fwd_info_ready,
  output logic        bs_fwd_chip_i,
  output logic        bs_fwd_chip_q,
  output logic        bs_fwd_frame_active,
  output logic        bs_fwd_punct,
  input  logic        bs_rev_power_valid,
  input  logic [7:0]  bs_rev_power,
  input  logic [17:0] bs_pc_threshold,
  output logic        bs_pc_valid,
  output logic        bs_pc_bit,
  input  logic        bs_rev_chip_i,
  input  logic        bs_fer_clear,
  output logic        bs_rev_info_valid,
  output logic        bs_rev_info_bit,
  output logic        bs_rev_frame_done,
  output logic        bs_rev_crc_ok,
  output logic [15:0] bs_rev_frames,
  output logic [15:0] bs_rev_frame_errors,
  // mobile unit
  input  logic        ms_fwd_chip_i,
  input  logic        ms_fer_clear,
  output logic        ms_fwd_info_valid,
  output logic        ms_fwd_info_bit,
  output logic        ms_fwd_frame_done,
  output logic        ms_fwd_crc_ok,
  output logic [15:0] ms_fwd_frames,
  output logic [15:0] ms_fwd_frame_errors,
  output logic        ms_pc_valid,
  output logic        ms_pc_bit,
  output logic [7:0]  ms_tx_gain,
  input  logic        ms_rev_info_valid,
  input  logic        ms_rev_info_bit,
  output logic        ms_rev_info_ready,
  input  frame_rate_e ms_rev_rate,
  output logic        ms_rev_chip_i,
  output logic        ms_rev_chip_q,
  output logic        ms_rev_tx_on,
  output logic        ms_rev_frame_active
);
  base_station u_bs (
    .clk, .rst_n, .lc_mask, .walsh_idx,
    .fwd_info_valid(bs_fwd_info_valid), .fwd_info_bit(bs_fwd_info_bit),
    .fwd_info_ready(bs_fwd_info_ready), .fwd_chip_i(bs_fwd_chip_i), .fwd_chip_q(bs_fwd_chip_q),
    .fwd_frame_active(bs_fwd_frame_active), .fwd_punct(bs_fwd_punct),
    .rev_power_valid(bs_rev_power_valid), .rev_power(bs_rev_power),
    .pc_threshold(bs_pc_threshold), .pc_valid(bs_pc_valid), .pc_bit(bs_pc_bit),
    .rev_chip_i(bs_rev_chip_i), .fer_clear(bs_fer_clear),
    .rev_info_valid(bs_rev_info_valid), .rev_info_bit(bs_rev_info_bit),
    .rev_frame_done(bs_rev_frame_done), .rev_crc_ok(bs_rev_crc_ok),
    .rev_frames(bs_rev_frames), .rev_frame_errors(bs_rev_frame_errors)
  );

  mobile_station u_ms (
    .clk, .rst_n, .lc_mask, .walsh_idx,
    .fwd_chip_i(ms_fwd_chip_i), .fer_clear(ms_fer_clear),
    .fwd_info_valid(ms_fwd_info_valid), .fwd_info_bit(ms_fwd_info_bit),
    .fwd_frame_done(ms_fwd_frame_done), .fwd_crc_ok(ms_fwd_crc_ok),
    .fwd_frames(ms_fwd_frames), .fwd_frame_errors(ms_fwd_frame_errors),
    .pc_valid(ms_pc_valid), .pc_bit(ms_pc_bit), .tx_gain(ms_tx_gain),
    .rev_info_valid(ms_rev_info_valid), .rev_info_bit(ms_rev_info_bit),
    .rev_info_ready(ms_rev_info_ready), .rev_rate(ms_rev_rate),
    .rev_chip_i(ms_rev_chip_i), .rev_chip_q(ms_rev_chip_q), .rev_tx_on(ms_rev_tx_on),
    .rev_frame_active(ms_rev_frame_active)
  );
endmodule
