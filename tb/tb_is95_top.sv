// tb_is95_top: end-to-end test of the IS-95A link at full size.
//
// The testbench closes both air links of is95_transceiver_top through a
// channel model that can invert chips, sends NF random frames in each
// direction and compares every decoded frame with what was sent.  It drives
// reverse link strength samples so that the base station's power control
// decides both "up" and "down" bits, and changes the reverse frame rate so
// the data burst randomizer gates 16, 8, 4 and 2 power control groups.
//
// Mechanisms counted (each must occur): clean frames decoded, frames whose
// channel symbol errors the Viterbi decoder corrected, frames the CRC flagged
// after heavy errors, power control puncturing, power control bits received
// in both directions, and each data burst randomizer rate.
//
// Air frame a carries data frame a-1: the first frame after reset is idle
// because the interleaver page is still being filled when it starts.
module tb_is95_top;
  import is95_pkg::*;

  localparam int NF       = 8;                 // data frames per direction
  localparam int FWD_ERR_FRAME   = 2;          // few symbol errors, corrected
  localparam int FWD_HEAVY_FRAME = 4;          // many symbol errors, CRC fails
  localparam int REV_ERR_FRAME   = 2;
  localparam int REV_HEAVY_FRAME = 4;
  localparam int AIR_FRAMES      = NF + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- DUT ----------------
  logic [41:0] lc_mask = 42'h31A_5C3E_9B27;
  logic [5:0]  walsh_idx = 6'd9;
  logic bs_fwd_info_valid, bs_fwd_info_bit, bs_fwd_info_ready;
  logic bs_fwd_chip_i, bs_fwd_chip_q, bs_fwd_frame_active, bs_fwd_punct;
  logic bs_rev_power_valid;
  logic [7:0] bs_rev_power;
  logic bs_pc_valid, bs_pc_bit;
  logic bs_rev_chip_i;
  logic bs_rev_info_valid, bs_rev_info_bit, bs_rev_frame_done, bs_rev_crc_ok;
  logic [15:0] bs_rev_frames, bs_rev_frame_errors;
  logic ms_fwd_chip_i;
  logic ms_fwd_info_valid, ms_fwd_info_bit, ms_fwd_frame_done, ms_fwd_crc_ok;
  logic [15:0] ms_fwd_frames, ms_fwd_frame_errors;
  logic ms_pc_valid, ms_pc_bit;
  logic [7:0] ms_tx_gain;
  logic ms_rev_info_valid, ms_rev_info_bit, ms_rev_info_ready;
  frame_rate_e ms_rev_rate;
  logic ms_rev_chip_i, ms_rev_chip_q, ms_rev_tx_on, ms_rev_frame_active;

  is95_transceiver_top dut (
    .clk, .rst_n, .lc_mask, .walsh_idx,
    .bs_fwd_info_valid, .bs_fwd_info_bit, .bs_fwd_info_ready, .bs_fwd_chip_i, .bs_fwd_chip_q,
    .bs_fwd_frame_active, .bs_fwd_punct, .bs_rev_power_valid, .bs_rev_power,
    .bs_pc_threshold(18'd1600), .bs_pc_valid, .bs_pc_bit, .bs_rev_chip_i, .bs_fer_clear(1'b0),
    .bs_rev_info_valid, .bs_rev_info_bit, .bs_rev_frame_done, .bs_rev_crc_ok,
    .bs_rev_frames, .bs_rev_frame_errors,
    .ms_fwd_chip_i, .ms_fer_clear(1'b0), .ms_fwd_info_valid, .ms_fwd_info_bit,
    .ms_fwd_frame_done, .ms_fwd_crc_ok, .ms_fwd_frames, .ms_fwd_frame_errors,
    .ms_pc_valid, .ms_pc_bit, .ms_tx_gain, .ms_rev_info_valid, .ms_rev_info_bit,
    .ms_rev_info_ready, .ms_rev_rate, .ms_rev_chip_i, .ms_rev_chip_q, .ms_rev_tx_on,
    .ms_rev_frame_active
  );

  // ---------------- data ----------------
  bit fwd_data [NF][INFO_BITS];
  bit rev_data [NF][INFO_BITS];
  initial begin
    for (int f = 0; f < NF; f++)
      for (int i = 0; i < INFO_BITS; i++) begin
        fwd_data[f][i] = bit'($urandom_range(0, 1));
        rev_data[f][i] = bit'($urandom_range(0, 1));
      end
  end

  // ---------------- system time seen by the testbench ----------------
  int t = 0;                       // chips since reset
  int air, chip_in_frame;
  always_comb begin
    air           = t / CHIPS_PER_FRAME;
    chip_in_frame = t % CHIPS_PER_FRAME;
  end
  always_ff @(posedge clk) if (rst_n) t <= t + 1;

  // ---------------- sources ----------------
  int fwd_sent = 0, rev_sent = 0;
  assign bs_fwd_info_valid = rst_n && fwd_sent < NF * INFO_BITS;
  assign bs_fwd_info_bit   = (fwd_sent < NF * INFO_BITS) ? fwd_data[fwd_sent / INFO_BITS][fwd_sent % INFO_BITS] : 1'b0;
  assign ms_rev_info_valid = rst_n && rev_sent < NF * INFO_BITS;
  assign ms_rev_info_bit   = (rev_sent < NF * INFO_BITS) ? rev_data[rev_sent / INFO_BITS][rev_sent % INFO_BITS] : 1'b0;
  always_ff @(posedge clk) begin
    if (bs_fwd_info_valid && bs_fwd_info_ready) fwd_sent <= fwd_sent + 1;
    if (ms_rev_info_valid && ms_rev_info_ready) rev_sent <= rev_sent + 1;
  end

  // reverse frame rate: the rate offered during air frame a is used in a+1
  frame_rate_e rate_plan [AIR_FRAMES + 2];
  initial begin
    foreach (rate_plan[a]) rate_plan[a] = RATE_FULL;
    rate_plan[5] = RATE_HALF;
    rate_plan[6] = RATE_QUARTER;
    rate_plan[7] = RATE_EIGHTH;
  end
  assign ms_rev_rate = rate_plan[(air + 1 < AIR_FRAMES + 2) ? air + 1 : AIR_FRAMES + 1];

  // strength samples: 16 per PCG, strong in every third PCG
  int pcg_abs;
  assign pcg_abs            = t / CHIPS_PER_PCG;
  assign bs_rev_power_valid = rst_n && ((t % 96) == 50);
  assign bs_rev_power       = (pcg_abs % 3 == 0) ? 8'd150 : 8'd50;

  // ---------------- channel ----------------
  // forward: invert whole modulation symbols (64 chips)
  bit fwd_flip_sym [AIR_FRAMES][384];
  bit rev_flip_wsym [AIR_FRAMES][96];
  initial begin
    for (int a = 0; a < AIR_FRAMES; a++) begin
      for (int s = 0; s < 384; s++) fwd_flip_sym[a][s] = 1'b0;
      for (int s = 0; s < 96; s++)  rev_flip_wsym[a][s] = 1'b0;
    end
    for (int k = 0; k < 6; k++)  fwd_flip_sym[FWD_ERR_FRAME + 1][k * 61 + 7] = 1'b1;
    for (int k = 0; k < 90; k++) fwd_flip_sym[FWD_HEAVY_FRAME + 1][k * 4 + 1] = 1'b1;
    rev_flip_wsym[REV_ERR_FRAME + 1][17] = 1'b1;
    rev_flip_wsym[REV_ERR_FRAME + 1][70] = 1'b1;
    for (int k = 0; k < 40; k++) rev_flip_wsym[REV_HEAVY_FRAME + 1][k * 2 + 3] = 1'b1;
  end
  logic fwd_err, rev_err;
  always_comb begin
    fwd_err = (air < AIR_FRAMES) ? fwd_flip_sym[air][chip_in_frame / 64] : 1'b0;
    rev_err = (air < AIR_FRAMES) ? rev_flip_wsym[air][chip_in_frame / 256] : 1'b0;
  end
  assign ms_fwd_chip_i = bs_fwd_chip_i ^ fwd_err;
  assign bs_rev_chip_i = ms_rev_chip_i ^ rev_err;

  // ---------------- monitors ----------------
  int n_fwd_clean = 0, n_fwd_corrected = 0, n_fwd_flagged = 0;
  int n_rev_clean = 0, n_rev_corrected = 0, n_rev_flagged = 0;
  int n_punct = 0, n_pc_up = 0, n_pc_down = 0, n_rate [4] = '{0, 0, 0, 0};

  bit fwd_rx [INFO_BITS];
  bit rev_rx [INFO_BITS];
  int fwd_i = 0, rev_i = 0, fwd_r = 0, rev_r = 0;

  function automatic bit same(bit a [INFO_BITS], bit b [INFO_BITS]);
    for (int i = 0; i < INFO_BITS; i++) if (a[i] != b[i]) return 1'b0;
    return 1'b1;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (ms_fwd_info_valid) begin
      fwd_rx[fwd_i % INFO_BITS] = ms_fwd_info_bit;
      fwd_i++;
    end
    if (ms_fwd_frame_done) begin
      if (fwd_r >= 1 && fwd_r <= NF) begin
        int d;
        d = fwd_r - 1;
        if (d == FWD_HEAVY_FRAME) begin
          check(!ms_fwd_crc_ok, $sformatf("forward frame %0d with heavy errors passed CRC", d));
          if (!ms_fwd_crc_ok) n_fwd_flagged++;
        end else begin
          check(ms_fwd_crc_ok, $sformatf("forward frame %0d failed CRC", d));
          check(same(fwd_rx, fwd_data[d]), $sformatf("forward frame %0d data mismatch", d));
          if (ms_fwd_crc_ok && same(fwd_rx, fwd_data[d])) begin
            if (d == FWD_ERR_FRAME) n_fwd_corrected++; else n_fwd_clean++;
          end
        end
      end
      fwd_r++;
    end
    if (bs_rev_info_valid) begin
      rev_rx[rev_i % INFO_BITS] = bs_rev_info_bit;
      rev_i++;
    end
    if (bs_rev_frame_done) begin
      if (rev_r >= 1 && rev_r <= NF) begin
        int d;
        d = rev_r - 1;
        if (d == REV_HEAVY_FRAME) begin
          check(!bs_rev_crc_ok, $sformatf("reverse frame %0d with heavy errors passed CRC", d));
          if (!bs_rev_crc_ok) n_rev_flagged++;
        end else begin
          check(bs_rev_crc_ok, $sformatf("reverse frame %0d failed CRC", d));
          check(same(rev_rx, rev_data[d]), $sformatf("reverse frame %0d data mismatch", d));
          if (bs_rev_crc_ok && same(rev_rx, rev_data[d])) begin
            if (d == REV_ERR_FRAME) n_rev_corrected++; else n_rev_clean++;
          end
        end
      end
      rev_r++;
    end
  end

  // power control: the bit decided in PCG j is received in PCG j+1
  bit pc_expect [$];
  int gain_model = 128;
  initial pc_expect.push_back(1'b0);
  always @(posedge clk) if (rst_n) begin
    if (bs_fwd_punct && (t % 64) == 63) n_punct++;
    if (bs_pc_valid) pc_expect.push_back(bs_pc_bit);
    if (ms_pc_valid) begin
      bit e;
      e = (pc_expect.size() > 0) ? pc_expect.pop_front() : 1'b0;
      // frames with injected symbol errors may invert the bit itself
      if (air != FWD_ERR_FRAME + 1 && air != FWD_HEAVY_FRAME + 1)
        check(ms_pc_bit == e, $sformatf("power control bit %0d received, %0d sent", ms_pc_bit, e));
      if (ms_pc_bit) begin n_pc_down++; gain_model--; end
      else           begin n_pc_up++;   gain_model++; end
    end
  end

  // data burst randomizer: PCGs sent per air frame, by the rate of that frame
  int on_pcgs = 0;
  always @(posedge clk) if (rst_n) begin
    if (t % CHIPS_PER_PCG == 0 && ms_rev_tx_on) on_pcgs++;
    if (chip_in_frame == CHIPS_PER_FRAME - 1) begin
      if (air >= 1) begin
        frame_rate_e r;
        int want;
        r = rate_plan[air];
        want = (r == RATE_FULL) ? 16 : (r == RATE_HALF) ? 8 : (r == RATE_QUARTER) ? 4 : 2;
        check(on_pcgs == want, $sformatf("air frame %0d: %0d PCGs sent, %0d expected", air, on_pcgs, want));
        if (on_pcgs == want) n_rate[int'(r)]++;
      end
      on_pcgs = 0;
    end
  end

  // ---------------- run ----------------
  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (fwd_r > NF && rev_r > NF);
    repeat (10) @(posedge clk);
    check(ms_tx_gain == 8'(gain_model), "mobile transmit gain follows the power control bits");
    check(ms_fwd_frames == 16'(fwd_r), "forward frame counter");
    check(ms_fwd_frame_errors == 16'd2, "forward frame errors: idle frame and heavy-error frame");
    check(bs_rev_frames == 16'(rev_r), "reverse frame counter");
    check(bs_rev_frame_errors == 16'd2, "reverse frame errors: idle frame and heavy-error frame");
    // every mechanism must have happened
    check(n_fwd_clean > 0,     "clean forward frames decoded");
    check(n_fwd_corrected > 0, "forward symbol errors corrected by the Viterbi decoder");
    check(n_fwd_flagged > 0,   "forward CRC flagged a bad frame");
    check(n_rev_clean > 0,     "clean reverse frames decoded");
    check(n_rev_corrected > 0, "reverse symbol errors corrected by the Viterbi decoder");
    check(n_rev_flagged > 0,   "reverse CRC flagged a bad frame");
    check(n_punct > 0,         "power control bits punctured");
    check(n_pc_up > 0,         "power up commands");
    check(n_pc_down > 0,       "power down commands");
    for (int r = 0; r < 4; r++) check(n_rate[r] > 0, $sformatf("data burst randomizer rate %0d", r));
    $display("fwd clean=%0d corrected=%0d flagged=%0d rev clean=%0d corrected=%0d flagged=%0d",
             n_fwd_clean, n_fwd_corrected, n_fwd_flagged, n_rev_clean, n_rev_corrected, n_rev_flagged);
    $display("punctured symbols=%0d pc up=%0d down=%0d rates=%0d/%0d/%0d/%0d gain=%0d",
             n_punct, n_pc_up, n_pc_down, n_rate[0], n_rate[1], n_rate[2], n_rate[3], ms_tx_gain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((AIR_FRAMES + 2) * CHIPS_PER_FRAME) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
