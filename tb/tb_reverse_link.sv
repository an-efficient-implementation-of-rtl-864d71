// tb_reverse_link: reverse_tx and reverse_rx joined through a channel that
// can invert whole Walsh symbols, with the code generators and frame timer
// of a station.  Sends NF random frames; air frame a carries data frame a-1.
// Checks on the transmitter alone: I and Q chips differ by the two short
// codes; chip ^ PN ^ long code is constant over the 4 PN chips of a Walsh
// chip; each 64-chip Walsh symbol is one of the 64 Walsh functions; the
// number of PCGs with tx_on per frame follows the rate (16/8/4/2).  Checks
// on the receiver: every frame decodes to the data sent (frame 1 with two
// inverted Walsh symbols) and the frame error counter counts only the idle
// first frame.
// Source of the expected values: the expected data is what was sent; the stimulus (frames, error positions, rates) is this testbench's own choice.
module tb_reverse_link;
  import is95_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NF = 4;

  logic [CHIP_CNT_W-1:0] chip_cnt;
  logic lc_chip, pn_i, pn_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) chip_cnt <= '0;
    else chip_cnt <= (chip_cnt == CHIP_CNT_W'(CHIPS_PER_FRAME - 1)) ? '0 : chip_cnt + 1'b1;
  long_code_gen  u_lc (.clk, .rst_n, .en(1'b1), .mask(42'h3C4_81F0_2E6B), .chip(lc_chip));
  short_code_gen u_pn (.clk, .rst_n, .en(1'b1), .pn_i(pn_i), .pn_q(pn_q));

  logic info_valid, info_bit, info_ready, chip_i, chip_q, tx_on, frame_active;
  logic rx_info_valid, rx_info_bit, frame_done, crc_ok, err;
  logic [3:0] pcg;
  logic [15:0] frames, frame_errors;
  frame_rate_e rate;
  reverse_tx dut_tx (.clk, .rst_n, .info_valid, .info_bit, .info_ready, .rate, .chip_cnt, .lc_chip,
    .pn_i, .pn_q, .chip_i, .chip_q, .tx_on, .frame_active, .pcg);
  reverse_rx dut_rx (.clk, .rst_n, .chip_i(chip_i ^ err), .chip_cnt, .lc_chip, .pn_i, .fer_clear(1'b0),
    .info_valid(rx_info_valid), .info_bit(rx_info_bit), .frame_done, .crc_ok, .frames, .frame_errors);

  bit data [NF][INFO_BITS];
  int sent = 0, t = 0, air;
  frame_rate_e plan [8] = '{RATE_FULL, RATE_FULL, RATE_HALF, RATE_QUARTER, RATE_EIGHTH, RATE_FULL, RATE_FULL, RATE_FULL};
  initial foreach (data[f, i]) data[f][i] = 1'($urandom);
  assign air        = t / CHIPS_PER_FRAME;
  assign rate       = plan[(air + 1) % 8];
  assign info_valid = rst_n && sent < NF * INFO_BITS;
  assign info_bit   = (sent < NF * INFO_BITS) ? data[sent / INFO_BITS][sent % INFO_BITS] : 1'b0;
  assign err = (air == 2) && ((t % CHIPS_PER_FRAME) / 256 == 11 || (t % CHIPS_PER_FRAME) / 256 == 60);
  always_ff @(posedge clk) if (rst_n) begin
    t <= t + 1;
    if (info_valid && info_ready) sent <= sent + 1;
  end

  bit rx [INFO_BITS];
  int ri = 0, rf = 0, on = 0;
  logic wref;
  logic [63:0] wsym;
  always @(posedge clk) if (rst_n) begin
    logic d;
    checks++; if ((chip_i ^ chip_q) != (pn_i ^ pn_q)) failures++;
    d = chip_i ^ pn_i ^ lc_chip;
    if (chip_cnt[1:0] == 0) wref = d;
    else begin checks++; if (d != wref) failures++; end
    if (chip_cnt[1:0] == 3) wsym[chip_cnt[7:2]] = d;
    if (chip_cnt[7:0] == 255) begin
      bit found;
      found = 0;
      for (int i = 0; i < 64; i++) begin
        bit ok;
        ok = 1;
        for (int j = 0; j < 64; j++) if (wsym[j] != ^(6'(i) & 6'(j))) ok = 0;
        if (ok) found = 1;
      end
      checks++; if (!found) failures++;
    end
    if (chip_cnt % CHIPS_PER_PCG == 0 && tx_on) on++;
    if (chip_cnt == CHIPS_PER_FRAME - 1) begin
      int want;
      want = (plan[air % 8] == RATE_FULL) ? 16 : (plan[air % 8] == RATE_HALF) ? 8 :
             (plan[air % 8] == RATE_QUARTER) ? 4 : 2;
      checks++; if (on != want) begin failures++; $display("FAIL: air frame %0d: %0d PCGs on", air, on); end
      on = 0;
    end
    if (rx_info_valid) begin rx[ri % INFO_BITS] = rx_info_bit; ri++; end
    if (frame_done) begin
      if (rf >= 1 && rf <= NF) begin
        checks++; if (!crc_ok) begin failures++; $display("FAIL: frame %0d CRC", rf - 1); end
        for (int i = 0; i < INFO_BITS; i++) begin checks++; if (rx[i] != data[rf - 1][i]) failures++; end
      end
      rf++;
    end
  end

  initial begin
    repeat (2) @(posedge clk); #1; rst_n = 1;
    wait (rf > NF);
    repeat (3) @(posedge clk); #1;
    checks++; if (frames != 16'(rf) || frame_errors != 16'd1) begin failures++; $display("FAIL: counters %0d %0d", frames, frame_errors); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat ((NF + 3) * CHIPS_PER_FRAME) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
