// tb_forward_link: forward_tx and forward_rx joined through a channel that
// can invert whole symbols, with the code generators and frame timer of a
// station.  Sends NF random frames; air frame a carries data frame a-1.
// Checks on the transmitter alone: the I and Q chips differ exactly by the
// two short codes; within each 64-chip symbol, chip ^ PN ^ Walsh is
// constant (one symbol per Walsh period); two symbols of every power control
// group are punctured.  Checks on the receiver: every frame decodes to the
// data sent (frame 1 with 6 inverted symbols), the received power control
// bits equal the ones sent, and the frame error counter counts only the idle
// first frame.
// Source of the expected values: the expected data is what was sent; the stimulus (frames, error positions) is this testbench's own choice.
module tb_forward_link;
  import is95_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NF = 3;

  logic [CHIP_CNT_W-1:0] chip_cnt;
  logic lc_chip, pn_i, pn_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) chip_cnt <= '0;
    else chip_cnt <= (chip_cnt == CHIP_CNT_W'(CHIPS_PER_FRAME - 1)) ? '0 : chip_cnt + 1'b1;
  long_code_gen  u_lc (.clk, .rst_n, .en(1'b1), .mask(42'h25F_0A3C_1D77), .chip(lc_chip));
  short_code_gen u_pn (.clk, .rst_n, .en(1'b1), .pn_i(pn_i), .pn_q(pn_q));

  logic info_valid, info_bit, info_ready, chip_i, chip_q, frame_active, punct, pc_bit;
  logic pc_valid_rx, pc_bit_rx, rx_info_valid, rx_info_bit, frame_done, crc_ok;
  logic [15:0] frames, frame_errors;
  logic err;
  forward_tx dut_tx (.clk, .rst_n, .info_valid, .info_bit, .info_ready, .walsh_idx(6'd21),
    .chip_cnt, .lc_chip, .pn_i, .pn_q, .pc_bit, .chip_i, .chip_q, .frame_active, .punct);
  forward_rx dut_rx (.clk, .rst_n, .chip_i(chip_i ^ err), .walsh_idx(6'd21), .chip_cnt, .lc_chip, .pn_i,
    .fer_clear(1'b0), .pc_valid(pc_valid_rx), .pc_bit(pc_bit_rx), .info_valid(rx_info_valid),
    .info_bit(rx_info_bit), .frame_done, .crc_ok, .frames, .frame_errors);

  bit data [NF][INFO_BITS];
  int sent = 0, t = 0;
  initial foreach (data[f, i]) data[f][i] = 1'($urandom);
  assign info_valid = rst_n && sent < NF * INFO_BITS;
  assign info_bit   = (sent < NF * INFO_BITS) ? data[sent / INFO_BITS][sent % INFO_BITS] : 1'b0;
  // power control bit changes every PCG
  assign pc_bit = ((t / CHIPS_PER_PCG) * 7 % 5) > 1;
  assign err = (t / CHIPS_PER_FRAME == 2) && ((t % CHIPS_PER_FRAME) / 64) % 61 == 5;
  always_ff @(posedge clk) if (rst_n) begin
    t <= t + 1;
    if (info_valid && info_ready) sent <= sent + 1;
  end

  bit rx [INFO_BITS];
  int ri = 0, rf = 0, npunct = 0, pcg_punct = 0;
  bit pc_q [$];
  logic sym_ref;
  initial pc_q.push_back(1'b0);
  always @(posedge clk) if (rst_n) begin
    logic d;
    checks++; if ((chip_i ^ chip_q) != (pn_i ^ pn_q)) failures++;
    d = chip_i ^ pn_i ^ walsh_chip(6'd21, chip_cnt[5:0]);
    if (chip_cnt[5:0] == 0) sym_ref = d;
    else begin checks++; if (d != sym_ref) failures++; end
    if (chip_cnt[5:0] == 63 && punct) pcg_punct++;
    if (chip_cnt % CHIPS_PER_PCG == CHIPS_PER_PCG - 1) begin
      // puncturing decided on the last chip of each PCG belongs to the next
      pc_q.push_back(pc_bit);
    end
    if (chip_cnt % CHIPS_PER_PCG == CHIPS_PER_PCG - 2) begin
      if (t > CHIPS_PER_PCG) checks++;
      if (t > CHIPS_PER_PCG && pcg_punct != 2) begin failures++; $display("FAIL: %0d punctured in PCG", pcg_punct); end
      pcg_punct = (punct && chip_cnt[5:0] == 63) ? 1 : 0;
    end
    if (pc_valid_rx) begin
      bit e;
      e = pc_q.pop_front();
      checks++; if (pc_bit_rx != e) begin failures++; $display("FAIL: pc bit"); end
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
