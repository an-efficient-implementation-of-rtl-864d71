// tb_station_link: a base_station and a mobile_station joined by an
// error-free air link.  Two random frames go each way; both must decode
// exactly, both stations' frame error counters must show only the idle first
// frame, every power control bit the base station decides must reach the
// mobile one group later, and the mobile's gain must move by one step per
// received bit.
// Source of the expected values: the expected data is what was sent; the stimulus is this testbench's own choice.
module tb_station_link;
  import is95_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NF = 2;
  localparam logic [41:0] MASK = 42'h30F_1234_ABCD;

  logic f_iv, f_ib, f_ir, f_ci, f_cq, f_act, f_pun, p_v, p_b, r_ci, r_iv, r_ib, r_fd, r_ok;
  logic [15:0] r_fr, r_fe, m_fr, m_fe;
  logic m_iv, m_ib, m_fd, m_ok, m_pv, m_pb, m_riv, m_rib, m_rir, m_rci, m_rcq, m_on, m_act;
  logic [7:0] gain, power;
  logic pw_v;
  int t = 0;
  base_station bs (.clk, .rst_n, .lc_mask(MASK), .walsh_idx(6'd12),
    .fwd_info_valid(f_iv), .fwd_info_bit(f_ib), .fwd_info_ready(f_ir), .fwd_chip_i(f_ci),
    .fwd_chip_q(f_cq), .fwd_frame_active(f_act), .fwd_punct(f_pun),
    .rev_power_valid(pw_v), .rev_power(power), .pc_threshold(18'd1600), .pc_valid(p_v), .pc_bit(p_b),
    .rev_chip_i(m_rci), .fer_clear(1'b0), .rev_info_valid(r_iv), .rev_info_bit(r_ib),
    .rev_frame_done(r_fd), .rev_crc_ok(r_ok), .rev_frames(r_fr), .rev_frame_errors(r_fe));
  mobile_station ms (.clk, .rst_n, .lc_mask(MASK), .walsh_idx(6'd12),
    .fwd_chip_i(f_ci), .fer_clear(1'b0), .fwd_info_valid(m_iv), .fwd_info_bit(m_ib),
    .fwd_frame_done(m_fd), .fwd_crc_ok(m_ok), .fwd_frames(m_fr), .fwd_frame_errors(m_fe),
    .pc_valid(m_pv), .pc_bit(m_pb), .tx_gain(gain), .rev_info_valid(m_riv), .rev_info_bit(m_rib),
    .rev_info_ready(m_rir), .rev_rate(RATE_FULL), .rev_chip_i(m_rci), .rev_chip_q(m_rcq),
    .rev_tx_on(m_on), .rev_frame_active(m_act));

  bit fd [NF][INFO_BITS];
  bit rd [NF][INFO_BITS];
  int fs = 0, rs = 0;
  initial foreach (fd[f, i]) begin fd[f][i] = 1'($urandom); rd[f][i] = 1'($urandom); end
  assign f_iv  = rst_n && fs < NF * INFO_BITS;
  assign f_ib  = (fs < NF * INFO_BITS) ? fd[fs / INFO_BITS][fs % INFO_BITS] : 1'b0;
  assign m_riv = rst_n && rs < NF * INFO_BITS;
  assign m_rib = (rs < NF * INFO_BITS) ? rd[rs / INFO_BITS][rs % INFO_BITS] : 1'b0;
  assign pw_v  = rst_n && (t % 96) == 40;
  assign power = ((t / CHIPS_PER_PCG) % 2) ? 8'd40 : 8'd160;
  always_ff @(posedge clk) if (rst_n) begin
    t <= t + 1;
    if (f_iv && f_ir) fs <= fs + 1;
    if (m_riv && m_rir) rs <= rs + 1;
  end

  bit fr [INFO_BITS];
  bit rr [INFO_BITS];
  int fi = 0, ri = 0, ff = 0, rf = 0, model = 128;
  bit pcq [$];
  initial pcq.push_back(1'b0);
  always @(posedge clk) if (rst_n) begin
    if (m_iv) begin fr[fi % INFO_BITS] = m_ib; fi++; end
    if (r_iv) begin rr[ri % INFO_BITS] = r_ib; ri++; end
    if (m_fd) begin
      if (ff >= 1 && ff <= NF) begin
        checks++; if (!m_ok) failures++;
        for (int i = 0; i < INFO_BITS; i++) begin checks++; if (fr[i] != fd[ff - 1][i]) failures++; end
      end
      ff++;
    end
    if (r_fd) begin
      if (rf >= 1 && rf <= NF) begin
        checks++; if (!r_ok) failures++;
        for (int i = 0; i < INFO_BITS; i++) begin checks++; if (rr[i] != rd[rf - 1][i]) failures++; end
      end
      rf++;
    end
    if (p_v) pcq.push_back(p_b);
    if (m_pv) begin
      bit e;
      e = pcq.pop_front();
      checks++; if (m_pb != e) failures++;
      model += m_pb ? -1 : 1;
    end
  end

  initial begin
    repeat (2) @(posedge clk); #1; rst_n = 1;
    wait (ff > NF && rf > NF);
    repeat (3) @(posedge clk); #1;
    checks++; if (gain != 8'(model)) failures++;
    checks++; if (m_fe != 16'd1 || r_fe != 16'd1) begin failures++; $display("FAIL: errors %0d %0d", m_fe, r_fe); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat ((NF + 3) * CHIPS_PER_FRAME) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
