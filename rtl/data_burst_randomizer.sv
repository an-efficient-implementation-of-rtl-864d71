// data_burst_randomizer: reverse link transmission gating per power control
// group (PCG).
//
// At lower frame rates the reverse link code symbols are repeated and only a
// pseudo-random subset of the 16 PCGs of a frame is sent.  Fourteen long code
// chips b0..b13, taken from the last 14 chips of PCG 14 of the previous frame,
// choose the subset:
//   full rate:    all 16 PCGs
//   half rate:    PCG 2i + b_i, i = 0..7
//   quarter rate: per pair j = 0..3 of half-rate PCGs, PCG 4j + b_(2j) when
//                 b_(8+j) = 0, else PCG 4j + 2 + b_(2j+1)
//   eighth rate:  one of the quarter-rate PCGs in each frame half: in the
//                 first half the one of pair 0 if b12 = 0, else of pair 1; in
//                 the second half pair 2 if b13 = 0, else pair 3.
// b0 is the earliest of the 14 chips.  The rate is taken at the frame start.
//
// Interface: chip_en advances one PN chip; pcg and chip_in_pcg are a local
// frame timer started at reset.  tx_on is high through every chip of a PCG
// that is sent.  The rules follow IS-95A; the document only names the block
// and shows its rate inputs.
module data_burst_randomizer
  import is95_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        chip_en,
  input  frame_rate_e rate,
  input  logic        lc_chip,
  output logic        tx_on,
  output logic [3:0]  pcg,
  output frame_rate_e frame_rate
);
  logic [10:0] chip_in_pcg;
  logic [13:0] b_next;    // bits collected for the next frame
  logic [15:0] mask_for_rate;

  function automatic logic [15:0] burst_mask(frame_rate_e r, logic [13:0] b);
    logic [15:0] m;
    logic [3:0]  q [4];
    m = '0;
    for (int j = 0; j < 4; j++)
      q[j] = b[8+j] ? 4'(4*j + 2 + int'(b[2*j+1])) : 4'(4*j + int'(b[2*j]));
    case (r)
      RATE_FULL:    m = '1;
      RATE_HALF:    for (int i = 0; i < 8; i++) m[2*i + int'(b[i])] = 1'b1;
      RATE_QUARTER: for (int j = 0; j < 4; j++) m[q[j]] = 1'b1;
      default: begin
        m[b[12] ? q[1] : q[0]] = 1'b1;
        m[b[13] ? q[3] : q[2]] = 1'b1;
      end
    endcase
    return m;
  endfunction

  assign tx_on = mask_for_rate[pcg];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chip_in_pcg   <= '0;
      pcg           <= '0;
      b_next        <= '0;
      frame_rate    <= RATE_FULL;
      mask_for_rate <= '1;
    end else if (chip_en) begin
      if (pcg == 4'd14 && chip_in_pcg >= 11'(CHIPS_PER_PCG - 14))
        b_next <= {lc_chip, b_next[13:1]};   // b0 ends in bit 0
      if (chip_in_pcg == 11'(CHIPS_PER_PCG - 1)) begin
        chip_in_pcg <= '0;
        pcg         <= pcg + 1'b1;
        if (pcg == 4'd15) begin
          // frame boundary: the bits of the frame just ended select the next
          frame_rate    <= rate;
          mask_for_rate <= burst_mask(rate, b_next);
        end
      end else begin
        chip_in_pcg <= chip_in_pcg + 1'b1;
      end
    end
  end
endmodule
