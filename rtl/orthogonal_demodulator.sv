// orthogonal_demodulator: receiver of the 64-ary orthogonal modulation.
//
// Hard-decision correlator: for each of the 64 Walsh functions a counter
// accumulates how many received Walsh chips disagree with it.  After the 64th
// chip the function with the fewest disagreements is decided and its index
// is returned as six code symbols (bit 0 = c0).  Ties go to the lower index.
//
// Interface: wchip_en/wchip deliver one Walsh chip; chip_idx is its position
// 0..63 in the Walsh symbol.  syms_valid pulses for one cycle, the cycle after
// chip 63, with syms.  This block is the inverse of the orthogonal modulator
// that the document names; its form is this design's.
module orthogonal_demodulator (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wchip_en,
  input  logic       wchip,
  input  logic [5:0] chip_idx,
  output logic       syms_valid,
  output logic [5:0] syms
);
  import is95_pkg::walsh_chip;

  logic [6:0] miss [64];
  logic [6:0] miss_now [64];
  logic [5:0] best;

  always_comb begin
    for (int i = 0; i < 64; i++)
      miss_now[i] = miss[i] + 7'(wchip ^ walsh_chip(6'(i), chip_idx));
    best = '0;
    for (int i = 1; i < 64; i++)
      if (miss_now[i] < miss_now[best]) best = 6'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 64; i++) miss[i] <= '0;
      syms_valid <= 1'b0;
      syms       <= '0;
    end else begin
      syms_valid <= 1'b0;
      if (wchip_en) begin
        if (chip_idx == 6'd63) begin
          for (int i = 0; i < 64; i++) miss[i] <= '0;
          syms_valid <= 1'b1;
          syms       <= best;
        end else begin
          for (int i = 0; i < 64; i++) miss[i] <= miss_now[i];
        end
      end
    end
  end
endmodule
