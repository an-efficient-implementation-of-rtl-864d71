// short_code_gen: IS-95A in-phase and quadrature short PN codes.
//
// Two 15-stage LFSRs, P_I(x) = x^15+x^13+x^9+x^8+x^7+x^5+1 and
// P_Q(x) = x^15+x^12+x^11+x^10+x^6+x^5+x^4+x^3+1, each an m-sequence of
// period 32767.  After the run of 14 zeros of each sequence one extra zero is
// inserted, which stretches the period to 32768 chips (75 repetitions every
// two seconds at 1.2288 Mchip/s).
//
// Interface: pn_i and pn_q are the current chips; en advances both by one
// chip.  The reset state (the chip after the inserted zero) is this design's
// choice; the document only names the block.
module short_code_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic pn_i,
  output logic pn_q
);
  localparam logic [14:0] TAPS_I = 15'b010_0011_1010_0001; // {13,9,8,7,5,0}
  localparam logic [14:0] TAPS_Q = 15'b001_1100_0111_1001; // {12,11,10,6,5,4,3,0}

  logic [14:0] si, sq;
  logic [3:0]  zi, zq;     // zeros output in a row
  logic        hold_i, hold_q;

  assign pn_i = hold_i ? 1'b0 : si[0];
  assign pn_q = hold_q ? 1'b0 : sq[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      si <= 15'd1; sq <= 15'd1;
      zi <= '0;    zq <= '0;
      hold_i <= 1'b0; hold_q <= 1'b0;
    end else if (en) begin
      if (hold_i) begin
        hold_i <= 1'b0;
        zi     <= '0;
      end else begin
        si <= {^(si & TAPS_I), si[14:1]};
        if (si[0]) zi <= '0;
        else begin
          zi <= zi + 1'b1;
          if (zi == 4'd13) hold_i <= 1'b1;
        end
      end
      if (hold_q) begin
        hold_q <= 1'b0;
        zq     <= '0;
      end else begin
        sq <= {^(sq & TAPS_Q), sq[14:1]};
        if (sq[0]) zq <= '0;
        else begin
          zq <= zq + 1'b1;
          if (zq == 4'd13) hold_q <= 1'b1;
        end
      end
    end
  end
endmodule
