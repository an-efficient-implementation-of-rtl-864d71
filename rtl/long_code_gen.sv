// long_code_gen: IS-95A long PN code generator.
//
// A 42-stage linear feedback shift register with the characteristic
// polynomial x^42+x^35+x^33+x^31+x^27+x^26+x^25+x^22+x^21+x^19+x^18+x^17
// +x^16+x^10+x^7+x^6+x^5+x^3+x^2+x+1 (period 2^42-1).  Each chip is the
// parity of the register ANDed with the 42-bit long code mask, which makes the
// sequence user specific (a shift of the same m-sequence per mask).
//
// Interface: chip is valid in the cycle the register holds it; en advances
// the register by one chip.  The register is reset to 1; IS-95A aligns the
// state to system time instead, which this design leaves to the reset.  The
// document only names the block; polynomial and mask follow IS-95A.
module long_code_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [41:0] mask,
  output logic        chip
);
  // recurrence a(n+42) = sum of a(n+k) over the polynomial's lower terms
  localparam logic [41:0] TAPS = (42'd1 << 0) | (42'd1 << 1) | (42'd1 << 2) | (42'd1 << 3) |
                                 (42'd1 << 5) | (42'd1 << 6) | (42'd1 << 7) | (42'd1 << 10) |
                                 (42'd1 << 16) | (42'd1 << 17) | (42'd1 << 18) | (42'd1 << 19) |
                                 (42'd1 << 21) | (42'd1 << 22) | (42'd1 << 25) | (42'd1 << 26) |
                                 (42'd1 << 27) | (42'd1 << 31) | (42'd1 << 33) | (42'd1 << 35);
  logic [41:0] s;

  assign chip = ^(s & mask);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  s <= 42'd1;
    else if (en) s <= {^(s & TAPS), s[41:1]};
  end
endmodule
