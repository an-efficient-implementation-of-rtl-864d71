// is95_pkg: constants and small functions shared by the IS-95A traffic channel
// transmitters and receivers.
//
// Frame structure (full rate, 9600 bit/s): 172 information bits, a 12-bit CRC
// and 8 zero tail bits make a 192-bit frame every 20 ms.  The forward link
// encodes it at rate 1/2 (384 code symbols), the reverse link at rate 1/3
// (576 code symbols).  All timing is counted in PN chips at 1.2288 Mchip/s:
// 24576 chips per frame, 16 power control groups (PCGs) of 1536 chips.
//
// The polynomials are the ones of the IS-95A standard.  Generator polynomials
// are written in octal as the standard does, the most significant tap being
// applied to the newest input bit.
package is95_pkg;

  localparam int INFO_BITS     = 172;
  localparam int CRC_BITS      = 12;
  localparam int TAIL_BITS     = 8;
  localparam int FRAME_BITS    = INFO_BITS + CRC_BITS + TAIL_BITS;  // 192

  localparam int CHIPS_PER_FRAME = 24576;
  localparam int PCG_PER_FRAME   = 16;
  localparam int CHIPS_PER_PCG   = CHIPS_PER_FRAME / PCG_PER_FRAME; // 1536
  localparam int CHIP_CNT_W      = 15;

  // x^12+x^11+x^10+x^9+x^8+x^4+x+1, the x^12 term implied
  localparam logic [11:0] CRC12_POLY = 12'hF13;

  localparam int CONV_K = 9;
  localparam logic [15:0] G_FWD0 = 16'o753;
  localparam logic [15:0] G_FWD1 = 16'o561;
  localparam logic [15:0] G_REV0 = 16'o557;
  localparam logic [15:0] G_REV1 = 16'o663;
  localparam logic [15:0] G_REV2 = 16'o711;

  // N mod M interleaver of the forward link: F(x) = (x*18) mod 385
  localparam int NMODM_N = 18;

  // Data burst randomizer frame rates
  typedef enum logic [1:0] {
    RATE_FULL    = 2'd0,
    RATE_HALF    = 2'd1,
    RATE_QUARTER = 2'd2,
    RATE_EIGHTH  = 2'd3
  } frame_rate_e;

  // One convolutional code symbol.  win[0] is the newest input bit and
  // win[i] the bit i steps older; the octal generator's bit k-1 taps win[0].
  function automatic logic conv_bit(logic [15:0] win, logic [15:0] g, int k);
    logic r;
    r = 1'b0;
    for (int i = 0; i < k; i++) r ^= win[i] & g[k-1-i];
    return r;
  endfunction

  // Chip j of the 64-chip Walsh function with index idx (Hadamard order).
  function automatic logic walsh_chip(logic [5:0] idx, logic [5:0] j);
    return ^(idx & j);
  endfunction

  // (f + n) mod m for 0 <= f < m and 0 <= n < m
  function automatic int unsigned nmodm_next(int unsigned f, int unsigned n, int unsigned m);
    int unsigned s;
    s = f + n;
    return (s >= m) ? s - m : s;
  endfunction

endpackage
