// pc_puncture: power control subchannel of the forward traffic channel.
//
// Each PCG carries 24 modulation symbols (19.2 ksymbol/s).  The power control
// bit replaces two consecutive scrambled symbols (one bit of 104 us at full
// rate).  Its starting position, 0..15, is the 4-bit number formed by the
// decimated long code bits of symbols 23 (MSB), 22, 21 and 20 of the previous
// PCG, so the positions hop pseudo-randomly.
//
// The same block serves the transmitter (sym_out is the punctured stream) and
// the receiver (punct marks the positions from which the bit is read and which
// the decoder must ignore).  Interface: one call per symbol with sym_strobe;
// sym_idx (0..23) is the symbol's place in its PCG and lc_bit its decimated
// long code bit.  pc_bit is sampled at symbol 0 of each PCG and sent for the
// whole PCG.  punct and sym_out are combinational.  The puncturing rule is
// IS-95A's; the document only names the power control scheme.
module pc_puncture (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sym_strobe,
  input  logic [4:0] sym_idx,
  input  logic       lc_bit,
  input  logic       sym_in,
  input  logic       pc_bit,
  output logic       punct,
  output logic       sym_out,
  output logic [3:0] pos
);
  logic [2:0] pos_next;
  logic       pc_lat;
  logic       pc_cur;

  assign pc_cur  = (sym_idx == 5'd0) ? pc_bit : pc_lat;
  assign punct   = (sym_idx == {1'b0, pos}) || (sym_idx == 5'({1'b0, pos} + 5'd1));
  assign sym_out = punct ? pc_cur : sym_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos      <= '0;
      pos_next <= '0;
      pc_lat   <= 1'b0;
    end else if (sym_strobe) begin
      if (sym_idx == 5'd0) pc_lat <= pc_bit;
      if (sym_idx >= 5'd20 && sym_idx <= 5'd22) pos_next[sym_idx[1:0]] <= lc_bit;
      if (sym_idx == 5'd23) pos <= {lc_bit, pos_next[2], pos_next[1], pos_next[0]};
    end
  end
endmodule
