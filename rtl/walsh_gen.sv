// walsh_gen: 64-chip Walsh code generator.
//
// A 6-bit chip counter runs through one Walsh period; the output chip is the
// parity of (index AND counter), which is Walsh function "index" of the
// 64 x 64 Hadamard matrix in the numbering IS-95A uses.  The six select lines
// and the chip counter are the ones the document's simulation shows
// (sel_walsh0..5, count5); the parity rule is IS-95A's.
//
// Interface: walsh_out is the current chip; en advances the counter; count is
// the chip position, last high on chip 63.
module walsh_gen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [5:0] sel_walsh,
  output logic [5:0] count,
  output logic       last,
  output logic       walsh_out
);
  assign walsh_out = ^(sel_walsh & count);
  assign last      = (count == 6'd63);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  count <= '0;
    else if (en) count <= count + 1'b1;
  end
endmodule
