// orthogonal_modulator: reverse link 64-ary orthogonal modulator.
//
// Every six code symbols form one modulation symbol: the index
// i = c0 + 2c1 + 4c2 + 8c3 + 16c4 + 32c5 (c0 the first symbol in time)
// selects Walsh function i, which is sent as 64 Walsh chips at 307.2 kchip/s
// (4.8 ksymbol/s).  The Walsh chips come from a walsh_gen instance.
//
// Interface: wchip_en advances one Walsh chip.  On the last chip of a Walsh
// symbol the next six symbols are taken (syms_ready high with syms_valid); if
// none are offered the next Walsh symbol is index 0 and busy goes low.
// walsh_chip is the current chip, combinational from registers, so the first
// chip of a symbol appears the cycle after its symbols were taken.  The index
// rule is IS-95A's; the document only names the block.
module orthogonal_modulator (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wchip_en,
  input  logic       syms_valid,
  input  logic [5:0] syms,
  output logic       syms_ready,
  output logic       walsh_chip,
  output logic       busy,
  output logic [5:0] walsh_index
);
  logic [5:0] cnt;
  logic       last;

  walsh_gen u_walsh (
    .clk(clk), .rst_n(rst_n), .en(wchip_en), .sel_walsh(walsh_index),
    .count(cnt), .last(last), .walsh_out(walsh_chip)
  );

  assign syms_ready = wchip_en && last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      walsh_index <= '0;
      busy        <= 1'b0;
    end else if (syms_ready) begin
      walsh_index <= syms_valid ? syms : 6'd0;
      busy        <= syms_valid;
    end
  end
endmodule
