// fer_detector: frame error rate detector.
//
// Counts received frames and frames whose CRC failed.  The frame error rate is
// frame_errors / frames; both counters saturate rather than wrap.  A clear
// input restarts a measurement.  The document names the block; counting
// frames and CRC failures is this design's reading of it.
module fer_detector #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             frame_done,
  input  logic             crc_ok,
  output logic [CNT_W-1:0] frames,
  output logic [CNT_W-1:0] frame_errors
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frames       <= '0;
      frame_errors <= '0;
    end else if (clear) begin
      frames       <= '0;
      frame_errors <= '0;
    end else if (frame_done) begin
      if (frames != '1) frames <= frames + 1'b1;
      if (!crc_ok && frame_errors != '1) frame_errors <= frame_errors + 1'b1;
    end
  end
endmodule
