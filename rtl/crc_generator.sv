// crc_generator: frame quality indicator and tail of a full-rate IS-95A frame.
//
// The 172 information bits stream through unchanged while a 12-bit CRC
// (x^12+x^11+x^10+x^9+x^8+x^4+x+1, register preset to all ones, MSB first) is
// computed over them.  The 12 CRC bits follow, then 8 zero tail bits that
// return the convolutional encoder to state 0.  One frame is 192 output bits.
//
// Interface: valid/ready bit streams.  During the information phase the
// input is passed combinationally to the output (in_ready = out_ready); during
// the CRC and tail phases the input is held off.  The CRC polynomial, preset
// and tail follow IS-95A; the document names the block and shows the twelve
// crc_reg stages.  The streaming handshake is this design's choice.
module crc_generator #(
  parameter int unsigned          INFO = 172,
  parameter int unsigned          CRCW = 12,
  parameter logic [CRCW-1:0]      POLY = 12'hF13,
  parameter int unsigned          TAIL = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic in_ready,
  output logic out_valid,
  output logic out_bit,
  input  logic out_ready,
  output logic frame_last            // high with the last (tail) bit of a frame
);
  localparam int unsigned TOTAL = INFO + CRCW + TAIL;
  localparam int CW = $clog2(TOTAL + 1);

  logic [CW-1:0]   cnt;
  logic [CRCW-1:0] crc;
  logic            info_phase, crc_phase;

  assign info_phase = cnt < CW'(INFO);
  assign crc_phase  = !info_phase && cnt < CW'(INFO + CRCW);

  always_comb begin
    in_ready  = info_phase && out_ready;
    out_valid = info_phase ? in_valid : 1'b1;
    out_bit   = info_phase ? in_bit : (crc_phase ? crc[CRCW-1] : 1'b0);
    frame_last = (cnt == CW'(TOTAL - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      crc <= '1;
    end else if (out_valid && out_ready) begin
      if (info_phase) begin
        crc <= {crc[CRCW-2:0], 1'b0} ^ ((in_bit ^ crc[CRCW-1]) ? POLY : '0);
      end else if (crc_phase) begin
        crc <= {crc[CRCW-2:0], 1'b0};
      end
      if (cnt == CW'(TOTAL - 1)) begin
        cnt <= '0;
        crc <= '1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
