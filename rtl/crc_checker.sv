// crc_checker: CRC error detector of the IS-95A receivers.
//
// Takes the 192 decoded bits of a frame in order (172 information bits, the
// 12 received CRC bits, 8 tail bits).  It recomputes the CRC of the
// information bits with the same polynomial and preset as the transmitter and
// compares it bit by bit with the received CRC.  The information bits are
// forwarded on info_valid/info_bit; frame_done pulses with the last tail bit
// and crc_ok tells whether the frame passed.  The tail bits are not checked.
// The document names CRC error detection; its form here is this design's.
module crc_checker #(
  parameter int unsigned          INFO = 172,
  parameter int unsigned          CRCW = 12,
  parameter logic [CRCW-1:0]      POLY = 12'hF13,
  parameter int unsigned          TAIL = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic info_valid,
  output logic info_bit,
  output logic frame_done,
  output logic crc_ok
);
  localparam int unsigned TOTAL = INFO + CRCW + TAIL;
  localparam int CW = $clog2(TOTAL + 1);

  logic [CW-1:0]   cnt;
  logic [CRCW-1:0] crc;
  logic            mismatch;

  assign info_valid = in_valid && (cnt < CW'(INFO));
  assign info_bit   = in_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      crc        <= '1;
      mismatch   <= 1'b0;
      frame_done <= 1'b0;
      crc_ok     <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (in_valid) begin
        if (cnt < CW'(INFO)) begin
          crc <= {crc[CRCW-2:0], 1'b0} ^ ((in_bit ^ crc[CRCW-1]) ? POLY : '0);
        end else if (cnt < CW'(INFO + CRCW)) begin
          if (in_bit != crc[CRCW-1]) mismatch <= 1'b1;
          crc <= {crc[CRCW-2:0], 1'b0};
        end
        if (cnt == CW'(TOTAL - 1)) begin
          cnt        <= '0;
          crc        <= '1;
          mismatch   <= 1'b0;
          frame_done <= 1'b1;
          crc_ok     <= !mismatch;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
