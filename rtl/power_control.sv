// power_control: base station closed-loop power control decision.
//
// Over each power control group (PCG, 1.25 ms) the received reverse link
// strength of one mobile is sampled SAMPLES times.  The samples are summed; at
// the end of the group the sum is compared with a threshold.  A sum above the
// threshold gives power control bit 1 (mobile: lower your power by one step),
// otherwise bit 0 (raise it), as IS-95A defines the bit.  One bit per PCG,
// 800 bit/s.
//
// Interface: sample_valid/sample deliver one strength sample (unsigned); after
// the SAMPLES-th sample pc_valid pulses with the new pc_bit, which is then
// held.  count, sum and diff (sum minus threshold, two's complement) are the
// measurement registers; over is the comparison result.  The document names
// the scheme and shows a sample counter, a running sum and a difference
// vector of 18 bits; the sum-and-threshold rule is this design's.
module power_control #(
  parameter int unsigned SAMPLES = 16,
  parameter int unsigned SW      = 8,
  parameter int unsigned SUMW    = 18
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            sample_valid,
  input  logic [SW-1:0]   sample,
  input  logic [SUMW-1:0] threshold,
  output logic            pc_valid,
  output logic            pc_bit,
  output logic [7:0]      count,
  output logic [SUMW-1:0] sum,
  output logic [SUMW-1:0] diff,
  output logic            over
);
  logic [SUMW-1:0] sum_now;

  assign sum_now = sum + SUMW'(sample);
  assign diff    = sum - threshold;
  assign over    = sum > threshold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      sum      <= '0;
      pc_valid <= 1'b0;
      pc_bit   <= 1'b0;
    end else begin
      pc_valid <= 1'b0;
      if (sample_valid) begin
        if (count == 8'(SAMPLES - 1)) begin
          count    <= '0;
          sum      <= '0;
          pc_valid <= 1'b1;
          pc_bit   <= sum_now > threshold;
        end else begin
          count <= count + 1'b1;
          sum   <= sum_now;
        end
      end
    end
  end
endmodule
