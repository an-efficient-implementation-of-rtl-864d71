// mobile_power_adjust: mobile side of the closed power control loop.
//
// Each received power control bit moves the transmit gain by one STEP:
// bit 0 raises it, bit 1 lowers it (IS-95A uses 1 dB steps, so the gain is
// kept in dB units).  The gain saturates at GMIN and GMAX.
//
// Interface: pc_valid/pc_bit deliver one received bit; gain is registered and
// changes the cycle after.  The step, range and initial value are this
// design's; the document only names the power control scheme.
module mobile_power_adjust #(
  parameter int unsigned GW    = 8,
  parameter int unsigned STEP  = 1,
  parameter int unsigned GMIN  = 0,
  parameter int unsigned GMAX  = 255,
  parameter int unsigned GINIT = 128
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pc_valid,
  input  logic          pc_bit,
  output logic [GW-1:0] gain
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gain <= GW'(GINIT);
    end else if (pc_valid) begin
      if (pc_bit) gain <= (gain >= GW'(GMIN + STEP)) ? gain - GW'(STEP) : GW'(GMIN);
      else        gain <= (gain <= GW'(GMAX - STEP)) ? gain + GW'(STEP) : GW'(GMAX);
    end
  end
endmodule
