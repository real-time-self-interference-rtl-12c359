// dsp_scaler: scales the four non-ideal samples of a beat by the
// software-computed scaler, one beat per clock.
//
// The scaler is a signed fixed-point number holding the real gain times
// 2**FRAC (1024 by default), so no floating point is needed: each lane is
// multiplied by the integer scaler and the product is shifted right
// arithmetically by FRAC bits to restore the sample scale, then saturated to
// 16 bits. The four lanes are independent branches. Timing: one register
// stage; y holds the result for x of the previous enabled clock.
// Following the original: x1024 scaling and the shift back. This design's
// choices: an 18-bit signed scaler (gains of about -128 .. +128), truncation
// toward minus infinity, and saturation.
module dsp_scaler
  import sic_pkg::*;
#(
  parameter int unsigned SCALER_W = 18,
  parameter int unsigned FRAC     = SCALER_FRAC
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic signed [SCALER_W-1:0] scaler,
  input  sample_t                    x [LANES],
  output sample_t                    y [LANES]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) y[l] <= '0;
    end else if (en) begin
      for (int l = 0; l < LANES; l++) begin
        logic signed [47:0] prod;
        prod  = 48'(x[l]) * 48'(scaler);
        y[l] <= sat16(prod >>> FRAC);
      end
    end
  end
endmodule
