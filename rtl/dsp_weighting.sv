// dsp_weighting: fractional-delay interpolation of the aligned ideal samples.
//
// Each output lane is (w * cur + (2**FRAC - w) * nb) >>> FRAC, i.e. a
// weighted mean of a sample and its next or previous neighbour in steps of
// 1/2**FRAC of a sample: w = 2**FRAC passes cur unchanged, w = 2**(FRAC-1)
// gives the plain average. Values of w above 2**FRAC are clamped. The work is
// a multiply, a sum and a shift, so no divider is needed. Timing: STAGES
// register stages (products, then sum-and-shift, then STAGES-2 plain delay
// registers that give the finer-precision arithmetic its extra cycles, so the
// total DSP latency matches the original: 9 cycles at 1/32 sample, 7 at 1/16).
// Following the original: the multiply-sum-shift weighting with the next or
// previous sample at 1/16 or 1/32 precision. This design's choices: the
// truncating shift and the explicit stage split.
module dsp_weighting
  import sic_pkg::*;
#(
  parameter int unsigned FRAC   = 5,
  parameter int unsigned STAGES = (FRAC >= 5) ? 4 : 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [FRAC:0]   w,
  input  sample_t         cur [LANES],
  input  sample_t         nb  [LANES],
  output sample_t         y   [LANES]
);
  localparam int unsigned PW = SAMPLE_W + FRAC + 2;   // product width

  logic signed [PW-1:0] pc [LANES];
  logic signed [PW-1:0] pn [LANES];
  sample_t              dly [STAGES-1][LANES];
  logic [FRAC:0]        wc;

  assign wc = (w > (FRAC+1)'(1 << FRAC)) ? (FRAC+1)'(1 << FRAC) : w;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) begin
        pc[l] <= '0;
        pn[l] <= '0;
        for (int s = 0; s < STAGES - 1; s++) dly[s][l] <= '0;
      end
    end else if (en) begin
      for (int l = 0; l < LANES; l++) begin
        logic signed [PW-1:0] sum;
        pc[l] <= PW'(cur[l]) * $signed({1'b0, wc});
        pn[l] <= PW'(nb[l]) * $signed({1'b0, (FRAC+1)'(1 << FRAC) - wc});
        sum = pc[l] + pn[l];
        dly[0][l] <= sample_t'(sum >>> FRAC);
        for (int s = 1; s < STAGES - 1; s++) dly[s][l] <= dly[s-1][l];
      end
    end
  end

  assign y = dly[STAGES-2];
endmodule
