// dsp_delay_line: the ideal-stream shift register of the DSP star and its
// "delay out" assignment.
//
// Four ideal samples enter per enabled clock and four delayed samples leave.
// The register holds DEPTH_PK beats; with sample index j = 0 for the newest
// sample, output lane k is taken at j = 7 - k + delay, i.e. the samples are
// one beat behind the newest beat plus `delay` samples. The one-beat offset
// lets the "next" neighbour exist even at delay 0; the DSP star delays its
// non-ideal path by the same beat so that delay = 0 means no relative shift.
// Since delay is rarely a multiple of four, it is split into a beat offset
// q = delay / 4 and a lane offset r = delay % 4: a three-beat window is picked
// at q, and r chooses the lanes inside it. Each lane also gets a neighbour:
// the next (newer) sample when nb_prev = 0, the previous (older) one when
// nb_prev = 1. Timing: one register stage; cur/nb belong to the beat shifted
// in at the same enabled clock.
// Following the original: a shift register moved four samples per clock and
// conditional logic for index values that are not multiples of four. This
// design's choices: the maximum delay (MAX_DELAY, 1023 samples by default)
// and the one-beat offset.
module dsp_delay_line
  import sic_pkg::*;
#(
  parameter int unsigned MAX_DELAY = 1023,
  localparam int unsigned DW       = $clog2(MAX_DELAY + 1),
  localparam int unsigned DEPTH_PK = MAX_DELAY / 4 + 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  sample_t       x [LANES],
  input  logic [DW-1:0] delay,
  input  logic          nb_prev,
  output sample_t       cur [LANES],
  output sample_t       nb  [LANES]
);
  typedef sample_t beat_t [LANES];

  beat_t   sr [DEPTH_PK];        // sr[0] is the newest beat
  beat_t   nxt [DEPTH_PK];       // contents after this clock's shift
  sample_t win [12];             // win[i] = sample at j = 4q + i
  logic [DW-1:0] d_clamp;
  logic [DW-3:0] q;
  logic [1:0]    r;

  always_comb begin
    nxt[0] = x;
    for (int p = 1; p < DEPTH_PK; p++) nxt[p] = sr[p-1];
  end

  always_comb begin
    d_clamp = (delay > DW'(MAX_DELAY)) ? DW'(MAX_DELAY) : delay;
    q = d_clamp[DW-1:2];
    r = d_clamp[1:0];
    // In beat p, lane l is the sample at j = 4p + 3 - l.
    for (int i = 0; i < 12; i++) win[i] = '0;
    for (int p = 0; p < DEPTH_PK - 2; p++) begin
      if (p == int'(q)) begin
        for (int b = 0; b < 3; b++)
          for (int l = 0; l < LANES; l++)
            win[4*b + 3 - l] = nxt[p+b][l];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < DEPTH_PK; p++)
        for (int l = 0; l < LANES; l++) sr[p][l] <= '0;
      for (int l = 0; l < LANES; l++) begin
        cur[l] <= '0;
        nb[l]  <= '0;
      end
    end else if (en) begin
      sr <= nxt;
      for (int k = 0; k < LANES; k++) begin
        cur[k] <= win[7 - k + int'(r)];
        nb[k]  <= nb_prev ? win[8 - k + int'(r)] : win[6 - k + int'(r)];
      end
    end
  end
endmodule
