// axis_width_up: packs RATIO narrow AXI-Stream beats into one wide beat
// (64 to 256 bits in the capture star). The first beat lands in the low
// bits, so the samples stay in time order from bit 0 upward. Input beats
// collect in a staging register; the beat that completes a group moves the
// group to the output register in the same clock. Input is stalled only when
// a full group waits behind an output that is not being taken. Timing: the
// wide beat is valid the clock after its last narrow beat; one narrow beat
// per clock sustained.
// Following the original: a 64-to-256-bit converter ahead of the capture
// buffer. This design's choices: lane order and the register structure.
module axis_width_up #(
  parameter int unsigned IN_W  = 64,
  parameter int unsigned RATIO = 4,
  localparam int unsigned CW   = (RATIO > 1) ? $clog2(RATIO) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [IN_W-1:0]       s_tdata,
  input  logic                  s_tvalid,
  output logic                  s_tready,
  output logic [IN_W*RATIO-1:0] m_tdata,
  output logic                  m_tvalid,
  input  logic                  m_tready
);
  logic [IN_W-1:0] stage [RATIO-1];
  logic [CW-1:0]   cnt;
  logic            last;

  assign last     = (cnt == CW'(RATIO - 1));
  assign s_tready = !last || !m_tvalid || m_tready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      m_tvalid <= 1'b0;
      m_tdata  <= '0;
      for (int i = 0; i < RATIO - 1; i++) stage[i] <= '0;
    end else begin
      if (m_tvalid && m_tready) m_tvalid <= 1'b0;
      if (s_tvalid && s_tready) begin
        if (last) begin
          for (int i = 0; i < RATIO - 1; i++) m_tdata[IN_W*i +: IN_W] <= stage[i];
          m_tdata[IN_W*(RATIO-1) +: IN_W] <= s_tdata;
          m_tvalid <= 1'b1;
          cnt      <= '0;
        end else begin
          stage[cnt] <= s_tdata;
          cnt        <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
