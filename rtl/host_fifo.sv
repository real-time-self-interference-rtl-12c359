// host_fifo: the 256 x 256-bit stream FIFO in front of the host's PCIe
// requester, which moves captured buffers to main memory.
//
// A circular buffer of DEPTH words of DW bits with separate read and write
// pointers and an occupancy count. The input is ready while the FIFO is not
// full; the output shows the oldest word (first-word fall-through) while it
// is not empty. A word written in one clock can be read from the next.
// Both sides run on the host stream clock.
// Following the original: 256 entries of 256 bits. This design's choices:
// single clock, fall-through output.
module host_fifo #(
  parameter int unsigned DW    = 256,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] s_tdata,
  input  logic          s_tvalid,
  output logic          s_tready,
  output logic [DW-1:0] m_tdata,
  output logic          m_tvalid,
  input  logic          m_tready,
  output logic [AW:0]   level
);
  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          push, pop;

  assign s_tready = (level != (AW+1)'(DEPTH));
  assign m_tvalid = (level != '0);
  assign m_tdata  = mem[rp];
  assign push     = s_tvalid && s_tready;
  assign pop      = m_tvalid && m_tready;

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= s_tdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      level <= level + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) level <= (AW+1)'(DEPTH));
endmodule
