// axis_router: AXI4-Lite configured AXI-Stream crossbar.
//
// Every output selects at most one input; one input may feed any number of
// outputs, so a stream can go to the DSP star and to a capture star at once.
// Each output has a two-beat buffer. An input beat is taken when every
// output routed from it has room, and is then copied to all of them together; an input
// routed nowhere is always ready and its beats are dropped, so a converter
// that cannot stall is never stalled by an unused path.
//
// Registers (clock aclk, BASE + 4*o for output o): bit 31 enable, bits
// SELW-1:0 the input index. All outputs are disabled at reset. The table
// crosses into the stream clock through cdc_bus; change it while the streams
// are idle. Timing: one clock from an input beat to the output beats, one
// beat per clock per output.
// Following the original: any input to any set of outputs, one input per
// output, AXI4-Lite configuration, use at 64 and 256 bits. This design's
// choices: register layout, output buffers and the drop-when-unrouted rule.
module axis_router
  import sic_pkg::*;
#(
  parameter axil_addr_t  BASE  = BASE_ROUTER64,
  parameter int unsigned DW    = 64,
  parameter int unsigned N_IN  = 8,
  parameter int unsigned N_OUT = 8,
  localparam int unsigned SELW = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic                 aclk,
  input  logic                 aresetn,
  input  axil_req_t            axil_req,
  output axil_rsp_t            axil_rsp,
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [DW-1:0]        s_tdata  [N_IN],
  input  logic [N_IN-1:0]      s_tvalid,
  output logic [N_IN-1:0]      s_tready,
  output logic [DW-1:0]        m_tdata  [N_OUT],
  output logic [N_OUT-1:0]     m_tvalid,
  input  logic [N_OUT-1:0]     m_tready
);
  typedef struct packed {
    logic            en;
    logic [SELW-1:0] sel;
  } route_t;

  route_t [N_OUT-1:0] tab_a, tab_s;

  logic        wr_en, rd_en;
  logic [7:0]  wr_addr, rd_addr;
  axil_data_t  wr_data, rd_data;
  logic [3:0]  wr_strb;

  axil_slave #(.BASE(BASE), .SPAN_BITS(8)) u_axil (
    .clk(aclk), .rst_n(aresetn), .req(axil_req), .rsp(axil_rsp),
    .wr_en, .wr_addr, .wr_data, .wr_strb, .rd_en, .rd_addr, .rd_data);

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) tab_a <= '0;
    else if (wr_en && (wr_addr[7:2] < 6'(N_OUT)) && ({1'b0, wr_data[SELW-1:0]} < (SELW+1)'(N_IN)))
      tab_a[wr_addr[7:2]] <= '{en: wr_data[31], sel: wr_data[SELW-1:0]};
  end

  always_comb begin
    rd_data = '0;
    if (rd_addr[7:2] < 6'(N_OUT))
      rd_data = {tab_a[rd_addr[7:2]].en, 31'(tab_a[rd_addr[7:2]].sel)};
  end

  cdc_bus #(.W($bits(tab_a))) u_cdc (
    .src_clk(aclk), .src_rst_n(aresetn), .src_data(tab_a),
    .dst_clk(clk), .dst_rst_n(rst_n), .dst_data(tab_s));

  // Each output is a two-entry buffer (head = m_tdata, plus a spare). It has
  // room while it holds fewer than two beats, so s_tready never depends
  // combinationally on m_tready and a loop back through another star is safe.
  logic [N_OUT-1:0] room, push, pop;
  logic [1:0]       cnt   [N_OUT];
  logic [DW-1:0]    spare [N_OUT];
  logic [N_IN-1:0]  take;

  always_comb begin
    for (int o = 0; o < N_OUT; o++) begin
      room[o]     = (cnt[o] != 2'd2);
      m_tvalid[o] = (cnt[o] != 2'd0);
    end
    for (int i = 0; i < N_IN; i++) begin
      s_tready[i] = 1'b1;
      for (int o = 0; o < N_OUT; o++)
        if (tab_s[o].en && tab_s[o].sel == SELW'(i) && !room[o]) s_tready[i] = 1'b0;
    end
    take = s_tvalid & s_tready;
    for (int o = 0; o < N_OUT; o++) begin
      push[o] = tab_s[o].en && take[tab_s[o].sel];
      pop[o]  = m_tvalid[o] && m_tready[o];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < N_OUT; o++) begin
        cnt[o]     <= '0;
        m_tdata[o] <= '0;
        spare[o]   <= '0;
      end
    end else begin
      for (int o = 0; o < N_OUT; o++) begin
        unique case ({push[o], pop[o]})
          2'b10: begin
            if (cnt[o] == 2'd0) m_tdata[o] <= s_tdata[tab_s[o].sel];
            else                spare[o]   <= s_tdata[tab_s[o].sel];
            cnt[o] <= cnt[o] + 2'd1;
          end
          2'b01: begin
            m_tdata[o] <= spare[o];
            cnt[o]     <= cnt[o] - 2'd1;
          end
          2'b11: begin
            if (cnt[o] == 2'd1) m_tdata[o] <= s_tdata[tab_s[o].sel];
            else begin
              m_tdata[o] <= spare[o];
              spare[o]   <= s_tdata[tab_s[o].sel];
            end
          end
          default: ;
        endcase
      end
    end
  end

  for (genvar o = 0; o < N_OUT; o++) begin : g_hold
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      m_tvalid[o] && !m_tready[o] |=> m_tvalid[o] && $stable(m_tdata[o]));
  end
endmodule
