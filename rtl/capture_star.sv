// capture_star: triggered capture of one ADC stream into a buffer that is
// then streamed to the host.
//
// Software writes the buffer size and arms the star. The next cycle in which
// trigger_in is high (the converter star raises it for all capture stars in
// the same clock, so several channels are captured sample-aligned) starts
// the capture with that cycle's beat. Beats of four 16-bit samples are packed
// four at a time into 256-bit words by axis_width_up and written to a
// dual-clock buffer. When `size` samples are stored, the buffer is read out on
// the 256-bit master stream in the host stream clock, oldest word first, one
// word per clock while m_tready is high. The input stream is always ready:
// beats outside a capture are dropped, as the converters cannot be stalled.
//
// Registers (clock aclk, 256-byte window at BASE):
//   0x00 control  write bit 0 = 1 to arm
//   0x04 status   bit 0 armed or capturing; bit 1 capture complete;
//                 bit 2 read-out complete (for the latest arm)
//   0x08 size     samples per capture, MIN_SAMPLES .. MAX_SAMPLES, rounded
//                 down to a multiple of 16 (one 256-bit word)
// Arm requests and completion reports cross clock domains as sequence
// numbers through cdc_bus. Re-arming before the read-out ends overwrites the
// buffer being read.
// Following the original: 64-to-256-bit conversion, a 256 .. 32768-sample
// configurable buffer, the trigger input, separate input and output stream
// clocks. This design's choices: the register map, arming, and the read-out
// starting on its own when the capture ends.
module capture_star
  import sic_pkg::*;
#(
  parameter axil_addr_t  BASE        = BASE_CAPTURE0,
  parameter int unsigned MAX_SAMPLES = 32768,
  parameter int unsigned MIN_SAMPLES = 256,
  localparam int unsigned WORDS      = MAX_SAMPLES / 16,
  localparam int unsigned WA         = $clog2(WORDS),
  localparam int unsigned NW         = WA + 1            // word count width
) (
  input  logic              aclk,
  input  logic              aresetn,
  input  axil_req_t         axil_req,
  output axil_rsp_t         axil_rsp,
  // ADC side
  input  logic              s_clk,
  input  logic              s_rst_n,
  input  logic              trigger_in,
  input  logic [BEAT_W-1:0] s_tdata,
  input  logic              s_tvalid,
  output logic              s_tready,
  // host side
  input  logic              m_clk,
  input  logic              m_rst_n,
  output logic [255:0]      m_tdata,
  output logic              m_tvalid,
  input  logic              m_tready
);
  typedef struct packed {
    logic [7:0]    seq;
    logic [NW-1:0] words;
  } job_t;

  localparam job_t JOB_RST = '{seq: '0, words: NW'(MIN_SAMPLES / 16)};

  // ---------------------------------------------------------------- registers
  logic        wr_en, rd_en;
  logic [7:0]  wr_addr, rd_addr;
  axil_data_t  wr_data, rd_data;
  logic [3:0]  wr_strb;
  job_t        arm_a, arm_s, cap_s, cap_a, cap_m;
  logic [7:0]  rdone_m, rdone_a;
  logic [NW-1:0] req_words;

  axil_slave #(.BASE(BASE), .SPAN_BITS(8)) u_axil (
    .clk(aclk), .rst_n(aresetn), .req(axil_req), .rsp(axil_rsp),
    .wr_en, .wr_addr, .wr_data, .wr_strb, .rd_en, .rd_addr, .rd_data);

  always_comb begin
    if (wr_data < MIN_SAMPLES)      req_words = NW'(MIN_SAMPLES / 16);
    else if (wr_data > MAX_SAMPLES) req_words = NW'(MAX_SAMPLES / 16);
    else                            req_words = NW'(wr_data >> 4);
  end

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      arm_a <= JOB_RST;
    end else if (wr_en) begin
      if (wr_addr == 8'h00 && wr_data[0]) arm_a.seq   <= arm_a.seq + 1'b1;
      if (wr_addr == 8'h08)               arm_a.words <= req_words;
    end
  end

  always_comb begin
    unique case (rd_addr)
      8'h04:   rd_data = {29'd0, rdone_a == arm_a.seq, cap_a.seq == arm_a.seq,
                          cap_a.seq != arm_a.seq};
      8'h08:   rd_data = AXIL_DW'(arm_a.words) << 4;
      default: rd_data = '0;
    endcase
  end

  cdc_bus #(.W($bits(job_t)), .RST_VAL(JOB_RST)) u_arm_cdc (
    .src_clk(aclk), .src_rst_n(aresetn), .src_data(arm_a),
    .dst_clk(s_clk), .dst_rst_n(s_rst_n), .dst_data(arm_s));
  cdc_bus #(.W($bits(job_t))) u_cap2m_cdc (
    .src_clk(s_clk), .src_rst_n(s_rst_n), .src_data(cap_s),
    .dst_clk(m_clk), .dst_rst_n(m_rst_n), .dst_data(cap_m));
  cdc_bus #(.W($bits(job_t))) u_cap2a_cdc (
    .src_clk(s_clk), .src_rst_n(s_rst_n), .src_data(cap_s),
    .dst_clk(aclk), .dst_rst_n(aresetn), .dst_data(cap_a));
  cdc_bus #(.W(8)) u_rd2a_cdc (
    .src_clk(m_clk), .src_rst_n(m_rst_n), .src_data(rdone_m),
    .dst_clk(aclk), .dst_rst_n(aresetn), .dst_data(rdone_a));

  // ---------------------------------------------------------------- capture
  typedef enum logic [1:0] {C_IDLE, C_ARMED, C_RUN, C_FLUSH} cstate_e;
  cstate_e        cst;
  logic [NW+1:0]  beats;          // beats fed to the converter
  logic [NW-1:0]  waddr;
  logic           feed, cv_valid;
  logic [255:0]   cv_data;
  logic [255:0]   mem [WORDS];

  assign s_tready = 1'b1;
  assign feed = s_tvalid && ((cst == C_RUN) || (cst == C_ARMED && trigger_in));

  axis_width_up #(.IN_W(BEAT_W), .RATIO(4)) u_width (
    .clk(s_clk), .rst_n(s_rst_n), .s_tdata, .s_tvalid(feed), .s_tready(),
    .m_tdata(cv_data), .m_tvalid(cv_valid), .m_tready(1'b1));

  always_ff @(posedge s_clk) begin
    if (cv_valid) mem[waddr[WA-1:0]] <= cv_data;
  end

  always_ff @(posedge s_clk or negedge s_rst_n) begin
    if (!s_rst_n) begin
      cst   <= C_IDLE;
      beats <= '0;
      waddr <= '0;
      cap_s <= '0;
    end else begin
      if (cv_valid) waddr <= waddr + 1'b1;
      unique case (cst)
        C_IDLE:  if (arm_s.seq != cap_s.seq) begin
                   cst   <= C_ARMED;
                   beats <= '0;
                   waddr <= '0;
                 end
        C_ARMED: if (feed) begin
                   beats <= beats + 1'b1;
                   cst   <= C_RUN;
                 end
        C_RUN:   begin
                   if (feed) beats <= beats + 1'b1;
                   if (feed && beats + 1'b1 == {arm_s.words, 2'b00}) cst <= C_FLUSH;
                 end
        C_FLUSH: if (cv_valid && waddr + 1'b1 == arm_s.words) begin
                   cst   <= C_IDLE;
                   cap_s <= arm_s;
                 end
        default: cst <= C_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- read-out
  logic [NW-1:0] raddr;
  logic          reading;

  always_ff @(posedge m_clk or negedge m_rst_n) begin
    if (!m_rst_n) begin
      reading  <= 1'b0;
      raddr    <= '0;
      rdone_m  <= '0;
      m_tvalid <= 1'b0;
      m_tdata  <= '0;
    end else begin
      if (m_tvalid && m_tready) m_tvalid <= 1'b0;
      if (!reading) begin
        if (cap_m.seq != rdone_m && !(m_tvalid && !m_tready)) begin
          reading <= 1'b1;
          raddr   <= '0;
        end
      end else if (!m_tvalid || m_tready) begin
        if (raddr == cap_m.words) begin
          reading <= 1'b0;
          rdone_m <= cap_m.seq;
        end else begin
          m_tdata  <= mem[raddr[WA-1:0]];
          m_tvalid <= 1'b1;
          raddr    <= raddr + 1'b1;
        end
      end
    end
  end

  a_hold: assert property (@(posedge m_clk) disable iff (!m_rst_n)
    m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata));
endmodule
