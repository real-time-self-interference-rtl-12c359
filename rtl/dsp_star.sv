// dsp_star: real-time self-interference canceller.
//
// Two 64-bit sample streams come in, four 16-bit samples per beat at the
// converter clock (250 MHz for 1 GSample/s): the ideal stream (a copy of what
// is transmitted) and the non-ideal stream (what the receiver hears). The
// ideal stream is delayed by the shift index (in samples), interpolated with
// its next or previous sample by the interpolation weight, and the
// non-ideal stream is multiplied by the scaler; the residual
//   resid[n] = ideal_w[n - shift] - (scaler / 1024) * nonideal[n]
// leaves on a third stream, four samples per clock. Two debug streams carry
// the aligned-and-weighted ideal and the scaled non-ideal samples of the same
// beat; they have no ready and share the residual's valid.
//
// Registers (AXI4-Lite, 256-byte window at BASE, clock aclk):
//   0x00 control   bit 0 run (R/W); bit 1 busy (R): samples in the pipeline
//   0x10 shift     delay of the ideal stream in samples, 0 .. MAX_DELAY
//   0x20 scaler    signed gain x 1024, 18 bits, sign-extended on read
//   0x30 weight    bits FRAC:0 weight of the current sample in 1/2**FRAC
//                  steps (2**FRAC = 1.0, the reset value); bit 8 selects the
//                  neighbour: 0 next sample, 1 previous sample
// The register values cross into the stream clock through cdc_bus.
//
// Timing: throughput one beat per clock; LATENCY = 9 clocks from the input
// handshake to the output beat at 1/32-sample precision (FRAC = 5), 7 at
// 1/16 (FRAC = 4). Pipeline, one register per step: CC0 stream and register
// read, CC1 shift index logic, CC2 non-ideal scaling and shift index adjust,
// CC3 ideal shift register and delay-out assignment, CC4.. weighting
// (multiply, sum, shift), last step subtract. The whole pipeline stalls while
// the residual output is valid and not ready. While run is 0 both inputs are
// accepted and discarded and nothing is output. Output beat n holds the
// residual of the non-ideal samples of input beat n - 1 (a one-beat offset
// that gives the "next" neighbour a sample even at shift 0).
//
// Following the original: the register map, the pipeline steps and their
// order, the x1024 scaler, 1/16 and 1/32 interpolation and the 7/9-cycle
// latency. This design's choices: register bit layouts, the 18-bit scaler,
// saturation to 16 bits, MAX_DELAY, stall behaviour and the one-beat offset.
module dsp_star
  import sic_pkg::*;
#(
  parameter axil_addr_t  BASE      = BASE_DSP,
  parameter int unsigned MAX_DELAY = 1023,
  parameter int unsigned FRAC      = 5,
  parameter int unsigned SCALER_W  = 18,
  localparam int unsigned DW       = $clog2(MAX_DELAY + 1),
  localparam int unsigned WSTAGES  = (FRAC >= 5) ? 4 : 2,
  localparam int unsigned NST      = 5 + WSTAGES
) (
  // command bus
  input  logic              aclk,
  input  logic              aresetn,
  input  axil_req_t         axil_req,
  output axil_rsp_t         axil_rsp,
  // sample streams
  input  logic              clk,
  input  logic              rst_n,
  input  logic [BEAT_W-1:0] s_ideal_tdata,
  input  logic              s_ideal_tvalid,
  output logic              s_ideal_tready,
  input  logic [BEAT_W-1:0] s_nonideal_tdata,
  input  logic              s_nonideal_tvalid,
  output logic              s_nonideal_tready,
  output logic [BEAT_W-1:0] m_resid_tdata,
  output logic              m_resid_tvalid,
  input  logic              m_resid_tready,
  output logic [BEAT_W-1:0] m_dbg_ideal_tdata,
  output logic [BEAT_W-1:0] m_dbg_nonideal_tdata,
  output logic              m_dbg_tvalid
);
  typedef struct packed {
    logic                       run;
    logic [DW-1:0]              delay;
    logic signed [SCALER_W-1:0] scaler;
    logic [FRAC:0]              weight;
    logic                       nb_prev;
  } cfg_t;

  localparam cfg_t CFG_RST = '{run: 1'b0, delay: '0,
                               scaler: SCALER_W'(1 << SCALER_FRAC),
                               weight: (FRAC+1)'(1 << FRAC), nb_prev: 1'b0};

  // ---------------------------------------------------------------- registers
  cfg_t        cfg_a, cfg_s;
  logic        wr_en, rd_en;
  logic [7:0]  wr_addr, rd_addr;
  axil_data_t  wr_data, rd_data;
  logic [3:0]  wr_strb;
  logic        busy_s, busy_a;

  axil_slave #(.BASE(BASE), .SPAN_BITS(8)) u_axil (
    .clk(aclk), .rst_n(aresetn), .req(axil_req), .rsp(axil_rsp),
    .wr_en, .wr_addr, .wr_data, .wr_strb, .rd_en, .rd_addr, .rd_data);

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      cfg_a <= CFG_RST;
    end else if (wr_en) begin
      unique case (wr_addr)
        DSP_REG_CTRL:   cfg_a.run    <= wr_data[0];
        DSP_REG_SHIFT:  cfg_a.delay  <= (wr_data > MAX_DELAY) ? DW'(MAX_DELAY) : wr_data[DW-1:0];
        DSP_REG_SCALER: cfg_a.scaler <= wr_data[SCALER_W-1:0];
        DSP_REG_WEIGHT: begin
          cfg_a.weight  <= (wr_data[FRAC:0] > (FRAC+1)'(1 << FRAC)) ? (FRAC+1)'(1 << FRAC)
                                                                    : wr_data[FRAC:0];
          cfg_a.nb_prev <= wr_data[8];
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    rd_data = '0;
    unique case (rd_addr)
      DSP_REG_CTRL:   rd_data = {30'd0, busy_a, cfg_a.run};
      DSP_REG_SHIFT:  rd_data = AXIL_DW'(cfg_a.delay);
      DSP_REG_SCALER: rd_data = AXIL_DW'(signed'(cfg_a.scaler));
      DSP_REG_WEIGHT: rd_data = AXIL_DW'({cfg_a.nb_prev, 8'(cfg_a.weight)});
      default:        rd_data = '0;
    endcase
  end

  cdc_bus #(.W($bits(cfg_t)), .RST_VAL(CFG_RST)) u_cfg_cdc (
    .src_clk(aclk), .src_rst_n(aresetn), .src_data(cfg_a),
    .dst_clk(clk), .dst_rst_n(rst_n), .dst_data(cfg_s));

  sync_2ff u_busy_sync (.clk(aclk), .rst_n(aresetn), .d(busy_s), .q(busy_a));

  // ---------------------------------------------------------------- pipeline
  logic adv, fire;
  logic [NST-1:0] v;

  assign adv  = !m_resid_tvalid || m_resid_tready;
  assign fire = cfg_s.run && adv && s_ideal_tvalid && s_nonideal_tvalid;
  assign s_ideal_tready    = cfg_s.run ? (adv && s_nonideal_tvalid) : 1'b1;
  assign s_nonideal_tready = cfg_s.run ? (adv && s_ideal_tvalid)    : 1'b1;
  assign busy_s = |v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   v <= '0;
    else if (adv) v <= {v[NST-2:0], fire};
  end
  assign m_resid_tvalid = v[NST-1];
  assign m_dbg_tvalid   = v[NST-1];

  // CC0: stream read and register read
  sample_t id0 [LANES], ni0 [LANES], ni_last [LANES];
  cfg_t    c0, c1, c2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) begin
        id0[l] <= '0; ni0[l] <= '0; ni_last[l] <= '0;
      end
      c0 <= CFG_RST;
    end else if (fire) begin
      for (int l = 0; l < LANES; l++) begin
        id0[l]     <= s_ideal_tdata[SAMPLE_W*l +: SAMPLE_W];
        ni0[l]     <= ni_last[l];
        ni_last[l] <= s_nonideal_tdata[SAMPLE_W*l +: SAMPLE_W];
      end
      c0 <= cfg_s;
    end
  end

  // CC1: shift index logic;  CC2: scaling and shift index adjust
  sample_t id1 [LANES], ni1 [LANES], id2 [LANES], ni2 [LANES];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) begin
        id1[l] <= '0; ni1[l] <= '0; id2[l] <= '0;
      end
      c1 <= CFG_RST;
      c2 <= CFG_RST;
    end else if (adv) begin
      id1 <= id0;
      ni1 <= ni0;
      c1  <= c0;
      id2 <= id1;
      c2  <= c1;
    end
  end

  dsp_scaler #(.SCALER_W(SCALER_W), .FRAC(SCALER_FRAC)) u_scaler (
    .clk, .rst_n, .en(adv), .scaler(c1.scaler), .x(ni1), .y(ni2));

  // CC3: ideal shift register and delay-out assignment
  sample_t cur3 [LANES], nb3 [LANES], ni3 [LANES];
  logic [FRAC:0] w3;
  dsp_delay_line #(.MAX_DELAY(MAX_DELAY)) u_delay (
    .clk, .rst_n, .en(adv && v[2]), .x(id2), .delay(c2.delay),
    .nb_prev(c2.nb_prev), .cur(cur3), .nb(nb3));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) ni3[l] <= '0;
      w3 <= '0;
    end else if (adv) begin
      ni3 <= ni2;
      w3  <= c2.weight;
    end
  end

  // CC4 ..: weighting, with the scaled non-ideal beat delayed alongside
  sample_t idw [LANES];
  sample_t nid [WSTAGES][LANES];
  dsp_weighting #(.FRAC(FRAC), .STAGES(WSTAGES)) u_weight (
    .clk, .rst_n, .en(adv), .w(w3), .cur(cur3), .nb(nb3), .y(idw));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < WSTAGES; s++)
        for (int l = 0; l < LANES; l++) nid[s][l] <= '0;
    end else if (adv) begin
      nid[0] <= ni3;
      for (int s = 1; s < WSTAGES; s++) nid[s] <= nid[s-1];
    end
  end

  // Last step: subtract and write the output streams
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_resid_tdata        <= '0;
      m_dbg_ideal_tdata    <= '0;
      m_dbg_nonideal_tdata <= '0;
    end else if (adv) begin
      for (int l = 0; l < LANES; l++) begin
        m_resid_tdata[SAMPLE_W*l +: SAMPLE_W] <=
          sat16(48'(idw[l]) - 48'(nid[WSTAGES-1][l]));
        m_dbg_ideal_tdata[SAMPLE_W*l +: SAMPLE_W]    <= idw[l];
        m_dbg_nonideal_tdata[SAMPLE_W*l +: SAMPLE_W] <= nid[WSTAGES-1][l];
      end
    end
  end

  // AXI-Stream rule: a valid residual beat is held until it is taken.
  a_resid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_resid_tvalid && !m_resid_tready |=> m_resid_tvalid && $stable(m_resid_tdata));
endmodule
