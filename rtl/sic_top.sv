// sic_top: the self-interference cancellation constellation of stars.
//
// The host (PCIe, DMA, clock generation; outside this design) drives one
// AXI4-Lite command bus, which axil_cmd_mux broadcasts to every star. The
// converter card star (JESD204B link; outside this design) delivers four ADC
// streams and takes four DAC streams, 64 bits = four 16-bit samples per beat
// at adc_clk (250 MHz for 1 GSample/s), plus the capture trigger.
//
//   ADC0..3 --+                       +--> DAC0..3
//   DSP resid-+--> axis_router (64) --+--> DSP ideal / non-ideal inputs
//   DSP debug-+                       +--> capture_star 0, 1
//   capture 0, 1 --> axis_router (256, host clock) --> host_fifo --> host
//                                                  +--> m_ext (256-bit out)
//
// Routes, DSP coefficients (shift index, scaler, interpolation weight) and
// captures are all set over the command bus: software captures ADC buffers,
// computes the coefficients off-line from them, writes them to the DSP star
// and then routes the converters through the DSP star in real time.
// cid_star lets software find every star; i2c_star drives the board I2C bus.
//
// Router-64 inputs:  0..3 ADC0..3, 4 DSP residual, 5 DSP aligned ideal
//                    (debug), 6 DSP scaled non-ideal (debug), 7 unused.
// Router-64 outputs: 0..3 DAC0..3, 4 DSP ideal, 5 DSP non-ideal,
//                    6 capture 0, 7 capture 1.
// Router-256 inputs: 0 capture 0, 1 capture 1; outputs: 0 host FIFO, 1 m_ext.
// Command-bus map: CID 0x0000, router-64 0x0100, router-256 0x0200,
// capture 0 0x0300, capture 1 0x0400, DSP 0x0500, I2C 0x0600 (global unit
// numbers 0..6 in that order). Clocks: aclk for commands, adc_clk for the
// converter streams, host_clk for the host streams.
// Following the original: the set of stars, the stream widths and how they
// connect. This design's choices: port numbering and the address map.
module sic_top
  import sic_pkg::*;
#(
  parameter int unsigned MAX_DELAY   = 1023,
  parameter int unsigned FRAC        = 5,
  parameter int unsigned MAX_SAMPLES = 32768,
  parameter int unsigned I2C_DIV     = 250
) (
  // command bus from the host star
  input  logic              aclk,
  input  logic              aresetn,
  input  axil_req_t         s_axil_req,
  output axil_rsp_t         s_axil_rsp,
  output logic              irq,
  // converter card streams
  input  logic              adc_clk,
  input  logic              adc_rst_n,
  input  logic              trigger_in,
  input  logic [BEAT_W-1:0] adc_tdata  [4],
  input  logic [3:0]        adc_tvalid,
  output logic [3:0]        adc_tready,
  output logic [BEAT_W-1:0] dac_tdata  [4],
  output logic [3:0]        dac_tvalid,
  input  logic [3:0]        dac_tready,
  // host streams
  input  logic              host_clk,
  input  logic              host_rst_n,
  output logic [255:0]      m_host_tdata,
  output logic              m_host_tvalid,
  input  logic              m_host_tready,
  output logic [255:0]      m_ext_tdata,
  output logic              m_ext_tvalid,
  input  logic              m_ext_tready,
  // board I2C bus (open drain)
  input  logic              scl_i,
  output logic              scl_oe,
  input  logic              sda_i,
  output logic              sda_oe
);
  localparam int unsigned NS = 7;

  axil_req_t sreq [NS];
  axil_rsp_t srsp [NS];

  axil_cmd_mux #(.N_SLAVES(NS)) u_cmd_mux (
    .clk(aclk), .rst_n(aresetn), .m_req(s_axil_req), .m_rsp(s_axil_rsp),
    .s_req(sreq), .s_rsp(srsp));

  localparam axil_addr_t [NS-1:0] UNIT_BASE = {
    BASE_I2C, BASE_DSP, BASE_CAPTURE1, BASE_CAPTURE0,
    BASE_ROUTER256, BASE_ROUTER64, BASE_CID};
  localparam logic [NS-1:0][15:0] UNIT_CAPS = {
    {8'd0, STAR_I2C}, {8'd5, STAR_DSP}, {8'd2, STAR_CAPTURE}, {8'd2, STAR_CAPTURE},
    {8'd4, STAR_ROUTER}, {8'd16, STAR_ROUTER}, {8'd0, STAR_CID}};

  cid_star #(.BASE(BASE_CID), .N_STARS(NS), .UNIT_BASE(UNIT_BASE),
             .UNIT_CAPS(UNIT_CAPS)) u_cid (
    .clk(aclk), .rst_n(aresetn), .axil_req(sreq[0]), .axil_rsp(srsp[0]));

  // ------------------------------------------------------------ 64-bit router
  logic [BEAT_W-1:0] r64_in  [8];
  logic [7:0]        r64_in_valid, r64_in_ready;
  logic [BEAT_W-1:0] r64_out [8];
  logic [7:0]        r64_out_valid, r64_out_ready;

  logic [BEAT_W-1:0] resid_tdata, dbg_ideal_tdata, dbg_nonideal_tdata;
  logic              resid_tvalid, resid_tready, dbg_tvalid;
  logic              dsp_id_tready, dsp_ni_tready;
  logic              cap0_s_tready, cap1_s_tready;

  always_comb begin
    for (int i = 0; i < 4; i++) r64_in[i] = adc_tdata[i];
    r64_in[4] = resid_tdata;
    r64_in[5] = dbg_ideal_tdata;
    r64_in[6] = dbg_nonideal_tdata;
    r64_in[7] = '0;
    r64_in_valid = {1'b0, dbg_tvalid, dbg_tvalid, resid_tvalid, adc_tvalid};
    adc_tready   = r64_in_ready[3:0];
    resid_tready = r64_in_ready[4];
    for (int o = 0; o < 4; o++) dac_tdata[o] = r64_out[o];
    dac_tvalid    = r64_out_valid[3:0];
    r64_out_ready = {cap1_s_tready, cap0_s_tready, dsp_ni_tready, dsp_id_tready, dac_tready};
  end

  axis_router #(.BASE(BASE_ROUTER64), .DW(BEAT_W), .N_IN(8), .N_OUT(8)) u_router64 (
    .aclk, .aresetn, .axil_req(sreq[1]), .axil_rsp(srsp[1]),
    .clk(adc_clk), .rst_n(adc_rst_n),
    .s_tdata(r64_in), .s_tvalid(r64_in_valid), .s_tready(r64_in_ready),
    .m_tdata(r64_out), .m_tvalid(r64_out_valid), .m_tready(r64_out_ready));

  // ------------------------------------------------------------ DSP star
  dsp_star #(.BASE(BASE_DSP), .MAX_DELAY(MAX_DELAY), .FRAC(FRAC)) u_dsp (
    .aclk, .aresetn, .axil_req(sreq[5]), .axil_rsp(srsp[5]),
    .clk(adc_clk), .rst_n(adc_rst_n),
    .s_ideal_tdata(r64_out[4]), .s_ideal_tvalid(r64_out_valid[4]),
    .s_ideal_tready(dsp_id_tready),
    .s_nonideal_tdata(r64_out[5]), .s_nonideal_tvalid(r64_out_valid[5]),
    .s_nonideal_tready(dsp_ni_tready),
    .m_resid_tdata(resid_tdata), .m_resid_tvalid(resid_tvalid),
    .m_resid_tready(resid_tready),
    .m_dbg_ideal_tdata(dbg_ideal_tdata), .m_dbg_nonideal_tdata(dbg_nonideal_tdata),
    .m_dbg_tvalid(dbg_tvalid));

  // ------------------------------------------------------------ capture stars
  logic [255:0] cap_tdata [2];
  logic [1:0]   cap_tvalid, cap_tready;

  capture_star #(.BASE(BASE_CAPTURE0), .MAX_SAMPLES(MAX_SAMPLES)) u_capture0 (
    .aclk, .aresetn, .axil_req(sreq[3]), .axil_rsp(srsp[3]),
    .s_clk(adc_clk), .s_rst_n(adc_rst_n), .trigger_in,
    .s_tdata(r64_out[6]), .s_tvalid(r64_out_valid[6]), .s_tready(cap0_s_tready),
    .m_clk(host_clk), .m_rst_n(host_rst_n),
    .m_tdata(cap_tdata[0]), .m_tvalid(cap_tvalid[0]), .m_tready(cap_tready[0]));

  capture_star #(.BASE(BASE_CAPTURE1), .MAX_SAMPLES(MAX_SAMPLES)) u_capture1 (
    .aclk, .aresetn, .axil_req(sreq[4]), .axil_rsp(srsp[4]),
    .s_clk(adc_clk), .s_rst_n(adc_rst_n), .trigger_in,
    .s_tdata(r64_out[7]), .s_tvalid(r64_out_valid[7]), .s_tready(cap1_s_tready),
    .m_clk(host_clk), .m_rst_n(host_rst_n),
    .m_tdata(cap_tdata[1]), .m_tvalid(cap_tvalid[1]), .m_tready(cap_tready[1]));

  // ------------------------------------------------------------ 256-bit router
  logic [255:0] r256_out [2];
  logic [1:0]   r256_out_valid, r256_out_ready;
  logic         fifo_s_tready;

  axis_router #(.BASE(BASE_ROUTER256), .DW(256), .N_IN(2), .N_OUT(2)) u_router256 (
    .aclk, .aresetn, .axil_req(sreq[2]), .axil_rsp(srsp[2]),
    .clk(host_clk), .rst_n(host_rst_n),
    .s_tdata(cap_tdata), .s_tvalid(cap_tvalid), .s_tready(cap_tready),
    .m_tdata(r256_out), .m_tvalid(r256_out_valid), .m_tready(r256_out_ready));

  assign r256_out_ready = {m_ext_tready, fifo_s_tready};
  assign m_ext_tdata    = r256_out[1];
  assign m_ext_tvalid   = r256_out_valid[1];

  host_fifo #(.DW(256), .DEPTH(256)) u_host_fifo (
    .clk(host_clk), .rst_n(host_rst_n),
    .s_tdata(r256_out[0]), .s_tvalid(r256_out_valid[0]), .s_tready(fifo_s_tready),
    .m_tdata(m_host_tdata), .m_tvalid(m_host_tvalid), .m_tready(m_host_tready),
    .level());

  // ------------------------------------------------------------ I2C bridge
  i2c_star #(.BASE(BASE_I2C), .CLK_DIV(I2C_DIV)) u_i2c (
    .clk(aclk), .rst_n(aresetn), .axil_req(sreq[6]), .axil_rsp(srsp[6]),
    .irq, .scl_i, .scl_oe, .sda_i, .sda_oe);
endmodule
