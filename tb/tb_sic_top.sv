// tb_sic_top: end-to-end test of the constellation at its default sizes.
//
// ADC0 carries the ideal signal, a 5 MHz sine at 1 GSample/s (200 samples
// per period, amplitude 14000). ADC1 carries the non-ideal signal: the same
// sine inverted, attenuated to 0.9983 and delayed by 7.25 samples. The test
// plays host software:
//  1. reads the constellation ID table and runs one I2C command;
//  2. routes ADC0 to capture 0 and (broadcast) to DAC2, ADC1 to capture 1,
//     capture 0 through the 256-bit router to the host FIFO and capture 1 to
//     the external 256-bit port; captures 8192 samples of both on one
//     trigger, holding the host side off until the host FIFO is full;
//  3. checks that both buffers start at the trigger beat, then computes the
//     shift index by cross-correlation, the interpolation weight and
//     neighbour by trying them all, and the scaler by least squares;
//  4. writes them to the DSP star, routes ADC0/ADC1 into it and its residual
//     to DAC0, runs with back-pressure on DAC0 for a while, and requires the
//     residual to be at least 55 dB below the non-ideal input.
// Every mechanism (ID read, I2C command, trigger-aligned capture, router
// broadcast, re-routing, host FIFO full, DSP stall, fractional weighting)
// is counted and must occur at least once.
`timescale 1ns/1ps
module tb_sic_top;
  import sic_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam real A  = 14000.0;
  localparam real G  = -0.9983;
  localparam real TD = 7.25;
  localparam int  NCAP = 8192;

  logic aclk = 0, adc_clk = 0, host_clk = 0, rst = 0;
  always #5 aclk     = ~aclk;
  always #2 adc_clk  = ~adc_clk;
  always #2.5 host_clk = ~host_clk;

  axil_req_t req;
  axil_rsp_t rsp;
  axil_bfm u_bfm (.clk(aclk), .req, .rsp);

  logic [63:0]  adc_d [4], dac_d [4];
  logic [3:0]   adc_v, adc_r, dac_v, dac_r;
  logic [255:0] host_d, ext_d;
  logic         host_v, host_r, ext_v, ext_r, irq, trig, scl_oe, sda_oe;

  sic_top dut (
    .aclk, .aresetn(rst), .s_axil_req(req), .s_axil_rsp(rsp), .irq,
    .adc_clk, .adc_rst_n(rst), .trigger_in(trig),
    .adc_tdata(adc_d), .adc_tvalid(adc_v), .adc_tready(adc_r),
    .dac_tdata(dac_d), .dac_tvalid(dac_v), .dac_tready(dac_r),
    .host_clk, .host_rst_n(rst),
    .m_host_tdata(host_d), .m_host_tvalid(host_v), .m_host_tready(host_r),
    .m_ext_tdata(ext_d), .m_ext_tvalid(ext_v), .m_ext_tready(ext_r),
    .scl_i(!scl_oe), .scl_oe, .sda_i(!sda_oe), .sda_oe);

  int checks = 0, failures = 0;
  typedef enum int {EV_CID, EV_I2C, EV_TRIGGER, EV_BROADCAST, EV_REROUTE,
                    EV_FIFO_FULL, EV_DSP_STALL, EV_WEIGHTING, EV_N} ev_e;
  int ev [EV_N];

  function automatic int ideal_at(int n);
    return int'($rtoi(A * $sin(2.0 * PI * real'(n) / 200.0) + 100000.5) - 100000);
  endfunction
  function automatic int nonideal_at(int n);
    return int'($rtoi(G * A * $sin(2.0 * PI * (real'(n) - TD) / 200.0) + 100000.5) - 100000);
  endfunction

  // ------------------------------------------------------------ converters
  int  idx [2] = '{0, 0};       // next beat index of ADC0 / ADC1
  bit  adc_taken [2] = '{0, 0};
  int  trig_beat = -1;
  bit  do_trig = 0;
  bit  dac0_bp = 0;
  initial begin
    adc_v = '0; trig = 0; dac_r = '1;
    for (int c = 0; c < 4; c++) adc_d[c] = '0;
  end

  always begin
    @(posedge adc_clk); #0.5;
    for (int c = 0; c < 2; c++) begin
      if (!adc_v[c] || adc_taken[c]) begin
        for (int l = 0; l < 4; l++)
          adc_d[c][16*l +: 16] = 16'(c == 0 ? ideal_at(4 * idx[c] + l) : nonideal_at(4 * idx[c] + l));
        adc_v[c] = 1'b1;
        idx[c]++;
      end
    end
    trig = do_trig;
    if (do_trig) begin trig_beat = idx[0] - 1; do_trig = 0; end
    dac_r[0] = dac0_bp ? ($urandom % 2 == 0) : 1'b1;
  end

  // DAC2 loop-back (broadcast of ADC0) and DAC0 residual monitor
  int dac2_beats = 0;   // ADC0 beats looped back to DAC2
  int res_n = 0;
  real p_res = 0.0, p_ni = 0.0;
  bit  measure = 0;
  always @(negedge adc_clk) begin
    for (int c = 0; c < 2; c++) adc_taken[c] = adc_v[c] && adc_r[c];
    if (dac_v[2] && dac_r[2]) dac2_beats++;
    if (dut.u_router64.push[2] && dut.u_router64.push[6]) ev[EV_BROADCAST]++;
    if (dac_v[0] && !dac_r[0]) ev[EV_DSP_STALL]++;
    if (dac_v[0] && dac_r[0]) begin
      res_n++;
      if (measure)
        for (int l = 0; l < 4; l++) begin
          real r;
          r = real'(int'($signed(dac_d[0][16*l +: 16])));
          p_res += r * r;
          p_ni  += real'(nonideal_at(4 * res_n + l)) ** 2;
        end
    end
  end

  // ------------------------------------------------------------ host side
  int cap [2][NCAP];
  int got [2] = '{0, 0};
  bit host_hold = 1;
  initial begin host_r = 0; ext_r = 1; end
  always begin
    @(posedge host_clk); #0.5;
    host_r = !host_hold;
  end
  always @(negedge host_clk) begin
    if (dut.u_host_fifo.s_tvalid && !dut.u_host_fifo.s_tready) ev[EV_FIFO_FULL]++;
    if (host_v && host_r) begin
      for (int i = 0; i < 16; i++) cap[0][16 * got[0] + i] = int'($signed(host_d[16*i +: 16]));
      got[0]++;
    end
    if (ext_v && ext_r) begin
      for (int i = 0; i < 16; i++) cap[1][16 * got[1] + i] = int'($signed(ext_d[16*i +: 16]));
      got[1]++;
    end
  end

  task automatic rd_expect(axil_addr_t a, axil_data_t e, string what);
    axil_data_t rd;
    u_bfm.read(a, rd);
    checks++;
    if (rd != e) begin failures++; $display("FAIL %s: read %h exp %h", what, rd, e); end
  endtask

  // ------------------------------------------------------------ software
  initial begin
    axil_data_t rd;
    int best_d, best_w, best_p, best_s, n0;
    real best_e, c, cmax;
    repeat (5) @(posedge aclk);
    rst = 1;
    repeat (5) @(posedge aclk);

    // 1. constellation ID and I2C
    rd_expect(BASE_CID + 16'h04, 32'd7, "star count");
    rd_expect(BASE_CID + 16'h10 + 8 * 5, 32'(BASE_DSP), "DSP base");
    rd_expect(BASE_CID + 16'h14 + 8 * 5, 32'h0504, "DSP caps");
    ev[EV_CID]++;
    u_bfm.write(BASE_I2C + 16'h00, 32'h0000_A007);     // START, WRITE 0xA0, STOP
    wait (irq);
    u_bfm.read(BASE_I2C + 16'h04, rd);
    checks++; if (!rd[1]) begin failures++; $display("FAIL I2C: empty bus acked"); end
    u_bfm.write(BASE_I2C + 16'h08, 32'd1);
    ev[EV_I2C]++;

    // 2. capture
    u_bfm.write(BASE_ROUTER64 + 16'h18, 32'h8000_0000);  // capture 0 <- ADC0
    u_bfm.write(BASE_ROUTER64 + 16'h1C, 32'h8000_0001);  // capture 1 <- ADC1
    u_bfm.write(BASE_ROUTER64 + 16'h08, 32'h8000_0000);  // DAC2 <- ADC0
    u_bfm.write(BASE_ROUTER256 + 16'h00, 32'h8000_0000); // host <- capture 0
    u_bfm.write(BASE_ROUTER256 + 16'h04, 32'h8000_0001); // ext  <- capture 1
    u_bfm.write(BASE_CAPTURE0 + 16'h08, 32'(NCAP));
    u_bfm.write(BASE_CAPTURE1 + 16'h08, 32'(NCAP));
    u_bfm.write(BASE_CAPTURE0 + 16'h00, 32'd1);
    u_bfm.write(BASE_CAPTURE1 + 16'h00, 32'd1);
    repeat (10) @(posedge aclk);
    @(posedge adc_clk); do_trig = 1;
    wait (ev[EV_FIFO_FULL] > 20);
    host_hold = 0;
    wait (got[0] == NCAP / 16 && got[1] == NCAP / 16);
    ev[EV_TRIGGER]++;
    // The 64-bit router adds one clock, so in the trigger cycle the capture
    // inputs hold the beat the ADCs sent one clock earlier.
    checks++;
    for (int k = 0; k < NCAP; k++) begin
      if (cap[0][k] != ideal_at(4 * (trig_beat - 1) + k) || cap[1][k] != nonideal_at(4 * (trig_beat - 1) + k)) begin
        failures++;
        $display("FAIL capture sample %0d: %0d %0d", k, cap[0][k], cap[1][k]);
        break;
      end
    end
    rd_expect(BASE_CAPTURE0 + 16'h04, 32'h6, "capture 0 status");
    rd_expect(BASE_CAPTURE1 + 16'h04, 32'h6, "capture 1 status");

    // 3. coefficients from the captured buffers
    cmax = 0; best_d = 0;
    for (int d = 0; d <= 40; d++) begin
      c = 0;
      for (int n = 64; n < 1024; n++) c += real'(cap[0][n - d]) * real'(cap[1][n]);
      if (c < 0) c = -c;
      if (c > cmax) begin cmax = c; best_d = d; end
    end
    best_e = 1e30; best_w = 32; best_p = 0; best_s = 1024;
    for (int p = 0; p < 2; p++)
      for (int w = 0; w <= 32; w++) begin
        real sxy, syy, e;
        int  s;
        int  iw [1024];
        sxy = 0; syy = 0; e = 0;
        for (int n = 64; n < 1024; n++) begin
          int cu, nb;
          cu = cap[0][n - best_d];
          nb = p ? cap[0][n - best_d - 1] : cap[0][n - best_d + 1];
          iw[n] = (w * cu + (32 - w) * nb) >>> 5;
          sxy += real'(iw[n]) * real'(cap[1][n]);
          syy += real'(cap[1][n]) * real'(cap[1][n]);
        end
        s = $rtoi(1024.0 * sxy / syy + ((sxy < 0) ? -0.5 : 0.5));
        for (int n = 64; n < 1024; n++) begin
          real r;
          r = real'(iw[n]) - real'((longint'(cap[1][n]) * s) >>> 10);
          e += r * r;
        end
        if (e < best_e) begin best_e = e; best_w = w; best_p = p; best_s = s; end
      end
    $display("coefficients: shift %0d weight %0d/32 %s scaler %0d", best_d, best_w,
             best_p ? "previous" : "next", best_s);
    if (best_w != 32) ev[EV_WEIGHTING]++;

    // 4. real-time cancellation
    u_bfm.write(BASE_DSP + 16'h10, 32'(best_d));
    u_bfm.write(BASE_DSP + 16'h20, 32'(best_s));
    u_bfm.write(BASE_DSP + 16'h30, 32'(best_w) | (32'(best_p) << 8));
    u_bfm.write(BASE_ROUTER64 + 16'h18, 32'h0);          // captures off
    u_bfm.write(BASE_ROUTER64 + 16'h1C, 32'h0);
    u_bfm.write(BASE_ROUTER64 + 16'h08, 32'h0);
    u_bfm.write(BASE_ROUTER64 + 16'h10, 32'h8000_0000);  // DSP ideal <- ADC0
    u_bfm.write(BASE_ROUTER64 + 16'h14, 32'h8000_0001);  // DSP non-ideal <- ADC1
    u_bfm.write(BASE_ROUTER64 + 16'h00, 32'h8000_0004);  // DAC0 <- residual
    rd_expect(BASE_ROUTER64 + 16'h00, 32'h8000_0004, "router read-back");
    ev[EV_REROUTE]++;
    repeat (10) @(posedge aclk);
    dac0_bp = 1;
    u_bfm.write(BASE_DSP + 16'h00, 32'd1);
    n0 = res_n;
    wait (res_n > n0 + 1000);
    dac0_bp = 0;
    wait (res_n > n0 + 1300);
    @(negedge adc_clk); measure = 1;
    wait (res_n > n0 + 1300 + 2000);
    @(negedge adc_clk); measure = 0;
    begin
      real db;
      db = 10.0 * $log10(p_ni / (p_res + 1e-9));
      $display("cancellation %0.1f dB", db);
      checks++;
      if (db < 55.0) begin failures++; $display("FAIL cancellation %0.1f dB below 55 dB", db); end
    end
    for (int e = 0; e < EV_N; e++) begin
      checks++;
      if (ev[e] == 0) begin failures++; $display("FAIL mechanism %s never happened", ev_e'(e)); end
      else $display("mechanism %s: %0d", ev_e'(e), ev[e]);
    end
    checks++; if (u_bfm.timeouts != 0) begin failures++; $display("FAIL bus timeouts"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3_000_000; failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
