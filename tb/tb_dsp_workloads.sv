// tb_dsp_workloads: cancellation of 50 MHz signals by the DSP star at its
// default sizes (1/32-sample weighting, 1023-sample shift range).
//
// Three cases run one after the other, at 1 GS/s (four samples per beat):
//   1. a 50 MHz tone on the ideal input; the non-ideal input carries the same
//      tone attenuated to 0.92 and delayed by 3.37 samples;
//   2. as 1, with a 46 MHz tone of 1/18 of the main amplitude added to the
//      non-ideal input only (900 mVpp against 50 mVpp);
//   3. as 2, with the extra tone at 49.5 MHz;
//   4. case 1 again, on a second star built for 1/16-sample weighting.
// For each case the testbench first finds the coefficients the way host
// software would: it runs the hardware's integer arithmetic over a block of
// samples for every shift index 0..8, neighbour and weight 0..32, keeps the
// setting whose aligned ideal signal best matches the non-ideal one (least
// residual after the best gain), and takes the scaler as the gain that
// maps the aligned ideal onto the non-ideal signal,
// <ideal,ideal>/<ideal,non-ideal>, which a tone present only on the
// non-ideal side leaves unbiased. It then loads them over AXI4-Lite,
// streams 1100 beats through the star and measures, on 4000
// residual samples (whole periods of every tone), the single-bin DFT at each
// tone frequency. Checks: the expected shift index and neighbour are found;
// the 50 MHz tone is cancelled by at least 50 dB; the extra tone leaves the
// star at the scaled non-ideal level, within 0.5 dB; the first residual beat
// leaves 9 clocks (1/32 weighting) or 7 clocks (1/16) after the first input
// beat was taken. The two stars share the command bus through the command
// mux and see the same input streams. The measured numbers are
// printed. The cancellation a whole-sample grid with 1/32 steps reaches at
// 50 MHz depends on where the true delay falls between two steps; 3.37
// samples lies between steps. Because 3.375 lies on both grids, the two
// precisions cancel about equally here.
`timescale 1ns/1ps
module tb_dsp_workloads;
  import sic_pkg::*;

  localparam int    N_BLK  = 4000;     // samples measured per case
  localparam int    N_BEAT = 1100;     // beats streamed per case
  localparam int    SKIP   = 200;      // residual samples dropped at the start
  localparam real   PI     = 3.14159265358979;
  localparam real   A      = 14000.0;  // main tone amplitude, counts
  localparam real   GAIN   = 0.92;
  localparam real   TAU    = 3.37;

  logic aclk = 0, clk = 0, aresetn = 0, rst_n = 0;
  always #5 aclk = ~aclk;
  always #2 clk  = ~clk;

  localparam axil_addr_t BASE16 = 16'h0700;

  axil_req_t req, sreq [2];
  axil_rsp_t rsp, srsp [2];
  axil_bfm u_bfm (.clk(aclk), .req, .rsp);
  axil_cmd_mux #(.N_SLAVES(2)) u_mux (
    .clk(aclk), .rst_n(aresetn), .m_req(req), .m_rsp(rsp), .s_req(sreq), .s_rsp(srsp));

  logic [63:0] id_d, ni_d, res_d, dbg_id, dbg_ni, res16_d, dbg16_id, dbg16_ni;
  logic        in_v, id_r, ni_r, res_v, dbg_v, id16_r, ni16_r, res16_v, dbg16_v;

  dsp_star dut (
    .aclk, .aresetn, .axil_req(sreq[0]), .axil_rsp(srsp[0]), .clk, .rst_n,
    .s_ideal_tdata(id_d), .s_ideal_tvalid(in_v), .s_ideal_tready(id_r),
    .s_nonideal_tdata(ni_d), .s_nonideal_tvalid(in_v), .s_nonideal_tready(ni_r),
    .m_resid_tdata(res_d), .m_resid_tvalid(res_v), .m_resid_tready(1'b1),
    .m_dbg_ideal_tdata(dbg_id), .m_dbg_nonideal_tdata(dbg_ni), .m_dbg_tvalid(dbg_v));

  dsp_star #(.BASE(BASE16), .FRAC(4)) dut16 (
    .aclk, .aresetn, .axil_req(sreq[1]), .axil_rsp(srsp[1]), .clk, .rst_n,
    .s_ideal_tdata(id_d), .s_ideal_tvalid(in_v), .s_ideal_tready(id16_r),
    .s_nonideal_tdata(ni_d), .s_nonideal_tvalid(in_v), .s_nonideal_tready(ni16_r),
    .m_resid_tdata(res16_d), .m_resid_tvalid(res16_v), .m_resid_tready(1'b1),
    .m_dbg_ideal_tdata(dbg16_id), .m_dbg_nonideal_tdata(dbg16_ni), .m_dbg_tvalid(dbg16_v));

  longint cyc = 0;
  always @(posedge clk) cyc++;

  int checks = 0, failures = 0;

  // ----------------------------------------------------------- signals
  real f_main = 50.0, f_2 = 0.0, amp_2 = 0.0;   // MHz, counts

  function automatic int ideal_at(int n);
    return $rtoi($floor(A * $sin(2.0 * PI * f_main * n / 1000.0) + 0.5));
  endfunction
  function automatic int nonideal_at(int n);
    real v;
    v = GAIN * A * $sin(2.0 * PI * f_main * (n - TAU) / 1000.0)
      + amp_2 * $sin(2.0 * PI * f_2 * n / 1000.0 + 0.3);
    return $rtoi($floor(v + 0.5));
  endfunction

  // ----------------------------------------------------------- coefficient search
  int best_d, best_prev, best_w, best_s;

  task automatic find_coefficients(int frac);
    int   id[], ni[];
    real  best_e;
    id = new[N_BLK + 16];
    ni = new[N_BLK + 16];
    for (int n = 0; n < N_BLK + 16; n++) begin
      id[n] = ideal_at(n);
      ni[n] = nonideal_at(n);
    end
    best_e = -1.0;
    for (int d = 0; d <= 8; d++)
      for (int p = 0; p < 2; p++)
        for (int w = 0; w <= (1 << frac); w++) begin
          real  sxy, sxx, syy, e;
          sxy = 0.0; sxx = 0.0; syy = 0.0;
          for (int m = 16; m < N_BLK + 16; m++) begin
            int wv;
            wv  = (id[m - d] * w + id[(p != 0) ? m - d - 1 : m - d + 1] * ((1 << frac) - w)) >>> frac;
            sxy += real'(wv) * real'(ni[m]);
            sxx += real'(ni[m]) * real'(ni[m]);
            syy += real'(wv) * real'(wv);
          end
          e = syy - sxy * sxy / sxx;
          if (best_e < 0.0 || e < best_e) begin
            best_e    = e;
            best_d    = d;
            best_prev = p;
            best_w    = w;
            best_s    = $rtoi($floor(1024.0 * syy / sxy + 0.5));
          end
        end
  endtask

  // ----------------------------------------------------------- stimulus and capture
  int     sent = 0, to_send = 0, nres = 0;
  int     res_q[$], sni_q[$];
  logic   use16 = 1'b0;
  longint t_first_in = -1, t_first_out = -1;

  initial begin in_v = 0; id_d = '0; ni_d = '0; end

  always begin
    @(posedge clk); #1;
    in_v = 1'b0;
    if (to_send > 0) begin
      for (int l = 0; l < 4; l++) begin
        id_d[16*l +: 16] = 16'(ideal_at(4 * sent + l));
        ni_d[16*l +: 16] = 16'(nonideal_at(4 * sent + l));
      end
      in_v = 1'b1;
      sent++;
      to_send--;
    end
  end

  always @(negedge clk) begin
    if (in_v && !(id_r && ni_r && id16_r && ni16_r)) begin
      failures++;
      $display("FAIL input stalled with the output always ready");
    end
    if (in_v && t_first_in < 0) t_first_in = cyc;
    if (use16 ? res16_v : res_v) begin
      if (t_first_out < 0) t_first_out = cyc;
      for (int k = 0; k < 4; k++) begin
        res_q.push_back(int'($signed(use16 ? res16_d[16*k +: 16] : res_d[16*k +: 16])));
        sni_q.push_back(int'($signed(use16 ? dbg16_ni[16*k +: 16] : dbg_ni[16*k +: 16])));
      end
      nres++;
    end
  end

  // ----------------------------------------------------------- measurement
  function automatic real tone_amp(ref int q[$], input real f);
    real re, im;
    re = 0.0; im = 0.0;
    for (int n = 0; n < N_BLK; n++) begin
      re += real'(q[SKIP + n]) * $cos(2.0 * PI * f * n / 1000.0);
      im += real'(q[SKIP + n]) * $sin(2.0 * PI * f * n / 1000.0);
    end
    return 2.0 * $sqrt(re * re + im * im) / N_BLK;
  endfunction

  function automatic real db(real x);
    return 20.0 * $ln(x) / $ln(10.0);
  endfunction

  task automatic run_case(string name, real f2, real a2, int frac);
    real        in_amp, res_amp, canc, t2_res, t2_exp;
    axil_addr_t base, other;
    int         lat;
    f_2 = f2; amp_2 = a2;
    use16 = (frac == 4);
    base  = use16 ? BASE16 : BASE_DSP;
    other = use16 ? BASE_DSP : BASE16;
    lat   = use16 ? 7 : 9;
    find_coefficients(frac);
    $display("%s: shift %0d, %s neighbour, weight %0d/%0d, scaler %0d",
             name, best_d, (best_prev != 0) ? "previous" : "next", best_w, 1 << frac, best_s);
    checks++;
    if (best_d != 3 || best_prev != 1) begin
      failures++;
      $display("FAIL %s: expected shift 3 with the previous neighbour", name);
    end
    u_bfm.write(other + 16'h00, 32'd0);
    u_bfm.write(base + 16'h00, 32'd0);
    u_bfm.write(base + 16'h10, 32'(best_d));
    u_bfm.write(base + 16'h20, 32'(best_s));
    u_bfm.write(base + 16'h30, 32'(best_w) | (32'(best_prev) << 8));
    u_bfm.write(base + 16'h00, 32'd1);
    repeat (4) @(posedge aclk);
    res_q.delete();
    sni_q.delete();
    nres = 0;
    sent = 0;
    t_first_in = -1;
    t_first_out = -1;
    to_send = N_BEAT;
    wait (nres == N_BEAT);
    checks++;
    if (t_first_out - t_first_in != longint'(lat)) begin
      failures++;
      $display("FAIL %s: latency %0d clocks, expected %0d", name, t_first_out - t_first_in, lat);
    end
    in_amp  = tone_amp(sni_q, f_main);
    res_amp = tone_amp(res_q, f_main);
    canc    = db(in_amp / res_amp);
    $display("%s: 50 MHz tone %0.1f counts in, %0.2f counts in the residual: %0.2f dB cancellation",
             name, in_amp, res_amp, canc);
    checks++;
    if (canc < 50.0) begin
      failures++;
      $display("FAIL %s: cancellation below 50 dB", name);
    end
    if (a2 > 0.0) begin
      t2_res = tone_amp(res_q, f2);
      t2_exp = a2 * (best_s < 0 ? -best_s : best_s) / 1024.0;
      $display("%s: %0.1f MHz tone %0.1f counts in the residual, %0.1f expected (%0.2f dB)",
               name, f2, t2_res, t2_exp, db(t2_res / t2_exp));
      checks++;
      if (db(t2_res / t2_exp) > 0.5 || db(t2_res / t2_exp) < -0.5) begin
        failures++;
        $display("FAIL %s: second tone not passed through", name);
      end
    end
    checks++;
    if (nres != N_BEAT) begin failures++; $display("FAIL %s: %0d beats out", name, nres); end
  endtask

  initial begin
    repeat (5) @(posedge aclk);
    aresetn = 1; rst_n = 1;
    repeat (5) @(posedge aclk);
    run_case("50 MHz",             0.0,  0.0,      5);
    run_case("50 + 46 MHz",       46.0,  A / 18.0, 5);
    run_case("50 + 49.5 MHz",     49.5,  A / 18.0, 5);
    run_case("50 MHz, 1/16",       0.0,  0.0,      4);
    if (u_bfm.timeouts != 0) begin failures++; $display("FAIL bus timeouts"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
