// tb_dsp_star: self-checking test of the DSP star.
// Streams random sample beats into the ideal and non-ideal inputs under four
// register settings (zero shift and unit gain; shift 5 with a negative gain
// and 3/4 weighting with the next sample; shift 13 with 1/2 weighting with
// the previous sample, input gaps and output back-pressure; the maximum
// shift 1023) and compares every residual and debug beat with a model of
//   resid[m] = sat(((w*id[m-D] + (32-w)*id[m-D+-1]) >>> 5) - sat((s*ni[m]) >>> 10))
// with the one-beat offset of the output. Also checks the 9-cycle latency,
// register read-back and the busy bit.
`timescale 1ns/1ps
module tb_dsp_star;
  import sic_pkg::*;

  localparam int FRAC = 5;
  localparam int LAT  = 9;

  logic aclk = 0, clk = 0, aresetn = 0, rst_n = 0;
  always #5 aclk = ~aclk;
  always #2 clk  = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  axil_bfm u_bfm (.clk(aclk), .req, .rsp);

  logic [63:0] id_d, ni_d, res_d, dbg_id, dbg_ni;
  logic        in_v, id_r, ni_r, res_v, res_r, dbg_v;

  dsp_star dut (
    .aclk, .aresetn, .axil_req(req), .axil_rsp(rsp), .clk, .rst_n,
    .s_ideal_tdata(id_d), .s_ideal_tvalid(in_v), .s_ideal_tready(id_r),
    .s_nonideal_tdata(ni_d), .s_nonideal_tvalid(in_v), .s_nonideal_tready(ni_r),
    .m_resid_tdata(res_d), .m_resid_tvalid(res_v), .m_resid_tready(res_r),
    .m_dbg_ideal_tdata(dbg_id), .m_dbg_nonideal_tdata(dbg_ni), .m_dbg_tvalid(dbg_v));

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  // ----------------------------------------------------------- reference
  int idh[$], nih[$];           // sample history of accepted beats
  int D = 0, S = 1024, W = 32, PREV = 0;

  function automatic int sat(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction
  function automatic int hist(ref int h[$], input int i);
    return (i < 0 || i >= h.size()) ? 0 : h[i];
  endfunction

  // ----------------------------------------------------------- stimulus
  int   to_send = 0, gaps = 0, stall = 0;
  logic taken;
  initial begin in_v = 0; id_d = '0; ni_d = '0; res_r = 1; end

  always @(negedge clk) taken = in_v && id_r && ni_r;

  always begin
    @(posedge clk); #1;
    if (!in_v || taken) begin
      in_v = 1'b0;
      if (to_send > 0 && !(gaps && ($urandom % 4 == 0))) begin
        for (int l = 0; l < 4; l++) begin
          id_d[16*l +: 16] = 16'($urandom);
          ni_d[16*l +: 16] = 16'($urandom);
        end
        in_v = 1'b1;
        to_send--;
      end
    end
    res_r = stall ? ($urandom % 3 != 0) : 1'b1;
  end

  // ----------------------------------------------------------- checking
  int     nout = 0;
  longint t_in [$];
  int     lat_checked = 0;

  always @(negedge clk) begin
    if (in_v && id_r && ni_r) begin
      for (int l = 0; l < 4; l++) begin
        idh.push_back(int'($signed(id_d[16*l +: 16])));
        nih.push_back(int'($signed(ni_d[16*l +: 16])));
      end
      t_in.push_back(cyc);
    end
    if (res_v && res_r) begin
      longint t0;
      t0 = t_in.pop_front();
      if (!stall && !lat_checked) begin
        checks++;
        lat_checked = 1;
        if (cyc - t0 != LAT) begin
          failures++;
          $display("FAIL latency %0d, expected %0d", cyc - t0, LAT);
        end
      end
      for (int k = 0; k < 4; k++) begin
        int m, cur, nb, wv, sv, exp_r;
        m   = 4 * (nout - 1) + k;
        cur = (nout == 0) ? 0 : hist(idh, m - D);
        nb  = (nout == 0) ? 0 : hist(idh, PREV ? m - D - 1 : m - D + 1);
        wv  = (cur * W + nb * ((1 << FRAC) - W)) >>> FRAC;
        sv  = (nout == 0) ? 0 : sat((longint'(hist(nih, m)) * S) >>> SCALER_FRAC);
        exp_r = sat(longint'(wv) - sv);
        checks += 3;
        if (int'($signed(res_d[16*k +: 16])) != exp_r ||
            int'($signed(dbg_id[16*k +: 16])) != wv ||
            int'($signed(dbg_ni[16*k +: 16])) != sv || !dbg_v) begin
          failures++;
          if (failures < 10)
            $display("FAIL beat %0d lane %0d: resid %0d exp %0d, ideal %0d exp %0d, ni %0d exp %0d",
                     nout, k, int'($signed(res_d[16*k +: 16])), exp_r,
                     int'($signed(dbg_id[16*k +: 16])), wv, int'($signed(dbg_ni[16*k +: 16])), sv);
        end
      end
      nout++;
    end
  end

  // ----------------------------------------------------------- phases
  task automatic phase(int d, int s, int w, int prev, int n, int g, int st);
    axil_data_t rd;
    u_bfm.write(BASE_DSP + 16'h00, 32'd0);
    u_bfm.write(BASE_DSP + 16'h10, 32'(d));
    u_bfm.write(BASE_DSP + 16'h20, 32'(s));
    u_bfm.write(BASE_DSP + 16'h30, 32'(w) | (32'(prev) << 8));
    D = (d > 1023) ? 1023 : d; S = s; W = w; PREV = prev; gaps = g; stall = st;
    u_bfm.read(BASE_DSP + 16'h10, rd);
    checks++; if (rd != 32'(D)) begin failures++; $display("FAIL shift readback %0d", rd); end
    u_bfm.read(BASE_DSP + 16'h20, rd);
    checks++; if (rd != 32'(s)) begin failures++; $display("FAIL scaler readback %0h", rd); end
    u_bfm.read(BASE_DSP + 16'h30, rd);
    checks++; if (rd != (32'(w) | (32'(prev) << 8))) begin failures++; $display("FAIL weight readback %0h", rd); end
    u_bfm.write(BASE_DSP + 16'h00, 32'd1);
    repeat (4) @(posedge aclk);
    to_send = n;
    wait (to_send == 0 && !in_v);
    u_bfm.read(BASE_DSP + 16'h00, rd);
    checks++; if (rd[0] != 1'b1) begin failures++; $display("FAIL run bit"); end
    repeat (20) @(posedge aclk);
    u_bfm.read(BASE_DSP + 16'h00, rd);
    checks++; if (rd[1] != 1'b0) begin failures++; $display("FAIL busy after drain"); end
  endtask

  initial begin
    axil_data_t rd;
    repeat (5) @(posedge aclk);
    aresetn = 1; rst_n = 1;
    u_bfm.read(BASE_DSP + 16'h20, rd);
    checks++; if (rd != 32'd1024) begin failures++; $display("FAIL scaler reset %0d", rd); end
    phase(0, 1024, 32, 0, 40, 0, 0);
    phase(5, -1022, 24, 0, 60, 0, 1);
    phase(13, 700, 16, 1, 80, 1, 1);
    phase(2000, 1024, 8, 0, 300, 1, 0);
    checks++;
    if (nout != 480) begin failures++; $display("FAIL %0d output beats, expected 480", nout); end
    if (u_bfm.timeouts != 0) begin failures++; $display("FAIL bus timeouts"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
