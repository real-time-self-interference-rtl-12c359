// tb_axis_router: a 4x4 router (16-bit beats) with input 1 broadcast to
// outputs 0 and 1, input 3 to output 2 and output 3 off. Inputs send
// numbered beats with random gaps, outputs take them with random
// back-pressure. Checks that each output sees its input's beats in order
// with nothing lost or repeated, that unrouted inputs are never stalled,
// the one-clock latency, and the routing-table read-back; then re-routes
// output 3 to input 0 and checks again.
`timescale 1ns/1ps
module tb_axis_router;
  import sic_pkg::*;
  logic aclk = 0, clk = 0, aresetn = 0, rst_n = 0;
  always #5 aclk = ~aclk;
  always #2 clk  = ~clk;
  axil_req_t req;
  axil_rsp_t rsp;
  axil_bfm u_bfm (.clk(aclk), .req, .rsp);

  logic [15:0] s_d [4], m_d [4];
  logic [3:0]  s_v, s_r, m_v, m_r;
  axis_router #(.BASE(16'h0100), .DW(16), .N_IN(4), .N_OUT(4)) dut (
    .aclk, .aresetn, .axil_req(req), .axil_rsp(rsp), .clk, .rst_n,
    .s_tdata(s_d), .s_tvalid(s_v), .s_tready(s_r),
    .m_tdata(m_d), .m_tvalid(m_v), .m_tready(m_r));

  int checks = 0, failures = 0;
  int sent [4] = '{0, 0, 0, 0};
  int got  [4] = '{0, 0, 0, 0};
  int src  [4] = '{1, 1, 3, -1};
  int base [4] = '{0, 0, 0, 0};     // first sequence number expected
  bit run = 0, lat_seen = 0;
  logic [3:0] taken = '0;
  longint cyc = 0;
  longint t_sent;
  always @(posedge clk) cyc++;

  initial begin s_v = '0; m_r = '0; for (int i = 0; i < 4; i++) s_d[i] = '0; end

  always begin
    @(posedge clk); #1;
    for (int i = 0; i < 4; i++) begin
      if (!s_v[i] || taken[i]) begin
        s_v[i] = run && ($urandom % 3 != 0);
        s_d[i] = {4'(i), 12'(sent[i])};
      end
      m_r[i] = ($urandom % 4 != 0);
    end
  end

  always @(negedge clk) begin
    taken = s_v & s_r;
    for (int i = 0; i < 4; i++) begin
      if (taken[i]) begin
        if (i == 3 && sent[3] == 0) t_sent = cyc;
        sent[i]++;
      end
      if ((i == 0 || i == 2) && src[3] != 0) begin
        checks++;
        if (!s_r[i]) begin failures++; $display("FAIL unrouted input %0d stalled", i); end
      end
    end
    for (int o = 0; o < 4; o++) if (m_v[o] && m_r[o]) begin
      checks++;
      if (src[o] < 0 || m_d[o] != {4'(src[o]), 12'(base[o] + got[o])}) begin
        failures++;
        $display("FAIL out %0d got %h exp %h", o, m_d[o], {4'(src[o]), 12'(base[o] + got[o])});
      end
      if (o == 2 && got[2] == 0 && !lat_seen) begin
        lat_seen = 1; checks++;
        if (cyc - t_sent != 1) begin failures++; $display("FAIL latency %0d", cyc - t_sent); end
      end
      got[o]++;
    end
  end

  initial begin
    axil_data_t rd;
    repeat (4) @(posedge aclk);
    aresetn = 1; rst_n = 1;
    u_bfm.write(16'h0100, 32'h8000_0001);
    u_bfm.write(16'h0104, 32'h8000_0001);
    u_bfm.write(16'h0108, 32'h8000_0003);
    u_bfm.read(16'h0104, rd);
    checks++; if (rd != 32'h8000_0001) begin failures++; $display("FAIL readback %h", rd); end
    repeat (5) @(posedge aclk);
    run = 1;
    repeat (400) @(posedge clk);
    run = 0;
    repeat (40) @(posedge clk);
    checks += 3;
    if (got[0] != sent[1] || got[1] != sent[1] || got[2] != sent[3] || got[3] != 0 || sent[1] < 50) begin
      failures++;
      $display("FAIL counts sent %0d %0d got %0d %0d %0d %0d", sent[1], sent[3], got[0], got[1], got[2], got[3]);
    end
    // re-route output 3 to input 0
    u_bfm.write(16'h010C, 32'h8000_0000);
    repeat (5) @(posedge aclk);
    src[3] = 0; base[3] = sent[0];
    run = 1;
    repeat (200) @(posedge clk);
    run = 0;
    repeat (40) @(posedge clk);
    checks++;
    if (got[3] == 0 || got[3] != sent[0] - base[3]) begin
      failures++; $display("FAIL out3 after re-route got %0d", got[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
