// tb_capture_star: a capture star on three unrelated clocks (command 100 MHz,
// ADC 250 MHz, host 166 MHz). The ADC stream carries numbered samples. Three
// captures: 256 samples, 1000 samples (rounded down to 992) and an oversized
// request (clamped to 32768) with random host back-pressure. Each read-out
// must start at the beat present in the trigger cycle, hold exactly the
// requested samples in order, and the status bits must follow
// armed -> captured -> read out.
`timescale 1ns/1ps
module tb_capture_star;
  import sic_pkg::*;
  logic aclk = 0, s_clk = 0, m_clk = 0, rst = 0;
  always #5 aclk  = ~aclk;
  always #2 s_clk = ~s_clk;
  always #3 m_clk = ~m_clk;
  axil_req_t req;
  axil_rsp_t rsp;
  axil_bfm u_bfm (.clk(aclk), .req, .rsp);

  logic [63:0]  s_d = '0;
  logic         s_v = 0, s_r, trig = 0, m_v, m_r = 0;
  logic [255:0] m_d;
  capture_star #(.BASE(16'h0300)) dut (
    .aclk, .aresetn(rst), .axil_req(req), .axil_rsp(rsp),
    .s_clk, .s_rst_n(rst), .trigger_in(trig), .s_tdata(s_d), .s_tvalid(s_v), .s_tready(s_r),
    .m_clk, .m_rst_n(rst), .m_tdata(m_d), .m_tvalid(m_v), .m_tready(m_r));

  int checks = 0, failures = 0;
  int beat = 0, trig_beat = -1, got = 0, bp = 0;
  bit do_trig = 0;

  // ADC: one beat per clock, samples numbered 4*beat + lane
  always begin
    @(posedge s_clk); #0.5;
    s_v = 1'b1;
    for (int l = 0; l < 4; l++) s_d[16*l +: 16] = 16'(4 * beat + l);
    trig = do_trig;
    if (do_trig) begin trig_beat = beat; do_trig = 0; end
    beat++;
  end

  always begin
    @(posedge m_clk); #0.5;
    m_r = bp ? ($urandom % 3 != 0) : 1'b1;
  end
  always @(negedge m_clk) if (m_v && m_r) begin
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (m_d[16*i +: 16] != 16'(4 * trig_beat + 16 * got + i)) begin
        failures++;
        if (failures < 8) $display("FAIL word %0d sample %0d = %0d exp %0d", got, i,
                                   m_d[16*i +: 16], 16'(4 * trig_beat + 16 * got + i));
      end
    end
    got++;
  end

  task automatic capture(int size, int exp_samples, int backp);
    axil_data_t st;
    int n = 0;
    got = 0; bp = backp;
    u_bfm.write(16'h0308, 32'(size));
    u_bfm.read(16'h0308, st);
    checks++; if (st != 32'(exp_samples)) begin failures++; $display("FAIL size %0d", st); end
    u_bfm.write(16'h0300, 32'd1);
    repeat (10) @(posedge aclk);
    u_bfm.read(16'h0304, st);
    checks++; if (st[2:0] != 3'b001) begin failures++; $display("FAIL status armed %b", st[2:0]); end
    @(posedge s_clk); do_trig = 1;
    do begin u_bfm.read(16'h0304, st); n++; end while (st[2:0] != 3'b110 && n < 20000);
    checks++; if (st[2:0] != 3'b110) begin failures++; $display("FAIL status done %b", st[2:0]); end
    checks++;
    if (got != exp_samples / 16) begin
      failures++; $display("FAIL read %0d words, exp %0d", got, exp_samples / 16);
    end
  endtask

  initial begin
    repeat (4) @(posedge aclk);
    rst = 1;
    capture(256, 256, 0);
    capture(1000, 992, 1);
    capture(100000, 32768, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
