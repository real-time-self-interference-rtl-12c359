// tb_axis_width_up: numbered 64-bit beats with random gaps into the 4:1
// converter, random back-pressure on the 256-bit side. Checks that each wide
// beat holds four consecutive narrow beats, oldest in the low bits, and that
// none are lost.
`timescale 1ns/1ps
module tb_axis_width_up;
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  logic [63:0]  s_d;
  logic [255:0] m_d;
  logic s_v = 0, s_r, m_v, m_r = 0;
  axis_width_up #(.IN_W(64), .RATIO(4)) dut (.clk, .rst_n, .s_tdata(s_d), .s_tvalid(s_v),
    .s_tready(s_r), .m_tdata(m_d), .m_tvalid(m_v), .m_tready(m_r));
  int checks = 0, failures = 0, sent = 0, got = 0;
  bit run = 0, taken = 0;
  always begin
    @(posedge clk); #1;
    if (!s_v || taken) begin
      s_v = run && ($urandom % 4 != 0);
      s_d = {32'hBEEF_0000, 32'(sent)};
    end
    m_r = ($urandom % 3 != 0);
  end
  always @(negedge clk) begin
    taken = s_v && s_r;
    if (taken) sent++;
    if (m_v && m_r) begin
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (m_d[64*i +: 64] != {32'hBEEF_0000, 32'(4*got + i)}) begin
          failures++; $display("FAIL word %0d lane %0d = %h", got, i, m_d[64*i +: 64]);
        end
      end
      got++;
    end
  end
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1; run = 1;
    wait (sent >= 400);
    run = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (got != sent / 4) begin failures++; $display("FAIL got %0d words for %0d beats", got, sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
