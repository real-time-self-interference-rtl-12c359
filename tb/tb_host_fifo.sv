// tb_host_fifo: fills the 256 x 256-bit FIFO to full with the output
// stalled (checks that it then refuses input), drains it, then streams
// numbered words with random valid and ready. Checks order, no loss, and
// the level output.
`timescale 1ns/1ps
module tb_host_fifo;
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  logic [255:0] s_d, m_d;
  logic s_v = 0, s_r, m_v, m_r = 0;
  logic [8:0] level;
  host_fifo dut (.clk, .rst_n, .s_tdata(s_d), .s_tvalid(s_v), .s_tready(s_r),
                 .m_tdata(m_d), .m_tvalid(m_v), .m_tready(m_r), .level);
  int checks = 0, failures = 0, sent = 0, got = 0;
  bit taken = 0;
  int mode = 0;     // 0 idle, 1 fill, 2 drain, 3 random
  always begin
    @(posedge clk); #1;
    if (!s_v || taken) begin
      s_v = (mode == 1) || (mode == 3 && $urandom % 3 != 0);
      s_d = {8{32'(sent)}};
    end
    m_r = (mode == 2) || (mode == 3 && $urandom % 3 != 0);
  end
  always @(negedge clk) begin
    taken = s_v && s_r;
    if (taken) sent++;
    if (m_v && m_r) begin
      checks++;
      if (m_d != {8{32'(got)}}) begin failures++; $display("FAIL word %0d = %h", got, m_d[31:0]); end
      got++;
    end
  end
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    mode = 1;
    repeat (300) @(posedge clk);
    @(negedge clk);
    checks += 2;
    if (sent != 256 || level != 9'd256) begin failures++; $display("FAIL fill %0d level %0d", sent, level); end
    if (s_r) begin failures++; $display("FAIL ready while full"); end
    mode = 2;
    repeat (300) @(posedge clk);
    @(negedge clk);
    checks++;
    if (got != sent || got < 256 || level != 0 || m_v) begin failures++; $display("FAIL drain %0d", got); end
    mode = 3;
    repeat (2000) @(posedge clk);
    mode = 2;
    repeat (300) @(posedge clk);
    checks++;
    if (got != sent) begin failures++; $display("FAIL sent %0d got %0d", sent, got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
