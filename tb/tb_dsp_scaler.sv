// tb_dsp_scaler: random samples and gains (including saturating ones)
// against (x * s) >>> 10 saturated to 16 bits, one clock of latency.
`timescale 1ns/1ps
module tb_dsp_scaler;
  import sic_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  always #2 clk = ~clk;
  logic signed [17:0] s;
  sample_t x [4], y [4];
  dsp_scaler dut (.clk, .rst_n, .en, .scaler(s), .x, .y);
  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      int e [4];
      @(posedge clk); #1;
      en = 1;
      s  = (t % 5 == 0) ? 18'($urandom) : 18'(int'($urandom % 2049) - 1024);
      for (int l = 0; l < 4; l++) x[l] = sample_t'($urandom);
      for (int l = 0; l < 4; l++) begin
        longint p;
        p = (longint'(x[l]) * longint'(s)) >>> 10;
        e[l] = (p > 32767) ? 32767 : (p < -32768) ? -32768 : int'(p);
      end
      @(posedge clk); #1;
      en = 0;
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (int'(y[l]) != e[l]) begin
          failures++;
          $display("FAIL x=%0d s=%0d y=%0d exp %0d", x[l], s, y[l], e[l]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
