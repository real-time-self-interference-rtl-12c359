// tb_dsp_weighting: random sample pairs and weights against
// (w*cur + (2**F - w)*nb) >>> F, at 1/32 precision (4 stages) and at 1/16
// precision (2 stages). Inputs change 1 ns after each rising edge; the
// output for the input applied in iteration i is checked in iteration
// i + STAGES, which also checks the latency of each unit.
`timescale 1ns/1ps
module tb_dsp_weighting;
  import sic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  logic [5:0] w32;
  logic [4:0] w16;
  sample_t cur [4], nb [4], y32 [4], y16 [4];
  dsp_weighting #(.FRAC(5)) dut32 (.clk, .rst_n, .en(1'b1), .w(w32), .cur, .nb, .y(y32));
  dsp_weighting #(.FRAC(4)) dut16 (.clk, .rst_n, .en(1'b1), .w(w16), .cur, .nb, .y(y16));
  int checks = 0, failures = 0;
  int e32 [400][4], e16 [400][4];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(posedge clk); #1;
      if (t >= 4) for (int l = 0; l < 4; l++) begin
        checks++;
        if (int'(y32[l]) != e32[t-4][l]) begin
          failures++; $display("FAIL 1/32 t=%0d %0d exp %0d", t, y32[l], e32[t-4][l]);
        end
      end
      if (t >= 2) for (int l = 0; l < 4; l++) begin
        checks++;
        if (int'(y16[l]) != e16[t-2][l]) begin
          failures++; $display("FAIL 1/16 t=%0d %0d exp %0d", t, y16[l], e16[t-2][l]);
        end
      end
      w32 = 6'($urandom % 34);
      w16 = 5'($urandom % 17);
      for (int l = 0; l < 4; l++) begin
        int wa, wb;
        cur[l] = sample_t'($urandom); nb[l] = sample_t'($urandom);
        wa = (w32 > 32) ? 32 : int'(w32);
        wb = int'(w16);
        e32[t][l] = (int'(cur[l]) * wa + int'(nb[l]) * (32 - wa)) >>> 5;
        e16[t][l] = (int'(cur[l]) * wb + int'(nb[l]) * (16 - wb)) >>> 4;
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
