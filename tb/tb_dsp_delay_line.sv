// tb_dsp_delay_line: shifts random beats in, sometimes with the enable low,
// and checks that lane k of the output for beat n is the sample at stream
// index 4*(n-1) + k - delay, with its next or previous neighbour,
// for random delays up to the maximum (scaled to 63 here to keep it short).
`timescale 1ns/1ps
module tb_dsp_delay_line;
  import sic_pkg::*;
  localparam int MAXD = 63;
  logic clk = 0, rst_n = 0, en = 0, nb_prev = 0;
  always #2 clk = ~clk;
  logic [5:0] delay;
  sample_t x [4], cur [4], nb [4];
  dsp_delay_line #(.MAX_DELAY(MAXD)) dut (.clk, .rst_n, .en, .x, .delay, .nb_prev, .cur, .nb);
  int checks = 0, failures = 0;
  int h[$];
  function automatic int at(int i);
    return (i < 0) ? 0 : h[i];
  endfunction

  // Inputs change 1 ns after a rising edge; the beat applied in one
  // iteration is in the output registers at the start of the next.
  initial begin
    int nbeats = 0, d = 0, pv = 0, chk = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(posedge clk); #1;
      if (chk) begin
        int n;
        n = nbeats - 1;      // beat shifted in at this edge
        for (int k = 0; k < 4; k++) begin
          int m;
          m = 4 * (n - 1) + k - d;
          checks += 2;
          if (int'(cur[k]) != at(m) || int'(nb[k]) != at(pv ? m - 1 : m + 1)) begin
            failures++;
            if (failures < 10)
              $display("FAIL n=%0d k=%0d d=%0d cur %0d exp %0d nb %0d exp %0d",
                       n, k, d, cur[k], at(m), nb[k], at(pv ? m - 1 : m + 1));
          end
        end
      end
      en = ($urandom % 5 != 0);
      d  = (t % 7 == 0) ? MAXD : int'($urandom % (MAXD + 1));
      pv = int'($urandom % 2);
      delay = 6'(d); nb_prev = pv[0];
      for (int l = 0; l < 4; l++) x[l] = sample_t'($urandom);
      if (en) begin
        for (int l = 0; l < 4; l++) h.push_back(int'(x[l]));
        nbeats++;
      end
      chk = en;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
