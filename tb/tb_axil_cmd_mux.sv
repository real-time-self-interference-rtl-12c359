// tb_axil_cmd_mux: three register stars (constellation-ID tables at 0x0000,
// 0x0100, 0x0200) behind the command mux. Reads the firmware ID of each
// through the shared bus, which only works if the request reaches all three
// and exactly the addressed one's response comes back, and checks that a
// write to one star is answered once.
`timescale 1ns/1ps
module tb_axil_cmd_mux;
  import sic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  axil_req_t req, sreq [3];
  axil_rsp_t rsp, srsp [3];
  axil_bfm u_bfm (.clk, .req, .rsp);
  axil_cmd_mux #(.N_SLAVES(3)) dut (.clk, .rst_n, .m_req(req), .m_rsp(rsp), .s_req(sreq), .s_rsp(srsp));
  cid_star #(.BASE(16'h0000), .FW_ID(32'hA0A0_0000), .N_STARS(1)) s0 (.clk, .rst_n, .axil_req(sreq[0]), .axil_rsp(srsp[0]));
  cid_star #(.BASE(16'h0100), .FW_ID(32'hA0A0_0001), .N_STARS(1)) s1 (.clk, .rst_n, .axil_req(sreq[1]), .axil_rsp(srsp[1]));
  cid_star #(.BASE(16'h0200), .FW_ID(32'hA0A0_0002), .N_STARS(1)) s2 (.clk, .rst_n, .axil_req(sreq[2]), .axil_rsp(srsp[2]));
  int checks = 0, failures = 0;
  initial begin
    axil_data_t rd;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++)
      for (int i = 0; i < 3; i++) begin
        int k;
        k = (i + r) % 3;
        u_bfm.read(16'(k * 256), rd);
        checks++;
        if (rd != 32'hA0A0_0000 + 32'(k)) begin failures++; $display("FAIL star %0d read %h", k, rd); end
      end
    u_bfm.write(16'h0104, 32'h1);
    u_bfm.read(16'h0204, rd);
    checks++; if (rd != 32'd1) begin failures++; $display("FAIL count read %h", rd); end
    checks++; if (u_bfm.timeouts != 0) begin failures++; $display("FAIL timeouts"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
