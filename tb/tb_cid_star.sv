// tb_cid_star: reads the whole table of a three-unit constellation ID star
// and checks firmware ID, unit count, base addresses and capability words,
// that unused addresses read zero, and that writes are acknowledged.
`timescale 1ns/1ps
module tb_cid_star;
  import sic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  axil_req_t req;
  axil_rsp_t rsp;
  axil_bfm u_bfm (.clk, .req, .rsp);
  localparam axil_addr_t [2:0] UB = {16'h0500, 16'h0300, 16'h0100};
  localparam logic [2:0][15:0] UC = {16'h0504, 16'h0203, 16'h1002};
  cid_star #(.BASE(16'h0000), .FW_ID(32'hC0DE_0042), .N_STARS(3), .UNIT_BASE(UB), .UNIT_CAPS(UC))
    dut (.clk, .rst_n, .axil_req(req), .axil_rsp(rsp));
  int checks = 0, failures = 0;
  task automatic expect_rd(axil_addr_t a, axil_data_t e);
    axil_data_t rd;
    u_bfm.read(a, rd);
    checks++;
    if (rd != e) begin failures++; $display("FAIL %h read %h exp %h", a, rd, e); end
  endtask
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    expect_rd(16'h00, 32'hC0DE_0042);
    expect_rd(16'h04, 32'd3);
    for (int u = 0; u < 3; u++) begin
      expect_rd(16'(16'h10 + 8*u), 32'(UB[u]));
      expect_rd(16'(16'h14 + 8*u), 32'(UC[u]));
    end
    expect_rd(16'h28, 32'd0);
    expect_rd(16'h08, 32'd0);
    u_bfm.write(16'h00, 32'hFFFF_FFFF);
    expect_rd(16'h00, 32'hC0DE_0042);
    checks++; if (u_bfm.timeouts != 0) begin failures++; $display("FAIL timeouts"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
