// axil_bfm: AXI4-Lite master driver for testbenches.
// Signals are driven 1 ns after a rising edge and sampled on the falling
// edge, so nothing races the design's flops. write() raises address and data
// together and waits for the write response; read() returns the read data.
// Both give up after 200 clocks and count that as a timeout.
`timescale 1ns/1ps
module axil_bfm
  import sic_pkg::*;
(
  input  logic      clk,
  output axil_req_t req,
  input  axil_rsp_t rsp
);
  int timeouts = 0;

  initial req = '0;

  task automatic write(input axil_addr_t a, input axil_data_t d);
    int n = 0;
    @(posedge clk); #1;
    req.awaddr = a; req.awvalid = 1'b1;
    req.wdata  = d; req.wvalid  = 1'b1; req.wstrb = 4'hf;
    req.bready = 1'b0;
    do begin @(negedge clk); n++; end while (!rsp.bvalid && n < 200);
    if (n >= 200) timeouts++;
    @(posedge clk); #1;
    req.awvalid = 1'b0; req.wvalid = 1'b0; req.bready = 1'b1;
    @(posedge clk); #1;
    req.bready = 1'b0;
  endtask

  task automatic read(input axil_addr_t a, output axil_data_t d);
    int n = 0;
    @(posedge clk); #1;
    req.araddr = a; req.arvalid = 1'b1; req.rready = 1'b0;
    do begin @(negedge clk); n++; end while (!rsp.rvalid && n < 200);
    if (n >= 200) timeouts++;
    d = rsp.rdata;
    @(posedge clk); #1;
    req.arvalid = 1'b0; req.rready = 1'b1;
    @(posedge clk); #1;
    req.rready = 1'b0;
  endtask
endmodule
