// axil_slave: AXI4-Lite slave front end shared by every configurable star.
//
// The star owns the address window BASE .. BASE + 2**SPAN_BITS - 1. Because
// the command mux broadcasts requests and ORs all responses, this front end
// checks the address before it raises any ready signal, and drives its whole
// response to zero unless it is answering. A write is taken in the cycle in
// which address and data are both valid (awready and wready rise together),
// gives a one-cycle wr_en pulse to the star and then holds bvalid until
// bready. A read is taken when arvalid is set, samples the star's
// combinational rd_data for rd_addr in that cycle and holds rvalid until
// rready. Responses are always OKAY. One transaction of each kind is
// outstanding at a time.
module axil_slave
  import sic_pkg::*;
#(
  parameter axil_addr_t  BASE      = '0,
  parameter int unsigned SPAN_BITS = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  axil_req_t            req,
  output axil_rsp_t            rsp,
  output logic                 wr_en,
  output logic [SPAN_BITS-1:0] wr_addr,
  output axil_data_t           wr_data,
  output logic [3:0]           wr_strb,
  output logic                 rd_en,
  output logic [SPAN_BITS-1:0] rd_addr,
  input  axil_data_t           rd_data
);
  logic       bvalid_q, rvalid_q;
  axil_data_t rdata_q;
  logic       hit_w, hit_r;

  assign hit_w = (req.awaddr[AXIL_AW-1:SPAN_BITS] == BASE[AXIL_AW-1:SPAN_BITS]);
  assign hit_r = (req.araddr[AXIL_AW-1:SPAN_BITS] == BASE[AXIL_AW-1:SPAN_BITS]);

  assign wr_en   = req.awvalid && req.wvalid && hit_w && !bvalid_q;
  assign wr_addr = req.awaddr[SPAN_BITS-1:0];
  assign wr_data = req.wdata;
  assign wr_strb = req.wstrb;
  assign rd_en   = req.arvalid && hit_r && !rvalid_q;
  assign rd_addr = req.araddr[SPAN_BITS-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid_q <= 1'b0;
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
    end else begin
      if (wr_en)                      bvalid_q <= 1'b1;
      else if (bvalid_q && req.bready) bvalid_q <= 1'b0;
      if (rd_en) begin
        rvalid_q <= 1'b1;
        rdata_q  <= rd_data;
      end else if (rvalid_q && req.rready) begin
        rvalid_q <= 1'b0;
      end
    end
  end

  always_comb begin
    rsp         = '0;
    rsp.awready = wr_en;
    rsp.wready  = wr_en;
    rsp.bvalid  = bvalid_q;
    rsp.arready = rd_en;
    rsp.rvalid  = rvalid_q;
    rsp.rdata   = rvalid_q ? rdata_q : '0;
  end

// Handshake rule: once raised, a response stays valid until it is taken.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  bvalid_q && !req.bready |=> bvalid_q);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  rvalid_q && !req.rready |=> rvalid_q && $stable(rdata_q));
endmodule
