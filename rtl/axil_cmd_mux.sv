// axil_cmd_mux: the command bus fan-out between the host and the stars.
//
// The host's AXI4-Lite request is broadcast unchanged to all N_SLAVES stars
// and their responses are ORed back into one response. This is correct only
// because every star decodes the address before raising a ready or valid and
// drives zeros otherwise (see axil_slave), so at most one star answers any
// transaction. A request no star claims is never answered. Purely
// combinational: no added latency.
// Following the original: broadcast and OR. The assertion that at most one
// star answers at a time is this design's addition.
module axil_cmd_mux
  import sic_pkg::*;
#(
  parameter int unsigned N_SLAVES = 7
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t m_req,
  output axil_rsp_t m_rsp,
  output axil_req_t s_req [N_SLAVES],
  input  axil_rsp_t s_rsp [N_SLAVES]
);
  logic [N_SLAVES-1:0] answering;

  always_comb begin
    m_rsp = '0;
    for (int i = 0; i < N_SLAVES; i++) begin
      s_req[i]     = m_req;
      m_rsp        = m_rsp | s_rsp[i];
      answering[i] = s_rsp[i].awready | s_rsp[i].arready | s_rsp[i].bvalid | s_rsp[i].rvalid;
    end
  end

  a_one_answer: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(answering));
endmodule
