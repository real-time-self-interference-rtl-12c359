// cid_star: constellation ID, a read-only register table that lets software
// discover the firmware.
//
// Software reads the firmware ID and the number of stars, then for each
// global unit number u the star's base address and type, so that it can
// address "offset X of unit u" without knowing the address map, and can pick
// its start-up sequence from what the firmware holds.
// Registers (256-byte window at BASE, reads only, writes are acknowledged
// and ignored):
//   0x00 firmware ID
//   0x04 number of stars N_STARS
//   0x10 + 8*u  base address of unit u
//   0x14 + 8*u  bits 7:0 star type (star_type_e), bits 15:8 stream count
// Timing: one transaction at a time, read data in the cycle after the
// address handshake.
// Following the original: a table of each star's address and capabilities
// indexed by global unit number, plus a firmware ID. This design's choices:
// the register layout and the content of the capability word.
module cid_star
  import sic_pkg::*;
#(
  parameter axil_addr_t         BASE      = BASE_CID,
  parameter axil_data_t         FW_ID     = 32'h5153_0001,
  parameter int unsigned        N_STARS   = 7,
  parameter axil_addr_t [N_STARS-1:0] UNIT_BASE = '0,
  parameter logic [N_STARS-1:0][15:0] UNIT_CAPS = '0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t axil_req,
  output axil_rsp_t axil_rsp
);
  logic        wr_en, rd_en;
  logic [7:0]  wr_addr, rd_addr;
  axil_data_t  wr_data, rd_data;
  logic [3:0]  wr_strb;
  logic [6:0]  unit;

  axil_slave #(.BASE(BASE), .SPAN_BITS(8)) u_axil (
    .clk, .rst_n, .req(axil_req), .rsp(axil_rsp),
    .wr_en, .wr_addr, .wr_data, .wr_strb, .rd_en, .rd_addr, .rd_data);

  assign unit = 7'((rd_addr - 8'h10) >> 3);

  always_comb begin
    rd_data = '0;
    if (rd_addr == 8'h00)      rd_data = FW_ID;
    else if (rd_addr == 8'h04) rd_data = AXIL_DW'(N_STARS);
    else if (rd_addr >= 8'h10 && unit < 7'(N_STARS)) begin
      if (rd_addr[2]) rd_data = AXIL_DW'(UNIT_CAPS[unit]);
      else            rd_data = AXIL_DW'(UNIT_BASE[unit]);
    end
  end
endmodule
