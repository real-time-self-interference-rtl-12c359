// cdc_bus: carries a slowly changing multi-bit value (configuration registers)
// from the source clock domain to the destination domain.
//
// When src_data differs from the value last sent and no transfer is pending,
// the source captures it into a holding register and toggles a request bit.
// The destination synchronises the toggle, loads the (now stable) holding
// register into dst_data and returns the toggle as an acknowledge, which
// frees the source for the next change. A value reaches dst_data about four
// destination clocks after it changes; intermediate values of a quickly
// changing source may be skipped, the last one always arrives.
module cdc_bus #(
  parameter int unsigned W       = 32,
  parameter logic [W-1:0] RST_VAL = '0
) (
  input  logic         src_clk,
  input  logic         src_rst_n,
  input  logic [W-1:0] src_data,
  input  logic         dst_clk,
  input  logic         dst_rst_n,
  output logic [W-1:0] dst_data
);
  logic [W-1:0] held;
  logic         req, busy, ack_s;
  logic         req_s, ack;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n) begin
      held <= RST_VAL;
      req  <= 1'b0;
      busy <= 1'b0;
    end else if (busy) begin
      if (ack_s == req) busy <= 1'b0;
    end else if (src_data != held) begin
      held <= src_data;
      req  <= ~req;
      busy <= 1'b1;
    end
  end

  sync_2ff u_req_sync (.clk(dst_clk), .rst_n(dst_rst_n), .d(req), .q(req_s));
  sync_2ff u_ack_sync (.clk(src_clk), .rst_n(src_rst_n), .d(ack), .q(ack_s));

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      dst_data <= RST_VAL;
      ack      <= 1'b0;
    end else if (req_s != ack) begin
      dst_data <= held;
      ack      <= req_s;
    end
  end
endmodule
