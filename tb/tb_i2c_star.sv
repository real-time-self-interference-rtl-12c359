// tb_i2c_star: the I2C bridge against a behavioural I2C slave at address
// 0x50 on an open-drain bus. Writes register 0x3C, reads back one byte
// (0x96) with a repeated START, then addresses an absent device. Checks the
// bytes the slave received, the byte read, the ACK/NACK status, START and
// STOP counts, the interrupt, and the SCL period (4 * CLK_DIV clocks).
`timescale 1ns/1ps
module tb_i2c_star;
  import sic_pkg::*;
  localparam int DIV = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  axil_req_t req;
  axil_rsp_t rsp;
  axil_bfm u_bfm (.clk, .req, .rsp);
  logic irq, scl_oe, sda_oe, sl_sda = 0;
  wire  scl = !scl_oe;
  wire  sda = !(sda_oe || sl_sda);
  i2c_star #(.BASE(16'h0600), .CLK_DIV(DIV)) dut (.clk, .rst_n, .axil_req(req), .axil_rsp(rsp),
    .irq, .scl_i(scl), .scl_oe, .sda_i(sda), .sda_oe);

  int checks = 0, failures = 0;

  // ---------------------------------------------------------- slave model
  typedef enum {M_IDLE, M_RX, M_TX} mode_e;
  mode_e mode = M_IDLE;
  int starts = 0, stops = 0, bitn = 0;
  bit first = 0, addressed = 0, rd_mode = 0, master_ack = 0;
  logic [7:0] sh = 0, txbyte = 8'h96;
  logic [7:0] rx_bytes [$];
  realtime t_rise = 0, period = 0;

  always @(negedge sda) if (scl && rst_n) begin starts++; bitn = 0; first = 1; mode = M_RX; sl_sda = 0; end
  always @(posedge sda) if (scl && rst_n) begin stops++; mode = M_IDLE; end
  always @(posedge scl) begin
    period = $realtime - t_rise; t_rise = $realtime;
    if (mode != M_IDLE) begin
      if (bitn < 8) begin if (mode == M_RX) sh = {sh[6:0], sda}; end
      else if (mode == M_TX) master_ack = !sda;
      bitn++;
    end
  end
  always @(negedge scl) if (mode != M_IDLE) begin
    if (bitn == 8) begin
      if (mode == M_RX) begin
        if (first) begin addressed = (sh[7:1] == 7'h50); rd_mode = sh[0]; end
        else rx_bytes.push_back(sh);
        sl_sda = addressed;
      end else sl_sda = 0;
    end else if (bitn == 9) begin
      sl_sda = 0; bitn = 0;
      if (!addressed) mode = M_IDLE;
      else if (first && rd_mode) mode = M_TX;
      first = 0;
    end
    if (mode == M_TX && bitn < 8) sl_sda = !txbyte[7 - bitn];
  end

  // ---------------------------------------------------------- host side
  task automatic cmd(logic [31:0] c, output axil_data_t st);
    int n = 0;
    u_bfm.write(16'h0600, c);
    while (!irq && n < 2000) begin @(posedge clk); n++; end
    checks++; if (!irq) begin failures++; $display("FAIL no irq for %h", c); end
    u_bfm.read(16'h0604, st);
    u_bfm.write(16'h0608, 32'd1);
    checks++; if (irq) begin failures++; $display("FAIL irq not cleared"); end
  endtask

  initial begin
    axil_data_t st;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cmd(32'hA005, st);                // START, WRITE 0xA0 (address 0x50, write)
    checks++; if (st[1]) begin failures++; $display("FAIL address not acked"); end
    cmd(32'h3C04, st);                // WRITE 0x3C
    checks++; if (st[1]) begin failures++; $display("FAIL data not acked"); end
    cmd(32'hA105, st);                // repeated START, WRITE 0xA1 (read)
    checks++; if (st[1]) begin failures++; $display("FAIL read address not acked"); end
    cmd(32'h001A, st);                // READ with NACK, then STOP
    checks++; if (st[15:8] != 8'h96) begin failures++; $display("FAIL read %h", st[15:8]); end
    checks++; if (master_ack) begin failures++; $display("FAIL master acked last byte"); end
    cmd(32'hB007, st);                // START, WRITE 0xB0 (absent), STOP
    checks++; if (!st[1]) begin failures++; $display("FAIL absent device acked"); end
    checks++; if (st[0]) begin failures++; $display("FAIL still busy"); end
    checks++; if (starts != 3 || stops != 2) begin failures++; $display("FAIL starts %0d stops %0d", starts, stops); end
    checks++; if (rx_bytes.size() != 1 || rx_bytes[0] != 8'h3C) begin failures++; $display("FAIL slave got %p", rx_bytes); end
    checks++; if (period != 4 * DIV * 10) begin failures++; $display("FAIL SCL period %0t", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
