// i2c_star: bridge from the AXI4-Lite command bus to the board I2C bus
// (converter card, clock chip, CPLD, EEPROM, monitors).
//
// A byte-level I2C master. Software writes one command word; the star then
// performs, in this order, an optional START (or repeated START), an optional
// byte transfer (write a byte and receive the slave's ACK, or read a byte and
// send ACK/NACK), and an optional STOP, then sets the interrupt. SCL and SDA
// are open-drain: *_oe = 1 pulls the line low, 0 releases it; the lines are
// read back on scl_i / sda_i, and a slave holding SCL low stretches the bit.
// Each bit takes four phases of CLK_DIV clocks (SCL = f_clk / (4*CLK_DIV),
// 100 kHz from the 100 MHz command clock by default).
//
// Registers (256-byte window at BASE, clock clk):
//   0x00 command (W)  bit 0 START, bit 1 STOP, bit 2 WRITE, bit 3 READ,
//                     bit 4 NACK after a READ, bits 15:8 byte to write.
//                     Ignored while busy.
//   0x04 status (R)   bit 0 busy, bit 1 last WRITE got NACK,
//                     bits 15:8 last byte read
//   0x08 irq (R/W)    bit 0 command done, write 1 to clear; drives irq
// Following the original: an AXI4-Lite to I2C bridge with an interrupt to
// the host. Everything inside (command format, bit timing) is this design's
// own, as the original only names the function.
module i2c_star
  import sic_pkg::*;
#(
  parameter axil_addr_t  BASE    = BASE_I2C,
  parameter int unsigned CLK_DIV = 250
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t axil_req,
  output axil_rsp_t axil_rsp,
  output logic      irq,
  input  logic      scl_i,
  output logic      scl_oe,
  input  logic      sda_i,
  output logic      sda_oe
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_BITS, S_STOP} state_e;

  logic        wr_en, rd_en;
  logic [7:0]  wr_addr, rd_addr;
  axil_data_t  wr_data, rd_data;
  logic [3:0]  wr_strb;

  state_e      st;
  logic [1:0]  ph;
  logic [3:0]  bitn;
  logic [8:0]  sh;              // bits still to send, MSB first
  logic [8:0]  rx;              // bits sampled, 8 data bits then ACK
  logic        do_stop, do_xfer, is_read, nack;
  logic [7:0]  rx_byte;
  logic        busy, irq_q;
  logic [$clog2(CLK_DIV+1)-1:0] cnt;
  logic        tick;

  axil_slave #(.BASE(BASE), .SPAN_BITS(8)) u_axil (
    .clk, .rst_n, .req(axil_req), .rsp(axil_rsp),
    .wr_en, .wr_addr, .wr_data, .wr_strb, .rd_en, .rd_addr, .rd_data);

  always_comb begin
    unique case (rd_addr)
      8'h04:   rd_data = {16'd0, rx_byte, 6'd0, nack, busy};
      8'h08:   rd_data = {31'd0, irq_q};
      default: rd_data = '0;
    endcase
  end

  assign busy = (st != S_IDLE);
  assign irq  = irq_q;
  assign tick = (cnt == '0);

  // Phase timer. SCL is released at the end of phase 1; phase 2 lasts until
  // the line is seen high, so a slave can stretch the clock.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           cnt <= '0;
    else if (st == S_IDLE)                cnt <= '0;
    else if (tick && ph == 2'd2 && !scl_i) cnt <= '0;
    else if (tick)                        cnt <= ($bits(cnt))'(CLK_DIV - 1);
    else                                  cnt <= cnt - 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ph <= '0; bitn <= '0; sh <= '0; rx <= '0;
      do_stop <= 1'b0; do_xfer <= 1'b0; is_read <= 1'b0;
      nack <= 1'b0; rx_byte <= '0; irq_q <= 1'b0;
      scl_oe <= 1'b0; sda_oe <= 1'b0;
    end else begin
      if (wr_en && wr_addr == 8'h08 && wr_data[0]) irq_q <= 1'b0;
      unique case (st)
        S_IDLE: if (wr_en && wr_addr == 8'h00 && (|wr_data[3:0])) begin
          do_stop  <= wr_data[1];
          do_xfer  <= wr_data[2] | wr_data[3];
          is_read  <= wr_data[3];
          sh       <= wr_data[3] ? {8'hff, wr_data[4]} : {wr_data[15:8], 1'b1};
          bitn     <= '0;
          ph       <= '0;
          st       <= wr_data[0] ? S_START : ((wr_data[2] | wr_data[3]) ? S_BITS : S_STOP);
        end
        S_START: if (tick && !(ph == 2'd2 && !scl_i)) begin
          ph <= ph + 1'b1;
          unique case (ph)
            2'd0: sda_oe <= 1'b0;                    // release SDA
            2'd1: scl_oe <= 1'b0;                    // release SCL
            2'd2: sda_oe <= 1'b1;                    // SDA falls, SCL high
            2'd3: begin
              scl_oe <= 1'b1;
              st     <= do_xfer ? S_BITS : (do_stop ? S_STOP : S_IDLE);
              if (!do_xfer && !do_stop) irq_q <= 1'b1;
            end
          endcase
        end
        S_BITS: if (tick && !(ph == 2'd2 && !scl_i)) begin
          ph <= ph + 1'b1;
          unique case (ph)
            2'd0: sda_oe <= !sh[8];                  // set data, SCL low
            2'd1: scl_oe <= 1'b0;                    // SCL rises
            2'd2: rx <= {rx[7:0], sda_i};            // sample
            2'd3: begin
              scl_oe <= 1'b1;
              sh     <= {sh[7:0], 1'b1};
              bitn   <= bitn + 1'b1;
              if (bitn == 4'd8) begin
                if (is_read) rx_byte <= rx[8:1];
                else         nack    <= rx[0];
                st <= do_stop ? S_STOP : S_IDLE;
                if (!do_stop) irq_q <= 1'b1;
              end
            end
          endcase
        end
        S_STOP: if (tick && !(ph == 2'd2 && !scl_i)) begin
          ph <= ph + 1'b1;
          unique case (ph)
            2'd0: sda_oe <= 1'b1;                    // SDA low, SCL low
            2'd1: scl_oe <= 1'b0;                    // SCL rises
            2'd2: sda_oe <= 1'b0;                    // SDA rises, SCL high
            2'd3: begin
              st    <= S_IDLE;
              irq_q <= 1'b1;
            end
          endcase
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
