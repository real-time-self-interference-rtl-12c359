// sic_pkg: types and constants shared by the self-interference canceller
// constellation.
//
// The command bus is AXI4-Lite with a 16-bit address and 32-bit data; its
// request (master-to-slave) and response (slave-to-master) halves are carried
// as two structs so the command mux can broadcast one and OR the other.
// Sample streams carry four 16-bit two's-complement samples per 64-bit beat,
// the oldest sample in the low 16 bits. Register offsets of the DSP star
// follow its memory map (control 0x00, shift index 0x10, scaler 0x20,
// interpolation weight 0x30); the address width, the base addresses of the
// stars and the bit layout inside the registers are this design's choices.
package sic_pkg;

  localparam int unsigned AXIL_AW = 16;
  localparam int unsigned AXIL_DW = 32;

  typedef logic [AXIL_AW-1:0] axil_addr_t;
  typedef logic [AXIL_DW-1:0] axil_data_t;

  // Master -> slave half of an AXI4-Lite bus.
  typedef struct packed {
    axil_addr_t awaddr;
    logic       awvalid;
    axil_data_t wdata;
    logic [3:0] wstrb;
    logic       wvalid;
    logic       bready;
    axil_addr_t araddr;
    logic       arvalid;
    logic       rready;
  } axil_req_t;

  // Slave -> master half. A slave that is not addressed drives all zeros,
  // so the responses of many slaves may be ORed together.
  typedef struct packed {
    logic       awready;
    logic       wready;
    logic [1:0] bresp;
    logic       bvalid;
    logic       arready;
    axil_data_t rdata;
    logic [1:0] rresp;
    logic       rvalid;
  } axil_rsp_t;

  // Samples
  localparam int unsigned SAMPLE_W = 16;
  localparam int unsigned LANES    = 4;     // samples per 64-bit beat
  localparam int unsigned BEAT_W   = SAMPLE_W * LANES;

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // DSP star register offsets
  localparam logic [7:0] DSP_REG_CTRL   = 8'h00;
  localparam logic [7:0] DSP_REG_SHIFT  = 8'h10;
  localparam logic [7:0] DSP_REG_SCALER = 8'h20;
  localparam logic [7:0] DSP_REG_WEIGHT = 8'h30;

  // Fixed-point scale of the scaler register: value = real * 2**SCALER_FRAC
  localparam int unsigned SCALER_FRAC = 10;

  // Star base addresses on the command bus (each star decodes 256 bytes)
  localparam axil_addr_t BASE_CID       = 16'h0000;
  localparam axil_addr_t BASE_ROUTER64  = 16'h0100;
  localparam axil_addr_t BASE_ROUTER256 = 16'h0200;
  localparam axil_addr_t BASE_CAPTURE0  = 16'h0300;
  localparam axil_addr_t BASE_CAPTURE1  = 16'h0400;
  localparam axil_addr_t BASE_DSP       = 16'h0500;
  localparam axil_addr_t BASE_I2C       = 16'h0600;

  // Star type codes reported by the constellation ID star
  typedef enum logic [7:0] {
    STAR_CID     = 8'h01,
    STAR_ROUTER  = 8'h02,
    STAR_CAPTURE = 8'h03,
    STAR_DSP     = 8'h04,
    STAR_I2C     = 8'h05
  } star_type_e;

  // Saturate a wide signed value to a 16-bit sample.
  function automatic sample_t sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return sample_t'(16'sh7fff);
    else if (v < -48'sd32768) return sample_t'(16'sh8000);
    else                      return sample_t'(v[15:0]);
  endfunction

endpackage
