// lumi_pkg: frame format, command and mode codes, and the types shared by the
// LumiMulti ADC command decoder.
//
// A command frame is 17 bits, sent MSB first: a 6-bit header that is always
// 101011, a 2-bit command code and a 9-bit data field. Commands whose payload
// is shorter than 9 bits are padded with zeros at the end. The codes below are
// the ones of the LumiMulti ADC command set; the struct layouts are this
// design's own.
package lumi_pkg;

  localparam int unsigned HDR_W   = 6;
  localparam int unsigned CMD_W   = 2;
  localparam int unsigned DATA_W  = 9;

  localparam logic [HDR_W-1:0] HEADER = 6'b101011;

  // Command set
  typedef enum logic [CMD_W-1:0] {
    CMD_CONFIG = 2'b00,  // mode(2) test-adc(3) low-power(2) + 2 zero bits
    CMD_ACTIVE = 2'b01,  // select-adc(8), first bit = ADC7, + 1 zero bit
    CMD_DAC0   = 2'b10,  // DAC0 code (9)
    CMD_DAC1   = 2'b11   // DAC1 code (9)
  } cmd_e;

  // Read-out modes carried by the config command
  typedef enum logic [1:0] {
    MODE_PARALLEL = 2'b00,  // one LVDS lane per ADC; default after hard reset
    MODE_TEST     = 2'b01,  // one ADC, whole sample per input clock
    MODE_SERIAL   = 2'b10,  // all ADCs interleaved on one lane
    MODE_RSVD     = 2'b11   // not defined; a config carrying it is ignored
  } mode_e;

  // Write request from the frame decoder to the register banks. valid is
  // high during the sclk cycle that ends with the frame's last data bit; the
  // registers load on that rising edge.
  typedef struct packed {
    logic              valid;
    cmd_e              cmd;
    logic [DATA_W-1:0] data;
  } cmd_wr_t;

  // Fields of the config command, as held by the mode register
  typedef struct packed {
    mode_e      mode;
    logic [2:0] test_adc;
    logic       lvds_lp;
    logic       buf_lp;
  } cfg_t;

  localparam cfg_t CFG_RESET = '{mode: MODE_PARALLEL, test_adc: 3'd0,
                                 lvds_lp: 1'b0, buf_lp: 1'b0};

endpackage
