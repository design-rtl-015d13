// top_cmddecoder: slow-control command decoder of the LumiMulti ADC.
//
// A serial SPI mode 0 link (sclk, cs_n, sdi) carries 17-bit frames: header
// 101011, a 2-bit command and 9 data bits, MSB first. cmd_dec checks the
// header and turns each complete frame into one write request; three register
// banks pick up the commands meant for them:
//   mode_reg   (config, 00)     read-out mode, test ADC, two low-power bits
//   active_reg (active-adc, 01) on/off bit of each of the 8 ADCs
//   dac_reg    (dac0 10, dac1 11) the two 9-bit bias DAC codes
// The split into a decoder and three register banks follows the LumiMulti
// ADC command decoder; the slave select and the frame_err flag are this
// design's own additions.
//
// Everything runs on sclk, with rst_n as asynchronous hard reset. A register
// takes its new value on the rising sclk edge that samples the frame's last
// data bit. The outputs are static configuration for the ADC core, which uses
// them in its own clock domain.
module top_cmddecoder
  import lumi_pkg::*;
(
  input  logic        rst_n,
  input  logic        sclk,
  input  logic        cs_n,
  input  logic        sdi,
  output logic [1:0]  mode,       // 00 parallel, 01 test, 10 serial
  output logic [2:0]  test_adc,   // ADC read out in test mode
  output logic        lvds_lp,    // LVDS low-power mode
  output logic        buf_lp,     // internal buffers low-power mode
  output logic [7:0]  adc_on,     // bit i: ADCi on
  output logic [8:0]  dac0,       // main-stage bias DAC
  output logic [8:0]  dac1,       // sample-and-hold current DAC
  output logic        frame_err   // current transfer had a wrong header
);

  cmd_wr_t wr;
  cfg_t    cfg;

  cmd_dec u_cmd_dec (
    .rst_n, .sclk, .cs_n, .sdi, .wr, .frame_err
  );

  mode_reg u_mode_reg (
    .rst_n, .sclk, .wr, .cfg
  );

  active_reg u_active_reg (
    .rst_n, .sclk, .wr, .adc_on
  );

  dac_reg u_dac_reg (
    .rst_n, .sclk, .wr, .dac0, .dac1
  );

  assign mode     = cfg.mode;
  assign test_adc = cfg.test_adc;
  assign lvds_lp  = cfg.lvds_lp;
  assign buf_lp   = cfg.buf_lp;

endmodule
