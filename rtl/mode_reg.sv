// mode_reg: holds the fields of the config command of the LumiMulti ADC.
//
// On a write request with command code config (00) the register takes, from
// the 9 data bits sent MSB first: mode = data[8:7], test_adc = data[6:4],
// lvds_lp = data[3] (the first low-power bit, LVDS power mode) and
// buf_lp = data[2] (the second, both internal buffers); data[1:0] are the
// zero padding. Mode codes are 00 parallel, 01 test and 10 serial; after a
// hard reset the mode is parallel, as the specification requires. The
// low-power bits reset to 0 (normal power) and test_adc to ADC0, and a config
// command carrying the undefined mode code 11 is ignored as a whole: both are
// this design's own choices.
//
// Timing: loads on the rising sclk edge at which wr.valid is high; the new
// value is visible right after that edge.
module mode_reg
  import lumi_pkg::*;
(
  input  logic    rst_n,   // hard reset, active low, asynchronous
  input  logic    sclk,
  input  cmd_wr_t wr,
  output cfg_t    cfg
);

  cfg_t  cfg_new;
  logic  load;

  always_comb begin
    cfg_new.mode     = mode_e'(wr.data[8:7]);
    cfg_new.test_adc = wr.data[6:4];
    cfg_new.lvds_lp  = wr.data[3];
    cfg_new.buf_lp   = wr.data[2];
    load = wr.valid && (wr.cmd == CMD_CONFIG) && (cfg_new.mode != MODE_RSVD);
  end

  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n)    cfg <= CFG_RESET;
    else if (load) cfg <= cfg_new;
  end

endmodule
