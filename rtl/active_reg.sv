// active_reg: per-ADC on/off register of the LumiMulti ADC, written by the
// active-adc command (code 01).
//
// The command carries 8 select bits in data[8:1]; the first bit sent turns
// ADC7 on (1) or off (0), the next ADC6, and so on down to ADC0, so
// adc_on[i] = data[i+1]. data[0] is the zero padding. An ADC that is off has
// its analog part powered down and the clock of its correction logic stopped;
// that gating happens in the ADC and is driven from adc_on.
//
// After a hard reset every ADC is on (RESET_ON), so that the chip reads out
// in its default parallel mode without any command; this reset value is this
// design's own choice.
//
// Timing: loads on the rising sclk edge at which wr.valid is high.
module active_reg
  import lumi_pkg::*;
#(
  parameter logic [7:0] RESET_ON = 8'hFF
) (
  input  logic       rst_n,   // hard reset, active low, asynchronous
  input  logic       sclk,
  input  cmd_wr_t    wr,
  output logic [7:0] adc_on   // bit i: ADCi on
);

  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n)
      adc_on <= RESET_ON;
    else if (wr.valid && wr.cmd == CMD_ACTIVE)
      adc_on <= wr.data[8:1];
  end

endmodule
