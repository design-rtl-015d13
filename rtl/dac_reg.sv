// dac_reg: the two 9-bit DAC codes of the LumiMulti ADC analog part.
//
// DAC0 sets the bias current of the ADCs' main stage and is written by the
// dac0 command (code 10); DAC1 sets the current of the sample-and-hold
// circuit and is written by dac1 (code 11). Each command carries the full
// 9-bit code, MSB first. Both codes reset to DAC_RESET, mid-scale by default;
// the specification gives no reset value, so this is this design's own
// choice.
//
// Timing: loads on the rising sclk edge at which wr.valid is high.
module dac_reg
  import lumi_pkg::*;
#(
  parameter logic [DATA_W-1:0] DAC_RESET = 9'h100
) (
  input  logic              rst_n,   // hard reset, active low, asynchronous
  input  logic              sclk,
  input  cmd_wr_t           wr,
  output logic [DATA_W-1:0] dac0,
  output logic [DATA_W-1:0] dac1
);

  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n) begin
      dac0 <= DAC_RESET;
      dac1 <= DAC_RESET;
    end else if (wr.valid) begin
      if (wr.cmd == CMD_DAC0) dac0 <= wr.data;
      if (wr.cmd == CMD_DAC1) dac1 <= wr.data;
    end
  end

endmodule
