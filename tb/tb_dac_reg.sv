// tb_dac_reg: self-checking testbench of the two DAC code registers.
//
// Drives random write requests, one per sclk cycle, and keeps its own model:
// dac0 requests load DAC0 only, dac1 requests DAC1 only, with all 9 data bits.
// Also checks the reset value (mid-scale) and that a code changes on its
// request's edge only.
module tb_dac_reg;
  import lumi_pkg::*;

  localparam int WATCHDOG_CYCLES = 20000;

  logic       rst_n = 1'b1;
  logic       sclk  = 1'b0;
  cmd_wr_t    wr    = '0;
  logic [8:0] dac0, dac1;

  dac_reg dut (.rst_n, .sclk, .wr, .dac0, .dac1);

  always #5 sclk = ~sclk;

  int checks   = 0;
  int failures = 0;
  int n0       = 0;
  int n1       = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #(WATCHDOG_CYCLES * 10);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] e0, e1, d;

    #2 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    e0 = 9'd256;
    e1 = 9'd256;
    check(dac0 == e0 && dac1 == e1, "reset value: mid-scale");

    for (int t = 0; t < 2000; t++) begin
      @(negedge sclk);
      wr.valid = 1'($urandom % 4 != 0);
      wr.cmd   = cmd_e'($urandom);
      d        = 9'($urandom);
      wr.data  = d;
      check(dac0 == e0 && dac1 == e1, "codes stable between edges");
      @(posedge sclk);
      #1;
      if (wr.valid && wr.cmd == CMD_DAC0) begin e0 = d; n0++; end
      if (wr.valid && wr.cmd == CMD_DAC1) begin e1 = d; n1++; end
      check(dac0 == e0, $sformatf("dac0 %h got %h", e0, dac0));
      check(dac1 == e1, $sformatf("dac1 %h got %h", e1, dac1));
    end
    check(n0 > 50 && n1 > 50, "both DACs written");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
