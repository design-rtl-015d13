// tb_active_reg: self-checking testbench of the ADC on/off register.
//
// Drives random write requests, one per sclk cycle, and keeps its own model:
// only active-adc requests load, and the first data bit sent (data[8]) is
// ADC7's on bit, the eighth (data[1]) ADC0's. Also checks the reset value
// (all ADCs on) and that the value changes on the request's edge only.
module tb_active_reg;
  import lumi_pkg::*;

  localparam int WATCHDOG_CYCLES = 20000;

  logic       rst_n = 1'b1;
  logic       sclk  = 1'b0;
  cmd_wr_t    wr    = '0;
  logic [7:0] adc_on;

  active_reg dut (.rst_n, .sclk, .wr, .adc_on);

  always #5 sclk = ~sclk;

  int checks   = 0;
  int failures = 0;
  int n_load   = 0;

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
    logic [7:0] exp_on;
    logic [8:0] d;

    #2 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    exp_on = 8'hFF;
    check(adc_on == exp_on, "reset value: all ADCs on");

    // walking one: the i-th bit sent controls ADC(7-i)
    for (int i = 0; i < 8; i++) begin
      @(negedge sclk);
      wr.valid = 1'b1;
      wr.cmd   = CMD_ACTIVE;
      wr.data  = 9'h100 >> i;
      @(posedge sclk);
      #1;
      check(adc_on == (8'h01 << (7 - i)), $sformatf("bit %0d sent turns on ADC%0d only", i, 7 - i));
    end
    exp_on = adc_on;

    for (int t = 0; t < 2000; t++) begin
      @(negedge sclk);
      wr.valid = 1'($urandom % 4 != 0);
      wr.cmd   = cmd_e'($urandom);
      d        = 9'($urandom);
      wr.data  = d;
      check(adc_on == exp_on, "register stable between edges");
      @(posedge sclk);
      #1;
      if (wr.valid && wr.cmd == CMD_ACTIVE) begin
        for (int a = 0; a < 8; a++) exp_on[a] = d[a + 1];
        n_load++;
      end
      check(adc_on == exp_on, $sformatf("adc_on %b got %b", exp_on, adc_on));
    end
    check(n_load > 50, "loads exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
