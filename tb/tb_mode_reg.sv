// tb_mode_reg: self-checking testbench of the config register.
//
// Drives write requests straight into the register, one per sclk cycle with
// random command codes and data, and keeps its own model of the config
// fields. Checks the reset value (parallel mode, normal power), that only
// config commands with a defined mode code load, the field positions within
// the 9 data bits, and that a value appears on the edge of its request and not
// before.
module tb_mode_reg;
  import lumi_pkg::*;

  localparam int WATCHDOG_CYCLES = 20000;

  logic    rst_n = 1'b1;
  logic    sclk  = 1'b0;
  cmd_wr_t wr    = '0;
  cfg_t    cfg;

  mode_reg dut (.rst_n, .sclk, .wr, .cfg);

  always #5 sclk = ~sclk;

  int checks   = 0;
  int failures = 0;
  int n_load   = 0;
  int n_rsvd   = 0;

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
    logic [1:0] m;
    logic [2:0] ta;
    logic       lp, bp;
    logic [8:0] d;
    bit         is_cfg;

    m = 2'b00; ta = 3'd0; lp = 1'b0; bp = 1'b0;
    #2 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    check(cfg.mode == MODE_PARALLEL && cfg.test_adc == 3'd0 && !cfg.lvds_lp && !cfg.buf_lp,
          "reset value: parallel mode, ADC0, normal power");

    for (int t = 0; t < 2000; t++) begin
      @(negedge sclk);
      wr.valid = 1'($urandom % 4 != 0);
      wr.cmd   = cmd_e'($urandom);
      d        = 9'($urandom);
      if (t % 7 == 0) d[8:7] = 2'b11;
      wr.data  = d;
      is_cfg = wr.valid && wr.cmd == CMD_CONFIG;
      // nothing changes before the edge
      check(cfg == {m, ta, lp, bp}, "register stable between edges");
      @(posedge sclk);
      #1;
      if (is_cfg && d[8:7] != 2'b11) begin
        m = d[8:7]; ta = d[6:4]; lp = d[3]; bp = d[2];
        n_load++;
      end else if (is_cfg) begin
        n_rsvd++;
      end
      check(cfg.mode == mode_e'(m), $sformatf("mode %b got %b", m, cfg.mode));
      check(cfg.test_adc == ta, $sformatf("test_adc %0d got %0d", ta, cfg.test_adc));
      check(cfg.lvds_lp == lp && cfg.buf_lp == bp, "low-power bits");
    end
    check(n_load > 50 && n_rsvd > 5, "both loads and reserved-mode requests exercised");

    // hard reset returns to parallel mode
    @(negedge sclk);
    wr = '0;
    rst_n = 1'b0;
    #1;
    check(cfg.mode == MODE_PARALLEL && cfg.test_adc == 3'd0 && !cfg.lvds_lp && !cfg.buf_lp,
          "hard reset returns to parallel mode");
    rst_n = 1'b1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
